// tb_ce_delay_cell: checks that a symbol written into the delay cell comes
// out exactly setting+1 clocks later, for several settings including the
// largest, with random traffic, and that the line is idle before it fills.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_delay_cell;
  import pw_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [3:0] delay;
  sym_t din, dout;
  sym_t hist [4096];
  int   t, checks = 0, failures = 0;

  ce_delay_cell #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int d, input int n);
    din = '0;
    delay = 4'(d);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    t = 0;
    repeat (n) begin
      din = sym_t'($urandom_range(0, 15));
      @(posedge clk);
      hist[t] = din;
      #1;
      checks++;
      if (dout !== ((t >= d) ? hist[t-d] : SYM_IDLE)) begin
        failures++;
        $display("delay %0d t %0d: got %b", d, t, dout);
      end
      t++;
      @(negedge clk);
    end
  endtask

  initial begin
    delay = 0; din = '0;
    run(0, 40);
    run(1, 40);
    run(5, 60);
    run(15, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
