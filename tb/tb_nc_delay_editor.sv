// tb_nc_delay_editor: random packets pass through the delay line at several
// settings; the output must be the input delayed by setting+2 clocks (line
// plus editor register), with the bits in the 16-bit edit window replaced
// where the mask says and every other bit untouched.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_delay_editor;
  import pw_pkg::*;
  localparam int DEP = 64;
  logic clk = 0, rst_n = 0;
  logic [5:0] delay;
  logic edit_en;
  logic [15:0] edit_offset, edit_mask, edit_value;
  sym_t din, dout;
  logic edited;
  sym_t hist [8192];
  int   bitno [8192];
  int checks = 0, failures = 0, t, nedit;
  sym_t w;

  nc_delay_editor #(.DEPTH(DEP)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int d, input bit en);
    int b = 0, gap = 0;
    delay = 6'(d); edit_en = en;
    edit_offset = 16'($urandom_range(0, 40));
    edit_mask = 16'($urandom); edit_value = 16'($urandom);
    rst_n = 0; din = SYM_IDLE;
    @(negedge clk); rst_n = 1;
    t = 0; nedit = 0;
    repeat (1500) begin
      // packets of 80 bits separated by 10 idle clocks
      if (gap > 0) begin din = SYM_IDLE; gap--; b = 0; end
      else begin
        din = '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom)};
        b++;
        if (b == 80) gap = 10;
      end
      hist[t] = din; bitno[t] = din.carrier ? b - 1 : -1;
      @(posedge clk); #1;
      if (t >= d + 1) begin
        w = hist[t - d - 1];
        if (en && w.carrier && bitno[t - d - 1] >= edit_offset && bitno[t - d - 1] < edit_offset + 16
            && edit_mask[15 - (bitno[t - d - 1] - edit_offset)]) begin
          w.data = edit_value[15 - (bitno[t - d - 1] - edit_offset)];
          nedit++;
        end
        checks++;
        if (dout !== w) begin
          failures++;
          if (failures < 5) $display("d %0d t %0d: %b want %b", d, t, dout, w);
        end
      end
      t++;
      @(negedge clk);
    end
    if (en) begin
      checks++;
      if (nedit == 0) failures++;
    end
  endtask

  initial begin
    delay = 0; edit_en = 0; edit_offset = 0; edit_mask = 0; edit_value = 0; din = SYM_IDLE;
    run(0, 1);
    run(7, 1);
    run(63, 1);
    run(20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
