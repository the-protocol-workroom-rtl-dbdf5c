// tb_ce_fault_injector: drives random traffic through every fault mode and
// checks the output one clock later against the mode's rule; for random
// errors it checks that the measured error rate is near rate/256.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_fault_injector;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0;
  fault_t mode;
  logic [7:0] rate;
  sym_t din, dout, prev, want;
  int checks = 0, failures = 0, errs, bits;

  ce_fault_injector dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mode(input fault_t m);
    mode = m;
    rate = 8'd0;
    repeat (200) begin
      @(negedge clk);
      din = sym_t'($urandom_range(0, 15));
      prev = din;
      @(posedge clk); #1;
      want = prev;
      case (m)
        FLT_OPEN:   want = SYM_IDLE;
        FLT_JAM:    want = 4'b1101;
        FLT_INVERT: want.data = prev.carrier & ~prev.data;
        FLT_CV:     want.cv = prev.carrier;
        default: ;
      endcase
      checks++;
      if (dout !== want) begin
        failures++;
        $display("mode %s: in %b out %b", m.name(), prev, dout);
      end
    end
  endtask

  initial begin
    mode = FLT_NONE; rate = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_mode(FLT_NONE);
    check_mode(FLT_OPEN);
    check_mode(FLT_JAM);
    check_mode(FLT_INVERT);
    check_mode(FLT_CV);
    // random errors at 64/256 and at 0
    for (int r = 0; r < 2; r++) begin
      mode = FLT_NOISE;
      rate = (r == 0) ? 8'd64 : 8'd0;
      errs = 0; bits = 0;
      repeat (4000) begin
        @(negedge clk);
        din = '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom_range(0, 1))};
        prev = din;
        @(posedge clk); #1;
        bits++;
        if (dout.data != prev.data) errs++;
        if (dout.carrier !== 1'b1) failures++;
      end
      checks++;
      if (r == 0 && (errs < 800 || errs > 1200)) begin
        failures++;
        $display("noise rate 64: %0d errors in %0d bits", errs, bits);
      end
      if (r == 1 && errs != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
