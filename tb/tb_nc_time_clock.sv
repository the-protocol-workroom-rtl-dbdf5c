// tb_nc_time_clock: counts random global-time strobes and checks the value;
// a reset clears it.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_time_clock;
  logic clk = 0, rst_n = 0, gt_clock = 0, gt_reset = 0;
  logic [31:0] now;
  int checks = 0, failures = 0, n = 0;

  nc_time_clock dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 500; r++) begin
      @(negedge clk);
      gt_clock = ($urandom_range(0, 3) == 0);
      gt_reset = (r == 250);
      @(posedge clk); #1;
      if (gt_reset) n = 0; else if (gt_clock) n++;
      checks++;
      if (now !== 32'(n)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
