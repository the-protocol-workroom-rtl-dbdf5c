// tb_ce_global_time: the global time clock must strobe once every DIV clocks,
// and a sync command must give one reset pulse and restart the divider.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_global_time;
  logic clk = 0, rst_n = 0, sync = 0, gt_clock, gt_reset;
  int checks = 0, failures = 0, last, n, cyc = 0, resets = 0;

  ce_global_time #(.DIV(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = -1; n = 0;
    repeat (205) begin
      @(posedge clk); #1;
      if (gt_clock) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 10) failures++;
        end
        last = cyc; n++;
      end
      if (gt_reset) failures++;
    end
    checks++;
    if (n < 19) failures++;
    // sync in the middle of a period
    @(negedge clk); sync = 1;
    @(negedge clk); sync = 0;
    #1;
    checks++;
    if (!gt_reset) failures++;
    last = cyc;
    while (!gt_clock) @(posedge clk) #1;
    checks++;
    if (cyc - last != 10) begin
      failures++;
      $display("first tick after sync after %0d clocks", cyc - last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
