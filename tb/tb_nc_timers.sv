// tb_nc_timers: each timer started with a random load must expire exactly
// load+1 clocks later, raise irq until acknowledged, and a stopped timer
// must never expire.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_timers;
  logic clk = 0, rst_n = 0;
  logic [3:0] start = 0, stop = 0, ack = 0, running, expired, expire_pulse;
  logic [15:0] load [4];
  logic irq;
  int checks = 0, failures = 0, cyc = 0;
  int t0 [4];
  int want [4];

  nc_timers #(.NT(4), .W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) #1
    for (int k = 0; k < 4; k++)
      if (expire_pulse[k]) begin
        checks++;
        if (k == 3 || cyc != want[k]) begin
          failures++;
          $display("timer %0d expired at %0d, want %0d", k, cyc, want[k]);
        end
      end

  initial begin
    for (int k = 0; k < 4; k++) load[k] = 16'($urandom_range(0, 200));
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 4'hF;
    for (int k = 0; k < 4; k++) want[k] = cyc + 1 + load[k] + 1;
    @(negedge clk);
    start = 0;
    stop = 4'h8;   // timer 3 is stopped
    @(negedge clk);
    stop = 0;
    repeat (260) @(negedge clk);
    checks++;
    if (expired !== 4'h7 || !irq || running !== 4'h0) begin
      failures++;
      $display("expired %b irq %b", expired, irq);
    end
    ack = 4'h7;
    @(negedge clk);
    ack = 0;
    checks++;
    if (irq) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
