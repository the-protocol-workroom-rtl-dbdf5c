// tb_nc_event_fifo: random event bursts, some kinds suppressed, popped at
// random times; every record must come out in order with the time stamp of
// the clock its events occurred in and only unsuppressed bits; filling the
// FIFO must set overflow and lose exactly the records that did not fit.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_event_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic [15:0] events = 0, suppress;
  logic [31:0] now = 0;
  logic pop = 0, clr_overflow = 0;
  logic [47:0] rd_data;
  logic empty, overflow;
  logic [3:0] count;
  logic [47:0] q [$];
  int checks = 0, failures = 0, lost = 0;

  nc_event_fifo #(.DEPTH(D), .EVW(16), .TW(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    suppress = 16'h00F0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3000; r++) begin
      @(negedge clk);
      now = now + 1;
      events = ($urandom_range(0, 2) == 0) ? 16'($urandom) : 16'h0;
      pop = (r < 1500) ? ($urandom_range(0, 1) == 0) : (r > 2000);
      if (pop && q.size() > 0) begin
        checks++;
        if (rd_data !== q[0]) begin
          failures++;
          if (failures < 5) $display("r %0d: %h want %h", r, rd_data, q[0]);
        end
      end
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if ((events & ~suppress) != 0) begin
        if (q.size() < D || (pop && q.size() == D)) q.push_back({now, events & ~suppress});
        else lost++;
      end
      #1;
      checks++;
      if (count !== 4'(q.size()) || empty !== (q.size() == 0)) failures++;
    end
    checks++;
    if (lost == 0 || !overflow) begin failures++; $display("lost %0d overflow %b", lost, overflow); end
    @(negedge clk); clr_overflow = 1; @(negedge clk); clr_overflow = 0;
    checks++;
    if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
