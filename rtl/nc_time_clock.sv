// nc_time_clock: the node's copy of globally agreed time.  It counts the
// global time clock strobes the channel emulator sends to every node and is
// cleared by the global time reset, so all nodes hold the same value at the
// same instant, independently of their own receive timing.  `now` is the
// value used to time-stamp event records.  The width is a choice of this
// design (32 bits of 1 us ticks last over an hour).
module nc_time_clock #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gt_clock,
  input  logic         gt_reset,
  output logic [W-1:0] now
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        now <= '0;
    else if (gt_reset) now <= '0;
    else if (gt_clock) now <= now + 1'b1;
endmodule
