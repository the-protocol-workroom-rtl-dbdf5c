// ce_global_time: source of the global time signals the channel emulator
// distributes to every node (connector pins 5 and 6).
//
// `gt_clock` is a one-clock strobe every DIV clocks; `gt_reset` is a one-clock
// pulse issued on the `sync` command (from the emulator configuration) and
// restarts the divider, so that every node's time clock is cleared at the
// same instant and then counts the same ticks.  The tick period (DIV bit
// times) is a choice of this design: 10 gives a 1 us time-stamp resolution.
module ce_global_time #(
  parameter int DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  output logic gt_clock,
  output logic gt_reset
);
  logic [$clog2(DIV+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt      <= '0;
      gt_clock <= 1'b0;
      gt_reset <= 1'b0;
    end else begin
      gt_reset <= sync;
      gt_clock <= 1'b0;
      if (sync) cnt <= '0;
      else if (cnt == $bits(cnt)'(DIV-1)) begin
        cnt      <= '0;
        gt_clock <= 1'b1;
      end else cnt <= cnt + 1'b1;
    end
endmodule
