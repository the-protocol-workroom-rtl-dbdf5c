// nc_timers: NT programmable down-counting timers that keep time-outs for
// the 68020 (and state machine) without burdening the processor.
//
// `start[k]` loads timer k with `load[k]` and runs it; it counts one per
// clock (one bit time) and, when it reaches zero, stops, sets its `expired`
// flag and raises `irq`.  `stop[k]` halts a timer without expiry; `ack[k]`
// clears its expired flag.  A start with load 0 expires on the next clock.
// Counter width and the number of timers are choices of this design.
module nc_timers #(
  parameter int NT = 4,
  parameter int W  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NT-1:0] start,
  input  logic [NT-1:0] stop,
  input  logic [NT-1:0] ack,
  input  logic [W-1:0]  load [NT],
  output logic [NT-1:0] running,
  output logic [NT-1:0] expired,
  output logic [NT-1:0] expire_pulse,
  output logic          irq
);
  logic [W-1:0] cnt [NT];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running      <= '0;
      expired      <= '0;
      expire_pulse <= '0;
      for (int k = 0; k < NT; k++) cnt[k] <= '0;
    end else begin
      expire_pulse <= '0;
      for (int k = 0; k < NT; k++) begin
        if (ack[k]) expired[k] <= 1'b0;
        if (start[k]) begin
          cnt[k]     <= load[k];
          running[k] <= 1'b1;
          expired[k] <= 1'b0;
        end else if (stop[k]) begin
          running[k] <= 1'b0;
        end else if (running[k]) begin
          if (cnt[k] == '0) begin
            running[k]      <= 1'b0;
            expired[k]      <= 1'b1;
            expire_pulse[k] <= 1'b1;
          end else cnt[k] <= cnt[k] - 1'b1;
        end
      end
    end

  assign irq = |expired;
endmodule
