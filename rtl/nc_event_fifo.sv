// nc_event_fifo: event record construction, time stamping and the event FIFO
// of the network controller's monitoring hardware.
//
// In any clock in which at least one event line is high and not suppressed,
// one record {time stamp, event bits} is written into the FIFO: events that
// happen in the same clock share one record.  `suppress` (set by the 68020)
// removes event kinds of no interest to an experiment before they take FIFO
// space.  The 68020 empties the FIFO at its convenience: `rd_data` shows the
// oldest record and `pop` removes it.  A record that arrives while the FIFO
// is full is lost and sets the sticky `overflow` flag, cleared by
// `clr_overflow`.  Depth and record layout are choices of this design.
//
// The assertion on the occupancy is disabled during reset, which lint
// reports as a synchronous use of rst_n; no flop uses it that way.
module nc_event_fifo #(
  parameter int DEPTH = 64,
  parameter int EVW   = 16,
  parameter int TW    = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [EVW-1:0]         events,
  input  logic [EVW-1:0]         suppress,
  input  logic [TW-1:0]          now,
  input  logic                   pop,
  input  logic                   clr_overflow,
  output logic [TW+EVW-1:0]      rd_data,   // {time stamp, events}
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count,
  output logic                   overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [TW+EVW-1:0] mem [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [EVW-1:0]    kept;
  logic              push, do_pop, full;

  assign kept    = events & ~suppress;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_pop  = pop && !empty;
  assign push    = (|kept) && (!full || do_pop);
  assign rd_data = mem[rp];

  always_ff @(posedge clk)
    if (push) mem[wp] <= {now, kept};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push)   wp <= wp + 1'b1;
      if (do_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
      if (clr_overflow)             overflow <= 1'b0;
      else if ((|kept) && !push)    overflow <= 1'b1;
    end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
