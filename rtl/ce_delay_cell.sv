// ce_delay_cell: programmable propagation delay for one serial stream of the
// channel emulator.
//
// The whole symbol (timing, carrier, code violation, data) is written into a
// circular buffer every clock and read back `delay` clocks later.  One clock
// is one bit time, which at 10 Mb/s is the propagation time of 20 m of cable,
// so a setting d gives d+1 bit times, i.e. a 20 m step per count; the
// 1024 settings cover 20..20480 m in 20 m increments (the source's range
// starts at 10 m; that half bit time is not modelled).
// Interface: `din` in, `dout` out, `delay` (0..DEPTH-1) from the configuration
// registers; a change of `delay` takes effect on the next clock.  Until the
// buffer has filled to the delay after reset the output is idle.
//
// The delay range and 20 m step follow the source design; the buffer form,
// the idle-until-filled rule and whole-bit-time delays are this design's.
module ce_delay_cell
  import pw_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  sym_t                     din,
  output sym_t                     dout
);
  localparam int AW = $clog2(DEPTH);

  sym_t          mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW-1:0] rptr;
  logic [AW:0]   fill;   // clocks since reset, saturating at DEPTH

  // Read the entry written `delay` clocks before the current write.
  assign rptr = wptr - delay;

  always_ff @(posedge clk) begin
    mem[wptr] <= din;
  end

  // Until the buffer holds `delay` symbols the line is idle.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr <= '0;
      fill <= '0;
      dout <= SYM_IDLE;
    end else begin
      wptr <= wptr + 1'b1;
      if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
      if (delay == '0)                 dout <= din;
      else if (fill < (AW+1)'(delay))  dout <= SYM_IDLE;
      else                             dout <= mem[rptr];
    end

endmodule
