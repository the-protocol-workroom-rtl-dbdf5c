// ce_fault_injector: real-time fault insertion on one stream of the channel
// emulator, placed at the output of a delay cell so that a fault acts on the
// path between one pair of connected nodes.
//
// Modes (pw_pkg::fault_t): none, open link, jammed link, inverted data,
// random bit errors, and code-violation insertion.  For random errors a
// 16-bit maximal-length LFSR advances every clock and a data bit under carrier
// is inverted when the LFSR's low byte is below `rate`, i.e. with probability
// rate/256.  The kinds of fault and the error-rate mechanism are choices of
// this design.  Registered: one clock from `din` to `dout`.
module ce_fault_injector
  import pw_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fault_t     mode,
  input  logic [7:0] rate,
  input  sym_t       din,
  output sym_t       dout
);
  logic [15:0] lfsr;
  logic        hit;

  // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  assign hit = (lfsr[7:0] < rate);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout <= SYM_IDLE;
    else begin
      dout <= din;
      unique case (mode)
        FLT_NONE:   ;
        FLT_OPEN:   dout <= SYM_IDLE;
        FLT_JAM:    dout <= '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'b1};
        FLT_INVERT: dout.data <= din.carrier & ~din.data;
        FLT_NOISE:  dout.data <= din.data ^ (din.carrier & hit);
        FLT_CV:     dout.cv   <= din.carrier;
        default:    ;
      endcase
    end
endmodule
