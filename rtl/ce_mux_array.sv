// ce_mux_array: the switching network of the channel emulator, N_OUT
// multiplexers each choosing one of N_IN tap-block outputs to drive one delay
// cell (64 x (64:1 mux) in the full emulator).
//
// Purely combinational; `sel[o]` is the tap-output number that drives delay
// cell o, written by the emulator configuration registers.
//
// The 64 x (64:1) structure follows the source design; the select numbering
// (tap output 2p+d) is this design's choice.
module ce_mux_array
  import pw_pkg::*;
#(
  parameter int N_IN  = 64,
  parameter int N_OUT = 64
) (
  input  sym_t                     din  [N_IN],
  input  logic [$clog2(N_IN)-1:0]  sel  [N_OUT],
  output sym_t                     dout [N_OUT]
);
  always_comb
    for (int o = 0; o < N_OUT; o++) dout[o] = din[sel[o]];
endmodule
