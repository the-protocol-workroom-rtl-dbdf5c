// ce_masked_or: the masked-OR array of the channel emulator.  Each of N_OUT
// outputs (one per tap-block input) is the OR of those of the N_IN delay-cell
// outputs whose bit is set in its mask (64 x (64:1 masked OR) in the full
// emulator).
//
// With one bit set per mask it is a second switching network; with several
// it merges sources, which is how broadcast radio topologies and collisions
// on a shared medium are formed.  Every field of the symbol (timing, carrier,
// code violation, data) is ORed.  Combinational.
//
// The array and its size follow the source design; ORing every field of the
// symbol is this design's choice.
module ce_masked_or
  import pw_pkg::*;
#(
  parameter int N_IN  = 64,
  parameter int N_OUT = 64
) (
  input  sym_t            din  [N_IN],
  input  logic [N_IN-1:0] mask [N_OUT],
  output sym_t            dout [N_OUT]
);
  // Bit-sliced: one vector per symbol field, so each output is a plain
  // AND-OR reduction.
  logic [N_IN-1:0] v_timing, v_carrier, v_cv, v_data;

  for (genvar i = 0; i < N_IN; i++) begin : g_slice
    assign v_timing[i]  = din[i].timing;
    assign v_carrier[i] = din[i].carrier;
    assign v_cv[i]      = din[i].cv;
    assign v_data[i]    = din[i].data;
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    assign dout[o] = '{timing:  |(v_timing  & mask[o]),
                       carrier: |(v_carrier & mask[o]),
                       cv:      |(v_cv      & mask[o]),
                       data:    |(v_data    & mask[o])};
  end
endmodule
