// nc_pattern_recognizer: watches the received bit stream for NPAT patterns
// at once and flags each one that appears.
//
// Each pattern has a value and a mask of PW bits (mask bits 0 are "don't
// care", so any length up to PW bits is a pattern ending in the newest bit)
// and one of two modes:
//   free-running (anchored = 0): checked after every received bit, for
//     patterns that may arrive at any time;
//   anchored (anchored = 1): checked only when the bit whose index in the
//     packet equals end_index has arrived, for fields whose position is known
//     from the start of the packet (addresses, aliases, group addresses).
// The history register is cleared at the start of every packet.
// Outputs: match[k] pulses one clock after the bit that completes pattern k;
// seen[k] stays set from then until the next packet starts.
//
// Four simultaneous patterns, free-running or with a known start, follow the
// source design; the 32-bit window, the mask for length and the end-index
// anchoring are this design's.  The patterns may change from one clock to
// the next: the network controller feeds this block from one of two banks
// of settings, chosen by the state its state machine is in.
module nc_pattern_recognizer #(
  parameter int NPAT = 4,
  parameter int PW   = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_valid,
  input  logic          bit_data,
  input  logic [15:0]   bit_index,
  input  logic          frame_start,
  input  logic [NPAT-1:0] enable,
  input  logic [NPAT-1:0] anchored,
  input  logic [PW-1:0] value     [NPAT],
  input  logic [PW-1:0] mask      [NPAT],
  input  logic [15:0]   end_index [NPAT],
  output logic [NPAT-1:0] match,
  output logic [NPAT-1:0] seen
);
  logic [PW-1:0]   hist, hist_n;
  logic [NPAT-1:0] hit;

  always_comb begin
    hist_n = frame_start ? PW'(bit_data) : {hist[PW-2:0], bit_data};
    for (int k = 0; k < NPAT; k++)
      hit[k] = bit_valid && enable[k]
             && (((hist_n ^ value[k]) & mask[k]) == '0)
             && (!anchored[k] || (bit_index == end_index[k]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hist  <= '0;
      match <= '0;
      seen  <= '0;
    end else begin
      match <= hit;
      if (bit_valid) hist <= hist_n;
      if (frame_start) seen <= hit;
      else             seen <= seen | hit;
    end
endmodule
