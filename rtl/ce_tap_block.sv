// ce_tap_block: the tap / clock-arbitration / feedback logic between one node
// port and the interconnection fabric of the channel emulator.
//
// A tap block has two outputs towards the delay cells and two inputs from the
// masked-OR array, one pair per direction of propagation, so that a port can
// sit on a bidirectional bus, a ring, a double ring or a star.
//   * Tap: output d carries the masked-OR input d passed through (cfg.pass)
//     ORed with the node's own transmission (cfg.inject).  Pass-through and
//     inject together make a bus tap; inject alone makes a ring or
//     point-to-point link.
//   * Receive: the node hears input d when cfg.rx_en[d] is set and its own
//     transmission when cfg.feedback is set; data, code violation and carrier
//     are the OR of what is heard.  The two directional carrier lines report
//     each direction separately (directional sense).
//   * Clock arbitration: the receive timing strobe is taken from the first
//     heard source that carries carrier, in the order input 0, input 1, own
//     transmission.
//   * Collision detection, two methods side by side: carrier (the node
//     transmits while it hears another carrier, or both directions carry
//     carrier at once) and data (the node sends a 0 bit while the medium
//     carries a 1).
// The exact rules of each function are choices of this design.  Purely
// combinational; the delay cells that follow hold the registers.
module ce_tap_block
  import pw_pkg::*;
(
  input  tap_cfg_t cfg,
  input  node_tx_t node_tx,
  input  sym_t     from_fabric [2],
  output sym_t     to_fabric   [2],
  input  logic     gt_clock,
  input  logic     gt_reset,
  output node_rx_t node_rx
);
  sym_t h0, h1, hf, heard;

  always_comb begin
    for (int d = 0; d < 2; d++)
      to_fabric[d] = (cfg.pass[d]   ? from_fabric[d] : SYM_IDLE)
                   | (cfg.inject[d] ? node_tx        : SYM_IDLE);

    h0    = cfg.rx_en[0] ? from_fabric[0] : SYM_IDLE;
    h1    = cfg.rx_en[1] ? from_fabric[1] : SYM_IDLE;
    hf    = cfg.feedback ? node_tx        : SYM_IDLE;
    heard = h0 | h1 | hf;

    node_rx.data       = heard.data;
    node_rx.cv         = heard.cv;
    node_rx.carrier[0] = h0.carrier | hf.carrier;
    node_rx.carrier[1] = h1.carrier | hf.carrier;
    node_rx.gt_clock   = gt_clock;
    node_rx.gt_reset   = gt_reset;

    if      (h0.carrier) node_rx.timing = h0.timing;
    else if (h1.carrier) node_rx.timing = h1.timing;
    else if (hf.carrier) node_rx.timing = hf.timing;
    else                 node_rx.timing = 1'b0;

    node_rx.cd_carrier = (node_tx.carrier & (h0.carrier | h1.carrier))
                       | (h0.carrier & h1.carrier);
    node_rx.cd_data    = node_tx.carrier & node_tx.timing & ~node_tx.data
                       & ((h0.carrier & h0.data) | (h1.carrier & h1.data));
  end
endmodule
