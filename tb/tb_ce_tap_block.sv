// tb_ce_tap_block: random configurations, node transmissions and fabric
// inputs; every output (tap outputs, received data, directional carriers,
// clock arbitration, both collision detectors) is compared with the rule
// worked out here bit by bit.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_ce_tap_block;
  import pw_pkg::*;
  tap_cfg_t cfg;
  node_tx_t node_tx;
  sym_t from_fabric [2];
  sym_t to_fabric [2];
  logic gt_clock, gt_reset;
  node_rx_t node_rx;
  int checks = 0, failures = 0, colls = 0;
  logic c0, c1, cf, e_t, e_cdc, e_cdd;
  logic [3:0] e0, e1;

  ce_tap_block dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      cfg = tap_cfg_t'($urandom_range(0, 127));
      node_tx = sym_t'($urandom_range(0, 15));
      from_fabric[0] = sym_t'($urandom_range(0, 15));
      from_fabric[1] = sym_t'($urandom_range(0, 15));
      gt_clock = 1'($urandom); gt_reset = 1'($urandom);
      #1;
      for (int d = 0; d < 2; d++) begin
        e0 = (cfg.pass[d] ? 4'(from_fabric[d]) : 4'd0) | (cfg.inject[d] ? 4'(node_tx) : 4'd0);
        checks++;
        if (4'(to_fabric[d]) !== e0) failures++;
      end
      c0 = cfg.rx_en[0] & from_fabric[0].carrier;
      c1 = cfg.rx_en[1] & from_fabric[1].carrier;
      cf = cfg.feedback & node_tx.carrier;
      e_t = c0 ? from_fabric[0].timing : c1 ? from_fabric[1].timing : cf ? node_tx.timing : 1'b0;
      e_cdc = (node_tx.carrier & (c0 | c1)) | (c0 & c1);
      e_cdd = node_tx.carrier & node_tx.timing & !node_tx.data
              & ((c0 & from_fabric[0].data) | (c1 & from_fabric[1].data));
      if (e_cdc || e_cdd) colls++;
      checks++;
      if (node_rx.data !== ((cfg.rx_en[0] & from_fabric[0].data) | (cfg.rx_en[1] & from_fabric[1].data)
                            | (cfg.feedback & node_tx.data))) failures++;
      checks++;
      if (node_rx.cv !== ((cfg.rx_en[0] & from_fabric[0].cv) | (cfg.rx_en[1] & from_fabric[1].cv)
                          | (cfg.feedback & node_tx.cv))) failures++;
      checks++;
      if (node_rx.carrier !== {c1 | cf, c0 | cf}) failures++;
      checks++;
      if (node_rx.timing !== e_t) failures++;
      checks++;
      if (node_rx.cd_carrier !== e_cdc || node_rx.cd_data !== e_cdd) failures++;
      checks++;
      if (node_rx.gt_clock !== gt_clock || node_rx.gt_reset !== gt_reset) failures++;
    end
    checks++;
    if (colls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
