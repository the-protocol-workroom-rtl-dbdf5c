// tb_channel_emulator: a 4-port emulator with 8 delay cells of 64 steps.
// Scenarios, each checked bit by bit against the transmitted stream:
//   1. point-to-point link 0 -> 1 through delay cell 0 at setting 9:
//      the stream must arrive exactly 9+2 clocks later;
//   2. radio-style merge: ports 0 and 2 both reach port 3 through a
//      two-source mask; port 3 sees the OR and a carrier collision when it
//      transmits at the same time, and port 0 a data collision;
//   3. a real-time fault (inverted data) on the link 0 -> 1;
//   4. global time: strobes every GT_DIV clocks and a reset on the sync write.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_channel_emulator;
  import pw_pkg::*;
  localparam int NP = 4, ND = 8, DEP = 64, GTD = 10;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  node_tx_t node_tx [NP];
  node_rx_t node_rx [NP];
  int checks = 0, failures = 0, cyc = 0;
  sym_t h0 [4096];
  sym_t h2 [4096];
  int n_cd_car = 0, n_cd_dat = 0, n_gt = 0, n_gtr = 0;

  channel_emulator #(.N_PORTS(NP), .N_DELAY(ND), .DEPTH(DEP), .GT_DIV(GTD)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic tap_cfg_t tc(logic [1:0] pass, logic [1:0] inj, logic [1:0] rx, logic fb);
    return '{pass: pass, inject: inj, rx_en: rx, feedback: fb};
  endfunction

  // drive random frames on the node ports, recording what was sent
  always @(negedge clk) begin
    cyc <= cyc + 1;
  end

  task automatic send(input int len, input bit p0, input bit p2, input int start);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      node_tx[0] = p0 ? '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom)} : SYM_IDLE;
      node_tx[2] = p2 ? '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom)} : SYM_IDLE;
      h0[start + k] = node_tx[0];
      h2[start + k] = node_tx[2];
    end
    @(negedge clk);
    node_tx[0] = SYM_IDLE; node_tx[2] = SYM_IDLE;
  endtask

  initial begin
    for (int p = 0; p < NP; p++) node_tx[p] = SYM_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // --- 1: link 0 -> 1, tap output 0 (port 0 dir 0) -> delay cell 0 -> tap input 2 (port 1 dir 0)
    wr(12'h000, 0);
    wr(12'h040, 9);
    wr(12'h100 + 2*2, 32'h1);
    wr(12'h180 + 0, 32'(tc(2'b00, 2'b01, 2'b00, 1'b0)));
    wr(12'h180 + 1, 32'(tc(2'b00, 2'b00, 2'b01, 1'b0)));
    repeat (70) @(negedge clk);   // let the line fill with idle
    fork
      send(100, 1, 0, 0);
      begin
        // bit k is sent in the clock after negedge k; it must appear 11 clocks later
        @(negedge clk);
        repeat (11) @(negedge clk);
        for (int k = 0; k < 100; k++) begin
          checks++;
          if ({node_rx[1].timing, node_rx[1].carrier[0], node_rx[1].cv, node_rx[1].data}
              !== 4'(h0[k])) begin
            failures++;
            if (failures < 5) $display("link bit %0d: got %b want %b", k, node_rx[1].data, h0[k].data);
          end
          @(negedge clk);
        end
      end
    join

    // --- 3: inverted data on that link
    wr(12'h080, 32'(FLT_INVERT));
    repeat (20) @(negedge clk);
    fork
      send(50, 1, 0, 0);
      begin
        @(negedge clk);
        repeat (11) @(negedge clk);
        for (int k = 0; k < 50; k++) begin
          checks++;
          if (node_rx[1].data !== ~h0[k].data || node_rx[1].carrier[0] !== 1'b1) failures++;
          @(negedge clk);
        end
      end
    join
    wr(12'h080, 32'(FLT_NONE));

    // --- 2: ports 0 and 2 into port 3 through cells 1 and 2 (setting 0), merged
    wr(12'h001, 0);            // cell 1 <- tap out 0 (port 0)
    wr(12'h002, 4);            // cell 2 <- tap out 4 (port 2)
    wr(12'h003, 6);            // cell 3 <- tap out 6 (port 3)
    wr(12'h041, 0); wr(12'h042, 0); wr(12'h043, 0);
    wr(12'h100 + 2*6, 32'h6);  // tap input 6 (port 3 dir 0) <- cells 1 | 2
    wr(12'h100 + 2*0, 32'h8);  // tap input 0 (port 0 dir 0) <- cell 3
    wr(12'h180 + 0, 32'(tc(2'b00, 2'b01, 2'b01, 1'b0)));
    wr(12'h180 + 2, 32'(tc(2'b00, 2'b01, 2'b00, 1'b0)));
    wr(12'h180 + 3, 32'(tc(2'b00, 2'b01, 2'b01, 1'b0)));
    repeat (5) @(negedge clk);
    fork
      send(60, 1, 1, 0);
      begin
        @(negedge clk);
        repeat (2) @(negedge clk);
        for (int k = 0; k < 60; k++) begin
          checks++;
          if (node_rx[3].data !== (h0[k].data | h2[k].data) || node_rx[3].carrier[0] !== 1'b1)
            failures++;
          @(negedge clk);
        end
      end
      begin
        // port 3 transmits zeros in the middle of the burst: carrier collision at port 3;
        // port 0 hears port 3's ones: a data collision at port 0 when it sends a 0.
        repeat (20) @(negedge clk);
        for (int k = 0; k < 20; k++) begin
          node_tx[3] = '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'b1};
          @(posedge clk); #1;
          if (node_rx[3].cd_carrier) n_cd_car++;
          if (node_rx[0].cd_data)    n_cd_dat++;
          @(negedge clk);
        end
        node_tx[3] = SYM_IDLE;
      end
    join
    checks++;
    if (n_cd_car == 0) begin failures++; $display("no carrier collision seen"); end
    checks++;
    if (n_cd_dat == 0) begin failures++; $display("no data collision seen"); end

    // --- 4: global time
    wr(12'h1FF, 0);
    fork
      repeat (100) begin
        @(posedge clk); #1;
        if (node_rx[2].gt_clock) n_gt++;
        if (node_rx[2].gt_reset) n_gtr++;
      end
    join
    checks++;
    if (n_gt != 100 / GTD || n_gtr != 0) begin
      failures++;
      $display("global time: %0d ticks, %0d resets", n_gt, n_gtr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
