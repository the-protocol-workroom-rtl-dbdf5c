// tb_protocol_workroom_top: the whole experimental network at its default
// size (32 nodes, 64 delay cells of 1024 steps, P3 groups of 8).  The host
// computer's configuration writes build a bidirectional bus over nodes 0..3
// (the facility's first four-node set-up), each link a delay cell at setting
// 5, i.e. 7 bit times per hop with the fault stage.  Then:
//   1. node 0 sends a 24-byte packet; nodes 1..3 receive it with a good CRC
//      and the carrier reaches node k exactly 7k clocks after it leaves;
//   2. nodes 0 and 3 send at once: both see a collision and the receivers
//      report CRC errors;
//   3. a random-error fault on the link 1 -> 2 corrupts the packet for nodes
//      2 and 3 only;
//   4. a P3 connection inside group 0: node 4 sends a message-RAM byte per
//      frame into slots of the bus and node 5 picks them up;
//   5. global time: after a sync every node reads the same time value.
// During 1 and 2, node 1 also runs its pattern recognizer (anchored on bytes
// 4-5 of the packet), its state machine (wait for end of frame, then post an
// event and interrupt; its waiting state selects the second pattern bank)
// and timer 0, and node 8 listens as a radio receiver: its one input is
// the masked OR of the cells leaving nodes 0 and 3, so it hears node 0 alone
// in 1 and both at once in 2.
// Each mechanism's occurrences are counted; one that never happens fails.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_protocol_workroom_top;
  import pw_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic ce_cfg_we = 0;
  logic [11:0] ce_cfg_addr = 0;
  logic [31:0] ce_cfg_wdata = 0;
  logic cpu_we [N];
  logic [8:0] cpu_addr [N];
  logic [31:0] cpu_wdata [N];
  logic [31:0] cpu_rdata [N];
  logic cpu_irq [N];
  logic hp_en [N], hp_we [N];
  logic [12:0] hp_addr [N];
  logic [7:0] hp_wdata [N], hp_rdata [N];
  node_tx_t port_tx [N];
  node_rx_t port_rx [N];
  int checks = 0, failures = 0, cyc = 0;
  int n_radio = 0, n_pat = 0, n_sm = 0, n_timer = 0;
  int n_deliver = 0, n_coll = 0, n_fault = 0, n_p3 = 0, n_time = 0, n_latency = 0;
  int t_tx, t_rx [4];
  logic [7:0] pkt [24];
  logic [31:0] v;

  protocol_workroom_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ce(input int a, input logic [31:0] d);
    @(negedge clk); ce_cfg_we = 1; ce_cfg_addr = 12'(a); ce_cfg_wdata = d;
    @(negedge clk); ce_cfg_we = 0;
  endtask
  task automatic wr(input int n, input int a, input logic [31:0] d);
    @(negedge clk); cpu_we[n] = 1; cpu_addr[n] = 9'(a); cpu_wdata[n] = d;
    @(negedge clk); cpu_we[n] = 0;
  endtask
  task automatic rd(input int n, input int a, output logic [31:0] d);
    cpu_addr[n] = 9'(a);
    #1 d = cpu_rdata[n];
  endtask
  task automatic hwr(input int n, input int a, input logic [7:0] d);
    @(negedge clk); hp_en[n] = 1; hp_we[n] = 1; hp_addr[n] = 13'(a); hp_wdata[n] = d;
    @(negedge clk); hp_en[n] = 0; hp_we[n] = 0;
  endtask
  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // carrier arrival times
  logic [3:0] car_q;
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (port_rx[k].carrier != 0 && !car_q[k] && t_rx[k] < 0) t_rx[k] = cyc;
      car_q[k] <= (port_rx[k].carrier != 0);
    end
    if (port_tx[0].carrier && t_tx < 0) t_tx = cyc;
  end

  task automatic arm_all(input int base);
    for (int k = 0; k <= 8; k++) if (k < 4 || k == 8) begin
      wr(k, 9'h004, base); wr(k, 9'h005, base + 100); wr(k, 9'h000, 32'h4);
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      cpu_we[n] = 0; cpu_addr[n] = 0; cpu_wdata[n] = 0;
      hp_en[n] = 0; hp_we[n] = 0; hp_addr[n] = 0; hp_wdata[n] = 0;
    end
    t_tx = -1;
    for (int k = 0; k < 4; k++) t_rx[k] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- bus over nodes 0..3
    for (int p = 0; p < 3; p++) begin
      // rightward: tap output 2p -> cell p -> tap input 2(p+1)
      ce(12'h000 + p, 2 * p);       ce(12'h040 + p, 5);
      ce(12'h100 + 2 * (2 * (p + 1)), 32'h1 << p);
      // leftward: tap output 2(p+1)+1 -> cell 32+p -> tap input 2p+1
      ce(12'h000 + 32 + p, 2 * (p + 1) + 1);  ce(12'h040 + 32 + p, 5);
      ce(12'h100 + 2 * (2 * p + 1) + 1, 32'h1 << p);
    end
    for (int p = 0; p < 4; p++)
      ce(12'h180 + p, 32'(tap_cfg_t'{pass: 2'b11, inject: 2'b11, rx_en: 2'b11, feedback: 1'b0}));

    // ---- radio receiver: tap input 16 (node 8, direction 0) ORs cell 0
    // (leaving node 0) and cell 34 (leaving node 3)
    ce(12'h100 + 2 * 16, 32'h1);
    ce(12'h100 + 2 * 16 + 1, 32'h4);
    ce(12'h180 + 8, 32'(tap_cfg_t'{pass: 2'b00, inject: 2'b00, rx_en: 2'b01, feedback: 1'b0}));

    // ---- 1: node 0 broadcasts
    for (int i = 0; i < 24; i++) begin pkt[i] = 8'($urandom); hwr(0, 100 + i, pkt[i]); end
    // node 1: pattern 0 anchored on bits 32..47, state machine, timer 0
    // bank 0 holds the inverted field, bank 1 the real one; state 0 searches
    // bank 1, so a match shows the state machine switched the patterns
    wr(1, 9'h008, {16'h0, ~pkt[4], ~pkt[5]}); wr(1, 9'h00C, 32'hFFFF);
    wr(1, 9'h010, (1 << 16) | (1 << 17) | 47);
    wr(1, 9'h028, {16'h0, pkt[4], pkt[5]}); wr(1, 9'h02C, 32'hFFFF);
    wr(1, 9'h030, (1 << 16) | (1 << 17) | 47);
    wr(1, 9'h140, 1);
    wr(1, 9'h100, {4'(STIM_RX_END), 6'd1, 6'd0, 8'((1 << RESP_EVENT) | (1 << RESP_IRQ)), 8'd0});
    wr(1, 9'h101, {4'(STIM_ONE), 6'd1, 6'd1, 8'd0, 8'd0});
    wr(1, 9'h001, 32'h11);                    // CRC on, state machine run
    wr(1, 9'h000, 32'h10);                    // enter state 0
    wr(1, 9'h018, 100);
    wr(0, 9'h002, 100); wr(0, 9'h003, 123);
    arm_all(1000);
    t_tx = -1; for (int k = 0; k < 4; k++) t_rx[k] = -1;
    wr(1, 9'h000, 32'h100);                   // start timer 0
    wr(0, 9'h000, 32'h1);
    repeat (24 * 8 + 32 + 60) @(negedge clk);
    rd(8, 9'h006, v);
    check("radio receiver hears node 0", v[4] === 1'b1);
    if (v[4]) n_radio++;
    rd(1, 9'h006, v);
    check("node 1 pattern seen", v[12] === 1'b1);
    if (v[12]) n_pat++;
    check("node 1 state machine reached state 1", v[21:16] == 6'd1 && v[22]);
    if (v[21:16] == 6'd1 && v[22]) n_sm++;
    check("node 1 timer expired", v[8] === 1'b1 && cpu_irq[1]);
    if (v[8]) n_timer++;
    begin
      bit pat_rec = 0, sm_rec = 0;
      for (int r = 0; r < 64; r++) begin
        rd(1, 9'h01E, v);
        if (!v[31]) break;
        if (v[EV_PAT0]) pat_rec = 1;
        if (v[EV_SM]) sm_rec = 1;
        wr(1, 9'h000, 32'h20);
      end
      check("node 1 pattern and state machine records", pat_rec && sm_rec);
    end
    for (int k = 1; k < 4; k++) begin
      rd(k, 9'h006, v);
      check($sformatf("node %0d crc ok", k), v[4] === 1'b1);
      if (v[4]) n_deliver++;
      rd(k, 9'h007, v);
      check($sformatf("node %0d count", k), v == 28);
      check($sformatf("node %0d latency %0d", k, t_rx[k] - t_tx), t_rx[k] - t_tx == 7 * k);
      if (t_rx[k] - t_tx == 7 * k) n_latency++;
    end

    // ---- 2: collision between nodes 0 and 3
    for (int i = 0; i < 24; i++) hwr(3, 100 + i, 8'($urandom));
    wr(3, 9'h002, 100); wr(3, 9'h003, 123);
    arm_all(2000);
    wr(3, 9'h000, 32'h400000); wr(0, 9'h000, 32'h400000);
    fork
      wr(0, 9'h000, 32'h1);
      wr(3, 9'h000, 32'h1);
    join
    fork
      repeat (24 * 8 + 32 + 60) begin
        @(posedge clk); #1;
        if (port_rx[0].cd_carrier && port_rx[3].cd_carrier) n_coll++;
      end
    join
    check("collision seen", n_coll > 0);
    rd(1, 9'h006, v);
    check("node 1 crc error on collision", v[4] === 1'b0);
    rd(8, 9'h006, v);
    check("radio receiver hears both", v[4] === 1'b0);
    if (v[4] === 1'b0) n_radio++;
    // look for the collision event bit in node 0's event records
    begin
      bit found = 0;
      for (int r = 0; r < 64; r++) begin
        rd(0, 9'h01E, v);
        if (!v[31]) break;
        if (v[EV_COLL]) found = 1;
        wr(0, 9'h000, 32'h20);
      end
      check("collision record", found);
    end

    // ---- 3: random errors on link 1 -> 2 (cell 1)
    ce(12'h081, 32'(FLT_NOISE) | (32'd40 << 8));
    arm_all(3000);
    wr(0, 9'h000, 32'h1);
    repeat (24 * 8 + 32 + 60) @(negedge clk);
    rd(1, 9'h006, v); check("fault: node 1 ok", v[4] === 1'b1);
    rd(2, 9'h006, v); check("fault: node 2 error", v[4] === 1'b0);
    if (v[4] === 1'b0) n_fault++;
    rd(3, 9'h006, v); check("fault: node 3 error", v[4] === 1'b0);
    ce(12'h081, 32'(FLT_NONE));

    // ---- 4: P3 inside group 0: node 4 slots 0..7 from RAM byte; node 5 takes
    // bus bits 32..39 (node 4's lane) into its RAM byte
    wr(4, 9'h025, 32'hA7);
    wr(4, 9'h021, 32'h5555);                  // all slots: message RAM
    wr(5, 9'h022, 32'h5555);                  // all slots: to message RAM
    wr(5, 9'h023, 32'h23222120);
    wr(5, 9'h024, 32'h27262524);
    repeat (40) @(negedge clk);
    rd(5, 9'h026, v);
    check("P3 byte", v == 32'hA7);
    if (v == 32'hA7) n_p3++;
    wr(4, 9'h025, 32'h3C);
    repeat (24) @(negedge clk);
    rd(5, 9'h026, v);
    check("P3 byte 2", v == 32'h3C);
    if (v == 32'h3C) n_p3++;

    // ---- 5: global time
    ce(12'h1FF, 0);
    repeat (95) @(negedge clk);
    rd(0, 9'h027, v);
    check("time value", v == 9 || v == 10);
    begin
      bit same = 1;
      // all 32 register ports read in the same instant
      for (int n = 0; n < N; n++) cpu_addr[n] = 9'h027;
      #1;
      for (int n = 1; n < N; n++) if (cpu_rdata[n] != cpu_rdata[0]) same = 0;
      check("all nodes agree on time", same);
      if (same) n_time++;
    end

    $display("mechanisms: delivered %0d, latency %0d, collision clocks %0d, fault %0d, p3 %0d, time %0d",
             n_deliver, n_latency, n_coll, n_fault, n_p3, n_time);
    $display("mechanisms: radio %0d, pattern %0d, state machine %0d, timer %0d",
             n_radio, n_pat, n_sm, n_timer);
    check("every mechanism happened",
          n_deliver > 0 && n_latency > 0 && n_coll > 0 && n_fault > 0 && n_p3 > 0 && n_time > 0 &&
          n_radio == 2 && n_pat > 0 && n_sm > 0 && n_timer > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
