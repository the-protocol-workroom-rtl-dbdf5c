// tb_network_controller: one controller whose channel port is looped back
// (transmit -> receive) through a 3-clock wire delay and whose P3 lane is
// the whole P3 bus (NCTL = 1).  Through the register port only:
//   1. a packet written by the host into the dual-port RAM is sent by the
//      DMA and transmitter, received, checked by CRC and stored by the
//      receive DMA; the copy is read back through the host port;
//   2. a pattern recognizer matches a field of that packet;
//   3. the event FIFO holds time-stamped records of transmit start, receive
//      start/end and transmit done, with time stamps from the global time
//      strobes the testbench drives;
//   4. a timer expiry raises the interrupt;
//   5. the state machine, started by the 68020, initiates a transmission
//      itself and reports its end with an interrupt;
//   6. the delay-line editor re-sends a received packet with a field changed
//      (cut-through) while the receiver sees the original.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_network_controller;
  import pw_pkg::*;
  localparam int RW = 1024;
  logic clk = 0, rst_n = 0;
  logic cpu_we = 0;
  logic [8:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_irq;
  logic hp_en = 0, hp_we = 0;
  logic [9:0] hp_addr = 0;
  logic [7:0] hp_wdata = 0, hp_rdata;
  node_tx_t node_tx;
  node_rx_t node_rx;
  logic [7:0] p3_lane;
  sym_t d1, d2, d3;
  logic gt_clock = 0, gt_reset = 0;
  logic [7:0] pkt [16];
  logic ext_en = 0;
  sym_t ext_sym, rsrc;
  logic sent [200];
  logic seen_tx [400];
  int n_seen = 0;
  int ext_i = 1000;
  // external source: sends sent[0..159] once ext_i is set to 0
  always @(negedge clk) begin
    if (ext_i < 160) begin
      ext_sym <= '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: sent[ext_i]};
      ext_i <= ext_i + 1;
    end else ext_sym <= SYM_IDLE;
  end
  int checks = 0, failures = 0;
  int n_tx_start = 0, n_rx_end = 0, n_tx_done = 0, n_pat = 0, n_edit_diff = 0;
  logic [31:0] ts_prev;

  network_controller #(.RAM_WORDS(RW), .NCTL(1), .DL_DEPTH(256), .EV_DEPTH(16)) dut (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_irq,
    .hp_en, .hp_we, .hp_addr, .hp_wdata, .hp_rdata,
    .node_tx, .node_rx, .p3_lane, .p3_bus(p3_lane)
  );

  // loopback with 3 clocks of wire delay
  always_ff @(posedge clk) begin d1 <= node_tx; d2 <= d1; d3 <= d2; end
  assign rsrc = ext_en ? ext_sym : d3;
  assign node_rx = '{data: rsrc.data, cv: rsrc.cv, gt_clock: gt_clock, gt_reset: gt_reset,
                     timing: rsrc.timing, carrier: {1'b0, rsrc.carrier}, cd_carrier: 1'b0,
                     cd_data: 1'b0};

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // global time: a strobe every 10 clocks
  int gcnt = 0;
  always @(negedge clk) begin gcnt++; gt_clock = (gcnt % 10 == 0); end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); cpu_we = 1; cpu_addr = 9'(a); cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); cpu_addr = 9'(a); #1 d = cpu_rdata;
  endtask
  task automatic hwr(input int a, input logic [7:0] d);
    @(negedge clk); hp_en = 1; hp_we = 1; hp_addr = 10'(a); hp_wdata = d;
    @(negedge clk); hp_en = 0; hp_we = 0;
  endtask
  task automatic hrd(input int a, output logic [7:0] d);
    @(negedge clk); hp_en = 1; hp_addr = 10'(a);
    @(negedge clk); hp_en = 0; d = hp_rdata;
  endtask
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: %h, want %h", what, got, want); end
  endtask

  logic [31:0] v, st;
  logic [7:0] b;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin pkt[i] = byte'($urandom); hwr(16 + i, pkt[i]); end
    pkt[4] = 8'hC3; pkt[5] = 8'h5A; hwr(20, 8'hC3); hwr(21, 8'h5A);
    wr(9'h002, 16); wr(9'h003, 31);          // transmit 16 bytes
    wr(9'h004, 512); wr(9'h005, 600);        // receive region
    wr(9'h008, 32'h0000C35A); wr(9'h00C, 32'h0000FFFF);
    wr(9'h010, (1 << 16) | (1 << 17) | 47);  // anchored on bits 32..47 (bytes 4, 5)
    wr(9'h001, 1);                           // CRC on
    @(negedge clk); gt_reset = 1; @(negedge clk); gt_reset = 0;
    wr(9'h000, 32'h4);                       // arm receive
    wr(9'h000, 32'h1);                       // go
    repeat (8 * 20 + 60) @(negedge clk);
    rd(9'h006, st);
    expect_eq("rx crc ok", st[4], 1);
    expect_eq("rx done flag", st[24], 1);
    expect_eq("tx done flag", st[23], 1);
    expect_eq("pattern seen", st[12], 1);
    expect_eq("irq", cpu_irq, 1);
    rd(9'h007, v);
    expect_eq("rx count", v, 20);
    for (int i = 0; i < 16; i++) begin hrd(512 + i, b); expect_eq("rx byte", b, pkt[i]); end
    // event records
    rd(9'h01F, v);
    checks++;
    if (v < 4) begin failures++; $display("only %0d records", v); end
    ts_prev = 0;
    for (int k = 0; k < 16; k++) begin
      rd(9'h01E, v);
      if (!v[31]) break;
      if (v[EV_TX_START]) n_tx_start++;
      if (v[EV_RX_END]) n_rx_end++;
      if (v[EV_TX_DONE]) n_tx_done++;
      if (v[EV_PAT0]) n_pat++;
      rd(9'h01D, v);
      checks++;
      if (v < ts_prev || v > 40) failures++;
      ts_prev = v;
      wr(9'h000, 32'h20);  // pop
    end
    expect_eq("event counts", {n_tx_start[7:0], n_rx_end[7:0], n_tx_done[7:0], n_pat[7:0]}, 32'h01010101);
    wr(9'h000, 32'h400000);                  // clear DMA done flags
    // timer 1
    wr(9'h019, 50);
    wr(9'h000, 32'h200);
    repeat (30) @(negedge clk);
    expect_eq("no irq yet", cpu_irq, 0);
    repeat (30) @(negedge clk);
    expect_eq("timer irq", cpu_irq, 1);
    wr(9'h000, 32'h20000);                   // acknowledge
    expect_eq("irq cleared", cpu_irq, 0);
    // state machine: 0: HOST ? (RX_ARM|TX_GO -> 1) : 0;  1: TX_DONE ? (IRQ -> 2) : 1;  2: stay
    wr(9'h100, {4'(STIM_HOST), 6'd1, 6'd0, 8'((1 << RESP_TX_GO) | (1 << RESP_RX_ARM)), 8'd0});
    wr(9'h101, {4'(STIM_TX_DONE), 6'd2, 6'd1, 8'(1 << RESP_IRQ), 8'd0});
    wr(9'h102, {4'(STIM_ONE), 6'd2, 6'd2, 8'd0, 8'd0});
    wr(9'h001, 1 | (1 << 4));                // run
    wr(9'h000, 32'h10);                      // start at state 0
    repeat (10) @(negedge clk);
    wr(9'h001, 1 | (1 << 4) | (1 << 5));     // host flag
    repeat (8 * 20 + 60) @(negedge clk);
    rd(9'h006, st);
    expect_eq("sm state", st[21:16], 2);
    expect_eq("sm irq", st[22], 1);
    expect_eq("sm rx ok", st[4], 1);
    wr(9'h001, 1);
    // cut-through: a packet arriving from outside is re-sent through the
    // editor, which replaces byte 5 (bits 40..47) with 0xFF; the receiver
    // stores the original
    wr(9'h014, 10); wr(9'h015, 32); wr(9'h016, 32'h00FF_00FF);
    wr(9'h004, 700); wr(9'h005, 760);
    wr(9'h000, 32'h4);
    wr(9'h001, 1 | (2'd1 << 1) | (1 << 3));  // forward through editor, editor on
    ext_en = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 160; i++) sent[i] = (i < 128) ? pkt[i / 8][7 - i % 8] : 1'($urandom);
    ext_i = 0;
    fork
      repeat (200) begin
        @(posedge clk); #1;
        if (dut.u_dle.edited) n_edit_diff++;
        if (node_tx.carrier && node_tx.timing) begin seen_tx[n_seen] = node_tx.data; n_seen++; end
      end
    join
    repeat (20) @(negedge clk);
    checks++;
    if (n_edit_diff != 8 || n_seen != 160) begin
      failures++; $display("edited bits %0d, forwarded bits %0d", n_edit_diff, n_seen);
    end
    for (int i = 0; i < 160; i++) begin
      checks++;
      if (seen_tx[i] !== ((i >= 40 && i < 48) ? 1'b1 : sent[i])) failures++;
    end
    for (int i = 0; i < 6; i++) begin hrd(700 + i, b); expect_eq("orig byte", b, pkt[i]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
