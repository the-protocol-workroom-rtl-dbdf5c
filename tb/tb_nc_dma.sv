// tb_nc_dma: the DMA with a real dual-port RAM behind it.  A transmit
// transfer of a random region is consumed by a sink that takes one byte
// every 8 clocks (the transmitter's rate); meanwhile a receive transfer
// writes a stream of bytes arriving every 8 clocks, so both share the RAM
// port.  Checks: bytes out in order with last on the end byte, tx_done once;
// received bytes in RAM (read back through port A), count, overflow past the
// end pointer, CRC verdict; abort of a transmit transfer.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_dma;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [7:0] m_wdata, m_rdata;
  logic tx_go = 0, tx_abort = 0;
  logic [AW-1:0] tx_start, tx_end, rx_start, rx_end;
  logic out_valid, out_last, out_ready, tx_active, tx_done;
  logic [7:0] out_data;
  logic rx_arm = 0, rx_abort = 0, byte_valid = 0, frame_end = 0, frame_crc_ok = 0;
  logic [7:0] byte_data;
  logic rx_active, rx_done, rx_overflow, rx_crc_ok;
  logic [AW:0] rx_count;
  logic a_en = 0, a_we = 0;
  logic [AW-1:0] a_addr;
  logic [7:0] a_wdata, a_rdata;
  logic [7:0] img [1 << AW];
  logic [7:0] rxb [64];
  int checks = 0, failures = 0, nout = 0, ndone = 0, phase = 0, bad = 0;

  nc_dpram #(.WORDS(1 << AW)) ram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata)
  );
  nc_dma #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: one byte per 8 clocks
  always @(posedge clk) phase <= (phase + 1) % 8;
  assign out_ready = out_valid && (phase == 7);
  always @(posedge clk)
    if (out_ready) begin
      if (out_data !== img[tx_start + nout] || out_last !== (tx_start + nout == tx_end)) bad++;
      nout <= nout + 1;
    end
  always @(posedge clk) if (rst_n && tx_done) ndone++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load RAM from the host port
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = 8'($urandom); img[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    tx_start = 100; tx_end = 139;          // 40 bytes out
    rx_start = 600; rx_end = 629;          // room for 30 bytes in
    @(negedge clk); tx_go = 1; rx_arm = 1;
    @(negedge clk); tx_go = 0; rx_arm = 0;
    // 34 bytes arrive, one every 8 clocks: 4 overflow
    for (int i = 0; i < 34; i++) begin
      repeat (7) @(negedge clk);
      byte_valid = 1; byte_data = 8'($urandom); if (i < 64) rxb[i] = byte_data;
      @(negedge clk); byte_valid = 0;
    end
    frame_crc_ok = 1; frame_end = 1;
    @(negedge clk); frame_end = 0;
    repeat (80) @(negedge clk);
    checks++;
    if (nout != 40 || ndone != 1 || bad != 0 || tx_active) begin
      failures++;
      $display("tx: %0d bytes, %0d done, %0d bad", nout, ndone, bad);
    end
    checks++;
    if (rx_count != 30 || !rx_overflow || !rx_crc_ok || rx_active) begin
      failures++;
      $display("rx: count %0d overflow %b crc %b", rx_count, rx_overflow, rx_crc_ok);
    end
    for (int i = 0; i < 31; i++) begin
      @(negedge clk); a_en = 1; a_addr = AW'(600 + i);
      @(negedge clk); a_en = 0;
      checks++;
      if (a_rdata !== ((i < 30) ? rxb[i] : img[630])) failures++;
    end
    // abort a transmit transfer part way
    nout = 0; ndone = 0;
    tx_start = 0; tx_end = 99;
    @(negedge clk); tx_go = 1; @(negedge clk); tx_go = 0;
    repeat (100) @(negedge clk);
    tx_abort = 1; @(negedge clk); tx_abort = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (tx_active || out_valid || ndone != 0 || nout < 10 || nout > 14 || bad != 0) begin
      failures++;
      $display("abort: %0d bytes, active %b", nout, tx_active);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
