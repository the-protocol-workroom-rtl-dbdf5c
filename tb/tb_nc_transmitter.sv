// tb_nc_transmitter: sends random packets from a byte source that answers
// in_ready, captures the serial output and checks: data bits most
// significant first, the 32 CRC bits computed here, carrier for exactly
// 8n+32 consecutive clocks (8n without CRC), one done pulse; stop cuts the
// carrier; send_cv gives one code-violation symbol; the forward path repeats
// its input while idle.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_transmitter;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic go = 0, crc_en = 1, stop = 0, send_cv = 0, fwd_en = 0;
  sym_t fwd_sym = SYM_IDLE;
  logic in_valid, in_last, in_ready;
  logic [7:0] in_data;
  sym_t tx;
  logic busy, done, underrun;
  int checks = 0, failures = 0;
  byte pkt [64];
  int n, idx, nbits, ndone;
  logic bits [1024];

  nc_transmitter dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte source: next byte always ready while a packet is being sent
  assign in_valid = (idx < n);
  assign in_data  = pkt[idx];
  assign in_last  = (idx == n - 1);
  always @(posedge clk) if (in_ready) idx <= idx + 1;

  // collector
  always @(posedge clk) begin
    if (tx.carrier && tx.timing && !tx.cv) begin bits[nbits] <= tx.data; nbits <= nbits + 1; end
    if (done) ndone <= ndone + 1;
  end

  function automatic logic [31:0] ref_crc(input int len);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = 0; i < len; i++) begin
      c ^= {pkt[i], 24'h0};
      for (int b = 0; b < 8; b++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  task automatic packet(input int len, input bit with_crc);
    logic [31:0] c;
    int run, maxrun;
    n = len; idx = 0; nbits = 0; ndone = 0; crc_en = with_crc;
    for (int i = 0; i < len; i++) pkt[i] = byte'($urandom);
    c = ref_crc(len);
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    run = 0; maxrun = 0;
    repeat (len * 8 + 60) begin
      @(posedge clk); #1;
      if (tx.carrier) run++; else run = 0;
      if (run > maxrun) maxrun = run;
    end
    checks++;
    if (maxrun != len * 8 + (with_crc ? 32 : 0) || nbits != maxrun || ndone != 1) begin
      failures++;
      $display("len %0d: carrier run %0d, bits %0d, done %0d", len, maxrun, nbits, ndone);
    end
    for (int i = 0; i < len * 8; i++) begin
      checks++;
      if (bits[i] !== pkt[i / 8][7 - i % 8]) failures++;
    end
    if (with_crc)
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (bits[len * 8 + i] !== c[31 - i]) failures++;
      end
  endtask

  initial begin
    n = 0; idx = 0; nbits = 0; ndone = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    packet(1, 1);
    packet(17, 1);
    packet(64, 1);
    packet(5, 0);
    // stop in the middle of a packet
    n = 40; idx = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    repeat (50) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    @(posedge clk); #1;
    checks++;
    if (tx.carrier || busy) failures++;
    // code violation while idle
    @(negedge clk); send_cv = 1; @(posedge clk); #1; send_cv = 0;
    checks++;
    if (!(tx.cv && tx.carrier)) failures++;
    @(posedge clk); #1;
    checks++;
    if (tx.carrier) failures++;
    // forward path
    fwd_en = 1;
    repeat (20) begin
      @(negedge clk); fwd_sym = sym_t'($urandom_range(0, 15));
      @(posedge clk); #1;
      checks++;
      if (tx !== fwd_sym) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
