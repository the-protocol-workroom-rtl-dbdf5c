// tb_nc_receiver: feeds packets with a correct CRC (computed here), with one
// bit corrupted, and with gaps in the receive timing; checks the bytes
// delivered, the bit index of every bit, crc_ok at frame end, and the
// code-violation flag.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_receiver;
  logic clk = 0, rst_n = 0;
  logic rx_data = 0, rx_cv = 0, rx_timing = 0, rx_carrier = 0;
  logic bit_valid, bit_data, frame_start, byte_valid, frame_end, crc_ok, cv_seen;
  logic [15:0] bit_index;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  byte pkt [80];
  byte got [80];
  int ngot, nidx_bad, ncv, ends;
  logic last_ok;
  int exp_idx;

  nc_receiver dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (byte_valid) begin got[ngot] = byte_data; ngot++; end
    if (bit_valid) begin
      if (bit_index != 16'(exp_idx)) nidx_bad++;
      exp_idx++;
    end
    if (frame_end) begin ends++; last_ok = crc_ok; end
    if (cv_seen) ncv++;
  end

  function automatic logic [31:0] ref_crc(input int len);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = 0; i < len; i++) begin
      c ^= {pkt[i], 24'h0};
      for (int b = 0; b < 8; b++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  task automatic frame(input int len, input int flip, input bit gaps);
    logic [31:0] c;
    for (int i = 0; i < len; i++) pkt[i] = byte'($urandom);
    c = ref_crc(len);
    for (int i = 0; i < 4; i++) pkt[len + i] = byte'(c >> (24 - 8 * i));
    ngot = 0; nidx_bad = 0; ends = 0; exp_idx = 0;
    for (int i = 0; i < (len + 4) * 8; i++) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        @(negedge clk); rx_carrier = 1; rx_timing = 0;
      end
      @(negedge clk);
      rx_carrier = 1; rx_timing = 1;
      rx_data = pkt[i / 8][7 - i % 8] ^ (i == flip);
    end
    @(negedge clk); rx_carrier = 0; rx_timing = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (ngot != len + 4 || ends != 1 || nidx_bad != 0) begin
      failures++;
      $display("len %0d: %0d bytes, %0d ends, %0d bad indices", len, ngot, ends, nidx_bad);
    end
    for (int i = 0; i < len + 4; i++) begin
      checks++;
      if (got[i] !== (pkt[i] ^ ((flip / 8 == i) ? 8'(1 << (7 - flip % 8)) : 8'h00))) failures++;
    end
    checks++;
    if (last_ok !== (flip < 0)) begin failures++; $display("crc_ok %b flip %0d", last_ok, flip); end
  endtask

  initial begin
    ncv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(1, -1, 0);
    frame(20, -1, 1);
    frame(20, 37, 0);
    frame(60, -1, 0);
    frame(8, 70, 1);
    // one code-violation symbol
    @(negedge clk); rx_carrier = 1; rx_timing = 1; rx_cv = 1;
    @(negedge clk); rx_carrier = 0; rx_timing = 0; rx_cv = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (ncv != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
