// tb_nc_crc32: compares the serial CRC with a bytewise reference computed
// here for random messages, and checks that running the register over a
// message followed by its own CRC leaves zero.  Also the known CRC-32/MPEG-2
// value of "123456789" (0x0376E6E7, same polynomial, preset, no reflection,
// no final inversion).
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_crc32;
  logic clk = 0, rst_n = 0, init = 0, en = 0, din = 0;
  logic [31:0] crc;
  logic zero;
  int checks = 0, failures = 0;
  byte msg [64];
  logic [31:0] ref_c;

  nc_crc32 dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_crc(input byte m [64], input int n);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = 0; i < n; i++) begin
      c ^= {m[i], 24'h0};
      for (int b = 0; b < 8; b++) c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

  task automatic shift_bits(input logic [31:0] v, input int nb);
    for (int b = nb - 1; b >= 0; b--) begin
      @(negedge clk); en = 1; din = v[b];
    end
    @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // known vector
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < 9; i++) shift_bits(32'(8'h31 + i), 8);
    checks++;
    if (crc !== 32'h0376E6E7) begin failures++; $display("check value %h", crc); end
    for (int r = 0; r < 30; r++) begin
      int n = $urandom_range(1, 64);
      for (int i = 0; i < n; i++) msg[i] = byte'($urandom);
      ref_c = ref_crc(msg, n);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      for (int i = 0; i < n; i++) shift_bits(32'(msg[i]), 8);
      checks++;
      if (crc !== ref_c) failures++;
      shift_bits(ref_c, 32);
      checks++;
      if (!zero) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
