// tb_nc_pattern_recognizer: random packets with planted patterns.  Four
// patterns run at once: two free-running (a 16-bit flag and an 8-bit code
// given by mask), two anchored at known bit positions (a destination address
// and an alias address).  The testbench recomputes every match from the bit
// history and compares match and seen for every bit.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_pattern_recognizer;
  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_data = 0, frame_start = 0;
  logic [15:0] bit_index = 0;
  logic [3:0] enable, anchored, match, seen;
  logic [31:0] value [4];
  logic [31:0] mask [4];
  logic [15:0] end_index [4];
  logic [31:0] h;
  logic [3:0] e, eseen;
  int checks = 0, failures = 0, nmatch [4];
  logic pkt [400];

  nc_pattern_recognizer #(.NPAT(4), .PW(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 4'hF; anchored = 4'b1100;
    value[0] = 32'h00007E7E; mask[0] = 32'h0000FFFF; end_index[0] = 0;
    value[1] = 32'h000000A5; mask[1] = 32'h000000FF; end_index[1] = 0;
    value[2] = 32'hDEADBEEF; mask[2] = 32'hFFFFFFFF; end_index[2] = 16'd47;  // bits 16..47
    value[3] = 32'h0000BEEF; mask[3] = 32'h0000FFFF; end_index[3] = 16'd47;
    for (int k = 0; k < 4; k++) nmatch[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      for (int i = 0; i < 400; i++) pkt[i] = 1'($urandom);
      if (f % 2 == 0) for (int i = 0; i < 32; i++) pkt[16 + i] = value[2][31 - i];
      if (f % 3 == 0) for (int i = 0; i < 16; i++) pkt[32 + i] = value[3][15 - i];
      if (f % 4 == 1) for (int i = 0; i < 16; i++) pkt[200 + i] = value[0][15 - i];
      h = 0; eseen = 0;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        bit_valid = 1; bit_data = pkt[i]; bit_index = 16'(i); frame_start = (i == 0);
        h = (i == 0) ? 32'(pkt[i]) : {h[30:0], pkt[i]};
        for (int k = 0; k < 4; k++)
          e[k] = (((h ^ value[k]) & mask[k]) == 0) && (!anchored[k] || i == end_index[k]);
        eseen = (i == 0) ? e : (eseen | e);
        @(posedge clk); #1;
        checks++;
        if (match !== e || seen !== eseen) begin
          failures++;
          if (failures < 5) $display("frame %0d bit %0d: match %b want %b", f, i, match, e);
        end
        for (int k = 0; k < 4; k++) if (match[k]) nmatch[k]++;
        // occasional idle clocks between bits
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk); bit_valid = 0; frame_start = 0;
          @(posedge clk); #1;
          checks++;
          if (match !== 0) failures++;
        end
      end
      @(negedge clk); bit_valid = 0; frame_start = 0;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (nmatch[k] == 0) begin failures++; $display("pattern %0d never matched", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
