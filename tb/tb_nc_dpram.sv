// tb_nc_dpram: random reads and writes from both ports against a reference
// array; writes from one port must be visible to the other (mailbox use),
// with one clock of read latency.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_dpram;
  localparam int W = 256;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [7:0] a_addr, b_addr, a_wdata, b_wdata, a_rdata, b_rdata;
  logic [7:0] refm [W];
  logic [7:0] ea, eb;
  logic ra, rb;
  int checks = 0, failures = 0;

  nc_dpram #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    // fill from port A
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 8'(i); a_wdata = 8'($urandom); refm[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int r = 0; r < 3000; r++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 8'($urandom); a_wdata = 8'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 8'($urandom); b_wdata = 8'($urandom);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) a_we = 0;
      ra = a_en; rb = b_en;
      ea = refm[a_addr]; eb = refm[b_addr];
      @(posedge clk); #1;
      if (a_en && a_we) refm[a_addr] = a_wdata;
      if (b_en && b_we) refm[b_addr] = b_wdata;
      if (ra) begin checks++; if (a_rdata !== ea) failures++; end
      if (rb) begin checks++; if (b_rdata !== eb) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
