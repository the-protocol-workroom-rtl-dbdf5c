// nc_dpram: dual-port RAM of the network controller.  Port A faces the host
// (the node's host board, over the P2 bus) and serves as the mailbox for
// files, software and monitoring data; port B faces the controller side (DMA
// for packets in and out).  Both ports read and write one byte per clock,
// with the read data registered (one clock of latency).  A simultaneous write
// to the same address from both ports leaves port B's byte.  The size is a
// choice of this design.
module nc_dpram #(
  parameter int WORDS = 8192
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [7:0]               a_wdata,
  output logic [7:0]               a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [7:0]               b_wdata,
  output logic [7:0]               b_rdata
);
  logic [7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
