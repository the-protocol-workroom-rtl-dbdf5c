// nc_crc32: bit-serial CRC generator of the network controller.  Two
// instances are used: one over outgoing packets (the transmitter appends the
// result) and one over incoming packets (the receiver checks it).
//
// Generator polynomial 0x04C11DB7 (the Ethernet CRC-32), register preset to
// all ones by `init`, one data bit per clock when `en` is high, processed
// most significant bit first with no final inversion.  When the transmitter
// sends the register most significant bit first after the data, the
// receiver's register over data plus CRC ends at zero, so `zero` is the
// packet-good flag.  The polynomial and bit order are choices of this design.
module nc_crc32 #(
  parameter logic [31:0] POLY = 32'h04C11DB7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        din,
  output logic [31:0] crc,
  output logic        zero
);
  logic fb;
  assign fb   = crc[31] ^ din;
  assign zero = (crc == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= {crc[30:0], 1'b0} ^ (fb ? POLY : 32'h0);
endmodule
