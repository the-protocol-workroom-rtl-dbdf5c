// nc_receiver: reception hardware of the network controller.  It samples the
// receive data line on every receive-timing strobe while carrier is present,
// assembles bytes for the DMA, runs the receive CRC over every bit and, when
// carrier drops, reports the end of the packet and whether its CRC checked.
//
// Interface:
//   rx_data, rx_cv, rx_timing, rx_carrier   from the channel emulator port
//   bit_valid/bit_data/bit_index  every received bit with its position in the
//                 packet (for the pattern recognizer and delay line)
//   frame_start   pulse on the first bit of a packet
//   byte_valid/byte_data  pulse per complete byte
//   frame_end     pulse one clock after carrier drops
//   crc_ok        with frame_end: CRC residue zero and a whole number of bytes
//   cv_seen       pulse for each code-violation symbol
// A packet is the run of bits between carrier rising and falling; the CRC
// bytes are delivered like data.  Bytes are assembled most significant bit
// first, matching the transmitter.
//
// A receive CRC generator separate from the transmit one follows the source
// design; framing by carrier, bit order and the 32-bit minimum for crc_ok
// are this design's choices.
module nc_receiver
  import pw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_data,
  input  logic        rx_cv,
  input  logic        rx_timing,
  input  logic        rx_carrier,
  output logic        bit_valid,
  output logic        bit_data,
  output logic [15:0] bit_index,
  output logic        frame_start,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        frame_end,
  output logic        crc_ok,
  output logic        cv_seen
);
  logic        in_frame;
  logic [2:0]  bcnt;
  logic [7:0]  sh;
  logic [15:0] nbits;
  logic [31:0] crc;
  logic        crc_zero;
  logic        take;
  logic        crc_init;

  assign take        = rx_carrier && rx_timing && !rx_cv;
  assign bit_valid   = take;
  assign bit_data    = rx_data;
  assign bit_index   = in_frame ? nbits : 16'd0;
  assign frame_start = take && !in_frame;
  // Preset the CRC between packets, including the clock that ends one.
  assign crc_init    = in_frame ? !rx_carrier : !take;
  assign cv_seen     = rx_carrier && rx_timing && rx_cv;

  nc_crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .en(take),
    .din(rx_data), .crc, .zero(crc_zero)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_frame   <= 1'b0;
      bcnt       <= '0;
      sh         <= '0;
      nbits      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      frame_end  <= 1'b0;
      crc_ok     <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      frame_end  <= 1'b0;
      if (take) begin
        in_frame <= 1'b1;
        sh       <= {sh[6:0], rx_data};
        bcnt     <= bcnt + 1'b1;
        nbits    <= (in_frame ? nbits : 16'd0) + 1'b1;
        if (!in_frame) bcnt <= 3'd1;
        if ((in_frame ? bcnt : 3'd0) == 3'd7) begin
          byte_valid <= 1'b1;
          byte_data  <= {sh[6:0], rx_data};
        end
      end else if (in_frame && !rx_carrier) begin
        in_frame  <= 1'b0;
        frame_end <= 1'b1;
        crc_ok    <= crc_zero && (nbits[2:0] == 3'd0) && (nbits >= 16'd32);
        bcnt      <= '0;
        nbits     <= '0;
      end
    end
endmodule
