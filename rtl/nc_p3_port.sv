// nc_p3_port: one network controller's port on the P3 bus, the switching
// fabric among the controllers of a multi-port node emulator.
//
// The P3 bus is 8*NCTL bits wide (64 for 8 controllers); controller k owns
// byte lane k and rewrites it once per 8 bit times, so the bus changes at
// 1.25 MHz while each controller's 10 Mb/s stream is cut into 8 time slots
// per byte frame.  Each slot is a 1.25 Mb/s channel; on the bus these appear
// as 8*NCTL channels at once (space division), which makes a time-slot
// interchange simple: every slot can take its bit from any bus bit.
//   Transmit side, slot j: tx_route[j] selects what goes into bit j of this
//     controller's lane for the next frame: nothing, bit j of the byte from
//     the message RAM (ram_tx_byte, latched at the frame start), or the
//     transceiver bit of slot j (xcvr_in, the received stream).
//   Receive side, slot j: rx_route[j] sends bus bit rx_sel[j] of the current
//     frame either nowhere, into bit j of a byte for the message RAM
//     (ram_rx_byte with ram_rx_valid at the frame end), or out on the
//     transceiver stream xcvr_out in slot j.
// All slot counters of a bus start together at reset.  xcvr_out carries
// carrier while any slot is routed to the transceiver and a timing strobe in
// each such slot.  A bit entering in slot j of one frame is on the bus during
// the whole next frame.  The routing tables and the sample point are choices
// of this design.
module nc_p3_port
  import pw_pkg::*;
#(
  parameter int NCTL = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  p3_route_t                 tx_route [8],
  input  p3_route_t                 rx_route [8],
  input  logic [$clog2(8*NCTL)-1:0] rx_sel   [8],
  input  logic [7:0]                ram_tx_byte,
  input  sym_t                      xcvr_in,
  output sym_t                      xcvr_out,
  output logic [7:0]                ram_rx_byte,
  output logic                      ram_rx_valid,
  output logic [2:0]                slot,
  output logic [7:0]                lane_out,
  input  logic [8*NCTL-1:0]         bus_in
);
  logic [7:0]        build, ram_q, rx_acc;
  logic [8*NCTL-1:0] bus_q, bus_now;
  logic              in_bit, rx_bit, any_xcvr;

  assign in_bit  = xcvr_in.carrier & xcvr_in.timing & xcvr_in.data;
  assign bus_now = (slot == 3'd0) ? bus_in : bus_q;
  assign rx_bit  = bus_now[rx_sel[slot]];

  always_comb begin
    any_xcvr = 1'b0;
    for (int j = 0; j < 8; j++) any_xcvr |= (rx_route[j] == P3_XCVR);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      slot         <= '0;
      build        <= '0;
      ram_q        <= '0;
      rx_acc       <= '0;
      bus_q        <= '0;
      lane_out     <= '0;
      xcvr_out     <= SYM_IDLE;
      ram_rx_byte  <= '0;
      ram_rx_valid <= 1'b0;
    end else begin
      slot         <= slot + 1'b1;
      ram_rx_valid <= 1'b0;
      if (slot == 3'd0) begin
        bus_q <= bus_in;
        ram_q <= ram_tx_byte;
      end

      // transmit side
      unique case (tx_route[slot])
        P3_RAM:  build[slot] <= (slot == 3'd0) ? ram_tx_byte[0] : ram_q[slot];
        P3_XCVR: build[slot] <= in_bit;
        default: build[slot] <= 1'b0;
      endcase
      if (slot == 3'd7) begin
        lane_out <= build;
        unique case (tx_route[7])
          P3_RAM:  lane_out[7] <= ram_q[7];
          P3_XCVR: lane_out[7] <= in_bit;
          default: lane_out[7] <= 1'b0;
        endcase
      end

      // receive side
      xcvr_out <= '{timing: (rx_route[slot] == P3_XCVR), carrier: any_xcvr, cv: 1'b0,
                    data: (rx_route[slot] == P3_XCVR) & rx_bit};
      if (rx_route[slot] == P3_RAM) rx_acc[slot] <= rx_bit;
      else                          rx_acc[slot] <= 1'b0;
      if (slot == 3'd7) begin
        ram_rx_byte  <= {(rx_route[7] == P3_RAM) & rx_bit, rx_acc[6:0]};
        ram_rx_valid <= 1'b1;
      end
    end
endmodule
