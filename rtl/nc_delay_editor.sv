// nc_delay_editor: programmable delay line and editor that link the receiver
// to the transmitter, so that a node can store a packet it is receiving while
// it transmits, change fields in it and send it on (ring repeaters, packet
// forwarding, cut-through switching).
//
// Every clock the received symbol enters a circular buffer and leaves it
// `delay` clocks later (delay 0 = one clock, the shortest reaction time of
// one bit period).  On its way out the editor counts the bits of the packet
// (carrier rising restarts the count) and, for the 16 bits starting at bit
// `edit_offset`, replaces each bit whose `edit_mask` bit is set with the
// corresponding `edit_value` bit (bit 15 of the fields is the first bit).
// `edit_en` turns the editor on.  The 16-bit edit window and the DEPTH are
// choices of this design.
module nc_delay_editor
  import pw_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic                     edit_en,
  input  logic [15:0]              edit_offset,
  input  logic [15:0]              edit_mask,
  input  logic [15:0]              edit_value,
  input  sym_t                     din,
  output sym_t                     dout,
  output logic                     edited   // pulse: a bit was replaced
);
  sym_t        dl;
  logic        prev_car;
  logic [15:0] bitno;
  logic [15:0] rel;
  logic        in_win;
  logic [3:0]  pos;

  ce_delay_cell #(.DEPTH(DEPTH)) u_line (
    .clk, .rst_n, .delay, .din, .dout(dl)
  );

  // Bit number of the delayed symbol within its packet.
  assign rel    = (dl.carrier && !prev_car) ? 16'd0 : bitno;
  assign in_win = edit_en && dl.carrier && dl.timing && !dl.cv
                  && (rel >= edit_offset) && (rel - edit_offset < 16'd16);
  assign pos    = 4'd15 - 4'(rel - edit_offset);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev_car <= 1'b0;
      bitno    <= '0;
      dout     <= SYM_IDLE;
      edited   <= 1'b0;
    end else begin
      prev_car <= dl.carrier;
      if (!dl.carrier)                   bitno <= '0;
      else if (dl.timing && !dl.cv)      bitno <= rel + 1'b1;
      else                               bitno <= rel;
      dout   <= dl;
      edited <= 1'b0;
      if (in_win && edit_mask[pos]) begin
        dout.data <= edit_value[pos];
        edited    <= 1'b1;
      end
    end
endmodule
