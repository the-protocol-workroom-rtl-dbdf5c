// nc_dma: direct-memory-access hardware between the dual-port RAM and the
// transceiver of the network controller, one transmit and one receive
// channel sharing the RAM's controller-side port.
//
// A transfer needs only a start pointer, an end pointer (inclusive) and an
// initiate command (tx_go / rx_arm), given by the 68020 or the state machine.
//   Transmit: bytes start..end are read and handed to the transmitter on
//     out_valid/out_data/out_last; out_ready takes one.  One byte is fetched
//     ahead.  tx_done pulses when the last byte has been handed over.
//   Receive: every byte_valid from the receiver is written at the next
//     address; bytes past the end pointer are dropped and set rx_overflow.
//     At frame_end the channel disarms, rx_done pulses, rx_count holds the
//     number of bytes stored and rx_crc_ok the receiver's verdict.
//   Abort (tx_abort / rx_abort) stops a channel at once without touching the
//     bytes already moved; it is idle again on the next clock and can be
//     re-initiated.
// RAM port arbitration: a pending receive write always wins; a transmit fetch
// waits one clock.  Receive bytes come at most every 8 clocks and transmit
// bytes are consumed every 8, so neither side starves.  Arbitration and the
// status signals are choices of this design.
module nc_dma #(
  parameter int AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  // RAM port B
  output logic          m_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [7:0]    m_wdata,
  input  logic [7:0]    m_rdata,
  // transmit channel
  input  logic          tx_go,
  input  logic          tx_abort,
  input  logic [AW-1:0] tx_start,
  input  logic [AW-1:0] tx_end,
  output logic          out_valid,
  output logic [7:0]    out_data,
  output logic          out_last,
  input  logic          out_ready,
  output logic          tx_active,
  output logic          tx_done,
  // receive channel
  input  logic          rx_arm,
  input  logic          rx_abort,
  input  logic [AW-1:0] rx_start,
  input  logic [AW-1:0] rx_end,
  input  logic          byte_valid,
  input  logic [7:0]    byte_data,
  input  logic          frame_end,
  input  logic          frame_crc_ok,
  output logic          rx_active,
  output logic          rx_done,
  output logic [AW:0]   rx_count,
  output logic          rx_overflow,
  output logic          rx_crc_ok
);
  // transmit state
  logic [AW-1:0] tx_ptr, tx_end_q, rd_addr;
  logic          tx_more;     // bytes left to fetch
  logic          rd_pend;     // a read was issued last clock
  logic          rd_issue;
  // receive state
  logic [AW-1:0] rx_ptr, rx_end_q;
  logic          rx_full;
  logic          wr_pend;
  logic [AW-1:0] wr_addr;
  logic [7:0]    wr_data;

  assign rd_issue = tx_active && tx_more && !rd_pend && !wr_pend && !tx_abort
                    && (!out_valid || out_ready);

  always_comb begin
    m_en    = wr_pend || rd_issue;
    m_we    = wr_pend;
    m_addr  = wr_pend ? wr_addr : tx_ptr;
    m_wdata = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_active <= 1'b0;
      tx_more   <= 1'b0;
      tx_ptr    <= '0;
      tx_end_q  <= '0;
      rd_addr   <= '0;
      rd_pend   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      tx_done   <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      rd_pend <= rd_issue;
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        if (out_last) begin
          tx_active <= 1'b0;
          tx_done   <= 1'b1;
        end
      end
      if (rd_issue) begin
        rd_addr <= tx_ptr;
        tx_ptr  <= tx_ptr + 1'b1;
        tx_more <= (tx_ptr != tx_end_q);
      end
      if (rd_pend && tx_active) begin
        out_valid <= 1'b1;
        out_data  <= m_rdata;
        out_last  <= (rd_addr == tx_end_q);
      end
      if (tx_abort) begin
        tx_active <= 1'b0;
        tx_more   <= 1'b0;
        out_valid <= 1'b0;
        rd_pend   <= 1'b0;
      end else if (tx_go) begin
        tx_active <= 1'b1;
        tx_more   <= 1'b1;
        tx_ptr    <= tx_start;
        tx_end_q  <= tx_end;
        out_valid <= 1'b0;
        rd_pend   <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rx_active   <= 1'b0;
      rx_ptr      <= '0;
      rx_end_q    <= '0;
      rx_full     <= 1'b0;
      rx_count    <= '0;
      rx_overflow <= 1'b0;
      rx_crc_ok   <= 1'b0;
      rx_done     <= 1'b0;
      wr_pend     <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
    end else begin
      rx_done <= 1'b0;
      wr_pend <= 1'b0;
      if (rx_abort) begin
        rx_active <= 1'b0;
      end else if (rx_arm) begin
        rx_active   <= 1'b1;
        rx_ptr      <= rx_start;
        rx_end_q    <= rx_end;
        rx_full     <= 1'b0;
        rx_count    <= '0;
        rx_overflow <= 1'b0;
        rx_crc_ok   <= 1'b0;
      end else if (rx_active) begin
        if (byte_valid) begin
          if (rx_full) rx_overflow <= 1'b1;
          else begin
            wr_pend  <= 1'b1;
            wr_addr  <= rx_ptr;
            wr_data  <= byte_data;
            rx_ptr   <= rx_ptr + 1'b1;
            rx_count <= rx_count + 1'b1;
            rx_full  <= (rx_ptr == rx_end_q);
          end
        end
        if (frame_end) begin
          rx_active <= 1'b0;
          rx_done   <= 1'b1;
          rx_crc_ok <= frame_crc_ok;
        end
      end
    end
endmodule
