// nc_transmitter: transmission hardware of the network controller.  It turns
// the byte stream delivered by the DMA into the serial symbol stream sent to
// the channel emulator, one bit per clock, and inserts the CRC-32 of the
// packet after its last byte.
//
// Interface:
//   go            start a packet (pulse); bytes then arrive on in_valid /
//                 in_data / in_last and are taken with the in_ready pulse
//   crc_en        append the 32 CRC bits after the last byte
//   stop         stop at once; carrier drops on the next clock
//   send_cv       while idle, send one code-violation symbol
//   fwd_en/fwd_sym while idle, repeat fwd_sym (cut-through path from the
//                 delay-line editor or the P3 bus)
//   tx            symbol to the channel emulator, registered
//   busy, done    packet in progress; pulse when the last bit has been sent
//   underrun      pulse when the next byte was not there in time (packet
//                 ends without CRC)
// Timing: the first data bit leaves two clocks after go if the first byte is
// waiting; a packet of n bytes occupies 8n (+32 with CRC) consecutive bit
// times.  Bytes are sent most significant bit first, a choice of this design.
module nc_transmitter
  import pw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic       crc_en,
  input  logic       stop,
  input  logic       send_cv,
  input  logic       fwd_en,
  input  sym_t       fwd_sym,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output sym_t       tx,
  output logic       busy,
  output logic       done,
  output logic       underrun
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DATA, S_CRC} state_t;

  state_t      st;
  logic [7:0]  sh;
  logic [4:0]  cnt;
  logic        last_q;
  logic        crc_en_q;
  logic [31:0] crc;
  logic        crc_zero;
  logic        crc_init, crc_step;

  assign busy     = (st != S_IDLE);
  assign in_ready = in_valid && ((st == S_LOAD) || (st == S_DATA && cnt == 5'd7 && !last_q))
                    && !stop;
  assign crc_init = go;
  assign crc_step = (st == S_DATA) && !stop;

  nc_crc32 u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_step), .din(sh[7]), .crc, .zero(crc_zero)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st       <= S_IDLE;
      sh       <= '0;
      cnt      <= '0;
      last_q   <= 1'b0;
      crc_en_q <= 1'b0;
      tx       <= SYM_IDLE;
      done     <= 1'b0;
      underrun <= 1'b0;
    end else begin
      done     <= 1'b0;
      underrun <= 1'b0;
      tx       <= SYM_IDLE;
      if (stop) begin
        st <= S_IDLE;
      end else begin
        unique case (st)
          S_IDLE: begin
            if (go) begin
              st       <= S_LOAD;
              crc_en_q <= crc_en;
            end else if (send_cv) tx <= '{timing: 1'b1, carrier: 1'b1, cv: 1'b1, data: 1'b0};
            else if (fwd_en)      tx <= fwd_sym;
          end
          S_LOAD:
            if (in_valid) begin
              sh     <= in_data;
              last_q <= in_last;
              cnt    <= '0;
              st     <= S_DATA;
            end
          S_DATA: begin
            tx <= '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: sh[7]};
            sh  <= {sh[6:0], 1'b0};
            cnt <= cnt + 1'b1;
            if (cnt == 5'd7) begin
              cnt <= '0;
              if (!last_q) begin
                if (in_valid) begin
                  sh     <= in_data;
                  last_q <= in_last;
                end else begin
                  st       <= S_IDLE;
                  underrun <= 1'b1;
                end
              end else if (crc_en_q) st <= S_CRC;
              else begin
                st   <= S_IDLE;
                done <= 1'b1;
              end
            end
          end
          S_CRC: begin
            tx  <= '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: crc[5'd31 - cnt]};
            cnt <= cnt + 1'b1;
            if (cnt == 5'd31) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
endmodule
