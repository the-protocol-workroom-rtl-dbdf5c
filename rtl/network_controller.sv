// network_controller: the custom hardware of one node emulator's intelligent
// network controller, i.e. everything on that board except the 68020
// processor and its program memory, which sit outside and reach this block
// through its register port.
//
// Inside: the dual-port RAM (mailbox and packet buffer; port A is brought out
// for the host board over the P2 bus), the DMA, the transmitter and receiver
// with their CRC generators, the pattern recognizer, the delay line and
// editor that can re-send what is being received, the timers, the global time
// clock and event FIFO for monitoring, the table-driven state machine, and
// the port on the P3 bus of a multi-port node.  The transmitter sends either
// packets from the RAM or, while it has none, the cut-through stream chosen
// by MODE.fwd_sel (delay-line editor or P3 bus).
//
// Register port (68020 side): cpu_we/cpu_addr/cpu_wdata write, cpu_rdata is
// the combinational read of cpu_addr.  Word addresses:
//   0x00 CMD   write pulses: [0] tx go [1] tx abort [2] rx arm [3] rx abort
//              [4] state machine start [5] pop event record [6] clear event
//              overflow [7] send code violation [11:8] start timer k
//              [15:12] stop timer k [19:16] acknowledge timer k
//              [21] clear state-machine interrupt [22] clear DMA done flags
//   0x01 MODE  [0] append CRC [2:1] fwd_sel (0 off, 1 delay editor, 2 P3)
//              [3] editor on [4] state machine run [5] host flag (stimulus)
//              [11:6] state machine start state
//   0x02/0x03 transmit start/end pointer, 0x04/0x05 receive start/end
//   0x06 STATUS (read) [0] tx DMA active [1] transmitter busy [2] rx DMA
//              active [3] rx overflow [4] rx CRC ok [5] event FIFO empty
//              [6] event overflow [11:8] timers expired [15:12] patterns seen
//              [21:16] state [22] state-machine interrupt [23] tx done
//              [24] rx done [25] pattern bank in use
//   0x07 received byte count (read)
//   0x08+k pattern k value, 0x0C+k mask, 0x10+k [15:0] end index
//              [16] enable [17] anchored
//   0x14 delay line setting, 0x15 edit offset, 0x16 [31:16] edit mask
//              [15:0] edit value
//   0x18+k timer k load value
//   0x1C event suppress mask, 0x1D oldest record time stamp (read),
//   0x1E oldest record event bits (read), 0x1F record count (read)
//   0x20 write: 68020-defined events, [1:0] -> event bits 14, 15
//   0x21 P3 transmit routes (2 bits per slot), 0x22 P3 receive routes,
//   0x23 P3 receive bus-bit select slots 0-3 (8 bits each), 0x24 slots 4-7
//   0x25 P3 byte from message RAM, 0x26 last P3 byte to message RAM (read)
//   0x27 global time now (read)
//   0x28+k, 0x2C+k, 0x30+k  pattern k of the second bank, as 0x08..0x13
//   0x100+s state machine table entry s (write)
//   0x140+s [0] pattern bank searched while the state machine is in state s
//              (bank 0 whenever it is not running)
// cpu_irq: a timer expired, the state machine asked for it, or a DMA
// transfer finished.  The register map is a choice of this design.
module network_controller
  import pw_pkg::*;
#(
  parameter int RAM_WORDS = 8192,
  parameter int NCTL      = 8,     // controllers on this node's P3 bus
  parameter int DL_DEPTH  = 1024,
  parameter int EV_DEPTH  = 64,
  parameter int NSTATE    = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // 68020 register port
  input  logic                         cpu_we,
  input  logic [8:0]                   cpu_addr,
  input  logic [31:0]                  cpu_wdata,
  output logic [31:0]                  cpu_rdata,
  output logic                         cpu_irq,
  // host (P2) port of the dual-port RAM
  input  logic                         hp_en,
  input  logic                         hp_we,
  input  logic [$clog2(RAM_WORDS)-1:0] hp_addr,
  input  logic [7:0]                   hp_wdata,
  output logic [7:0]                   hp_rdata,
  // channel emulator port
  output node_tx_t                     node_tx,
  input  node_rx_t                     node_rx,
  // P3 bus
  output logic [7:0]                   p3_lane,
  input  logic [8*NCTL-1:0]            p3_bus
);
  localparam int AW  = $clog2(RAM_WORDS);
  localparam int DLW = $clog2(DL_DEPTH);
  localparam int SW  = $clog2(8*NCTL);

  // ---------------- registers ----------------
  logic [31:0] cmd;
  logic        crc_en, edit_en, sm_run, host_flag;
  logic [1:0]  fwd_sel;
  logic [5:0]  sm_start_state;
  logic [AW-1:0] tx_start, tx_end, rx_start, rx_end;
  logic [31:0] pat_value [4];
  logic [31:0] pat_mask  [4];
  logic [15:0] pat_end   [4];
  logic [3:0]  pat_en, pat_anch;
  logic [31:0] pat1_value [4];           // second pattern bank
  logic [31:0] pat1_mask  [4];
  logic [15:0] pat1_end   [4];
  logic [3:0]  pat1_en, pat1_anch;
  logic [NSTATE-1:0] sm_bank;            // pattern bank used in each state
  logic [DLW-1:0] dl_delay;
  logic [15:0] ed_off, ed_mask, ed_val;
  logic [15:0] tm_load [4];
  logic [EV_W-1:0] ev_supp;
  logic [1:0]  sw_ev;
  p3_route_t   p3_txr [8];
  p3_route_t   p3_rxr [8];
  logic [SW-1:0] p3_sel [8];
  logic [7:0]  p3_ram_tx;
  logic        sm_irq_q, tx_done_q, rx_done_q;

  assign cmd   = (cpu_we && cpu_addr == 9'h000) ? cpu_wdata : 32'h0;
  assign sw_ev = (cpu_we && cpu_addr == 9'h020) ? cpu_wdata[1:0] : 2'b00;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      crc_en <= 1'b1; fwd_sel <= '0; edit_en <= 1'b0; sm_run <= 1'b0;
      host_flag <= 1'b0; sm_start_state <= '0;
      tx_start <= '0; tx_end <= '0; rx_start <= '0; rx_end <= '0;
      for (int k = 0; k < 4; k++) begin
        pat_value[k] <= '0; pat_mask[k] <= '0; pat_end[k] <= '0; tm_load[k] <= '0;
        pat1_value[k] <= '0; pat1_mask[k] <= '0; pat1_end[k] <= '0;
      end
      pat_en <= '0; pat_anch <= '0; pat1_en <= '0; pat1_anch <= '0; sm_bank <= '0;
      dl_delay <= '0; ed_off <= '0; ed_mask <= '0; ed_val <= '0;
      ev_supp <= '0; p3_ram_tx <= '0;
      for (int j = 0; j < 8; j++) begin
        p3_txr[j] <= P3_IGNORE; p3_rxr[j] <= P3_IGNORE; p3_sel[j] <= '0;
      end
    end else if (cpu_we) begin
      unique case (cpu_addr)
        9'h001: begin
          crc_en <= cpu_wdata[0]; fwd_sel <= cpu_wdata[2:1]; edit_en <= cpu_wdata[3];
          sm_run <= cpu_wdata[4]; host_flag <= cpu_wdata[5]; sm_start_state <= cpu_wdata[11:6];
        end
        9'h002: tx_start <= cpu_wdata[AW-1:0];
        9'h003: tx_end   <= cpu_wdata[AW-1:0];
        9'h004: rx_start <= cpu_wdata[AW-1:0];
        9'h005: rx_end   <= cpu_wdata[AW-1:0];
        9'h014: dl_delay <= cpu_wdata[DLW-1:0];
        9'h015: ed_off   <= cpu_wdata[15:0];
        9'h016: {ed_mask, ed_val} <= cpu_wdata;
        9'h01C: ev_supp  <= cpu_wdata[EV_W-1:0];
        9'h021: for (int j = 0; j < 8; j++) p3_txr[j] <= p3_route_t'(cpu_wdata[2*j +: 2]);
        9'h022: for (int j = 0; j < 8; j++) p3_rxr[j] <= p3_route_t'(cpu_wdata[2*j +: 2]);
        9'h023: for (int j = 0; j < 4; j++) p3_sel[j]   <= cpu_wdata[8*j +: SW];
        9'h024: for (int j = 0; j < 4; j++) p3_sel[j+4] <= cpu_wdata[8*j +: SW];
        9'h025: p3_ram_tx <= cpu_wdata[7:0];
        default: begin
          if (cpu_addr[8:6] == 3'b101) sm_bank[cpu_addr[$clog2(NSTATE)-1:0]] <= cpu_wdata[0];
          for (int k = 0; k < 4; k++) begin
            if (cpu_addr == 9'(8'h28 + k))  pat1_value[k] <= cpu_wdata;
            if (cpu_addr == 9'(8'h2C + k))  pat1_mask[k]  <= cpu_wdata;
            if (cpu_addr == 9'(8'h30 + k)) begin
              pat1_end[k]  <= cpu_wdata[15:0];
              pat1_en[k]   <= cpu_wdata[16];
              pat1_anch[k] <= cpu_wdata[17];
            end
            if (cpu_addr == 9'(8'h08 + k))  pat_value[k] <= cpu_wdata;
            if (cpu_addr == 9'(8'h0C + k))  pat_mask[k]  <= cpu_wdata;
            if (cpu_addr == 9'(8'h10 + k)) begin
              pat_end[k]  <= cpu_wdata[15:0];
              pat_en[k]   <= cpu_wdata[16];
              pat_anch[k] <= cpu_wdata[17];
            end
            if (cpu_addr == 9'(8'h18 + k))  tm_load[k]   <= cpu_wdata[15:0];
          end
        end
      endcase
    end

  // ---------------- datapath ----------------
  logic [RESP_W-1:0] resp;
  logic [STIM_W-1:0] stim;
  logic tx_go, tx_abort, rx_arm, rx_abort, send_cv;

  assign tx_go    = cmd[0] | resp[RESP_TX_GO];
  assign tx_abort = cmd[1] | resp[RESP_TX_ABORT];
  assign rx_arm   = cmd[2] | resp[RESP_RX_ARM];
  assign rx_abort = cmd[3] | resp[RESP_RX_ABORT];
  assign send_cv  = cmd[7] | resp[RESP_SEND_CV];

  // RAM
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [7:0]    m_wdata, m_rdata;

  nc_dpram #(.WORDS(RAM_WORDS)) u_ram (
    .clk, .a_en(hp_en), .a_we(hp_we), .a_addr(hp_addr), .a_wdata(hp_wdata), .a_rdata(hp_rdata),
    .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata)
  );

  // receiver
  sym_t        rx_sym;
  logic        rb_valid, rb_data, fr_start, by_valid, fr_end, fr_crc_ok, cv_seen;
  logic [15:0] rb_index;
  logic [7:0]  by_data;
  logic        coll;

  assign rx_sym = '{timing: node_rx.timing, carrier: |node_rx.carrier, cv: node_rx.cv,
                    data: node_rx.data};
  assign coll   = node_rx.cd_carrier | node_rx.cd_data;

  nc_receiver u_rx (
    .clk, .rst_n, .rx_data(node_rx.data), .rx_cv(node_rx.cv), .rx_timing(node_rx.timing),
    .rx_carrier(rx_sym.carrier), .bit_valid(rb_valid), .bit_data(rb_data),
    .bit_index(rb_index), .frame_start(fr_start), .byte_valid(by_valid), .byte_data(by_data),
    .frame_end(fr_end), .crc_ok(fr_crc_ok), .cv_seen
  );

  // DMA
  logic          d_valid, d_last, d_ready, tx_active, tx_dma_done;
  logic [7:0]    d_data;
  logic          rx_active, rx_done, rx_overflow, rx_crc_ok;
  logic [AW:0]   rx_count;

  nc_dma #(.AW(AW)) u_dma (
    .clk, .rst_n, .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .tx_go, .tx_abort, .tx_start, .tx_end,
    .out_valid(d_valid), .out_data(d_data), .out_last(d_last), .out_ready(d_ready),
    .tx_active, .tx_done(tx_dma_done),
    .rx_arm, .rx_abort, .rx_start, .rx_end, .byte_valid(by_valid), .byte_data(by_data),
    .frame_end(fr_end), .frame_crc_ok(fr_crc_ok),
    .rx_active, .rx_done, .rx_count, .rx_overflow, .rx_crc_ok
  );

  // cut-through sources
  sym_t ed_sym, p3_sym, fwd_sym;
  logic edited;

  nc_delay_editor #(.DEPTH(DL_DEPTH)) u_dle (
    .clk, .rst_n, .delay(dl_delay), .edit_en, .edit_offset(ed_off), .edit_mask(ed_mask),
    .edit_value(ed_val), .din(rx_sym), .dout(ed_sym), .edited
  );

  logic [7:0] p3_rx_byte, p3_rx_byte_q;
  logic       p3_rx_valid;
  logic [2:0] p3_slot;

  nc_p3_port #(.NCTL(NCTL)) u_p3 (
    .clk, .rst_n, .tx_route(p3_txr), .rx_route(p3_rxr), .rx_sel(p3_sel),
    .ram_tx_byte(p3_ram_tx), .xcvr_in(rx_sym), .xcvr_out(p3_sym),
    .ram_rx_byte(p3_rx_byte), .ram_rx_valid(p3_rx_valid), .slot(p3_slot),
    .lane_out(p3_lane), .bus_in(p3_bus)
  );

  always_comb
    unique case (fwd_sel)
      2'd1:    fwd_sym = ed_sym;
      2'd2:    fwd_sym = p3_sym;
      default: fwd_sym = SYM_IDLE;
    endcase

  // transmitter
  logic tx_busy, tx_done, tx_underrun;

  nc_transmitter u_tx (
    .clk, .rst_n, .go(tx_go), .crc_en, .stop(tx_abort), .send_cv,
    .fwd_en(fwd_sel != 2'd0), .fwd_sym,
    .in_valid(d_valid), .in_data(d_data), .in_last(d_last), .in_ready(d_ready),
    .tx(node_tx), .busy(tx_busy), .done(tx_done), .underrun(tx_underrun)
  );

  // pattern recognizer; the bank of patterns it searches for is chosen by
  // the state the state machine is in, so a conditional branch of the table
  // changes the patterns
  logic [3:0]  pat_match, pat_seen;
  logic        pat_bank;
  logic [31:0] pv [4];
  logic [31:0] pm [4];
  logic [15:0] pe [4];
  logic [5:0]  sm_state;

  assign pat_bank = sm_run & sm_bank[sm_state[$clog2(NSTATE)-1:0]];
  always_comb
    for (int k = 0; k < 4; k++) begin
      pv[k] = pat_bank ? pat1_value[k] : pat_value[k];
      pm[k] = pat_bank ? pat1_mask[k]  : pat_mask[k];
      pe[k] = pat_bank ? pat1_end[k]   : pat_end[k];
    end

  nc_pattern_recognizer #(.NPAT(4), .PW(32)) u_pat (
    .clk, .rst_n, .bit_valid(rb_valid), .bit_data(rb_data), .bit_index(rb_index),
    .frame_start(fr_start), .enable(pat_bank ? pat1_en : pat_en),
    .anchored(pat_bank ? pat1_anch : pat_anch),
    .value(pv), .mask(pm), .end_index(pe), .match(pat_match), .seen(pat_seen)
  );

  // timers
  logic [3:0] tm_start, tm_running, tm_expired, tm_pulse;
  logic       tm_irq;

  assign tm_start = cmd[11:8] | {3'b000, resp[RESP_TIMER0]};

  nc_timers #(.NT(4), .W(16)) u_tm (
    .clk, .rst_n, .start(tm_start), .stop(cmd[15:12]), .ack(cmd[19:16]), .load(tm_load),
    .running(tm_running), .expired(tm_expired), .expire_pulse(tm_pulse), .irq(tm_irq)
  );

  // monitoring
  logic [31:0]     now;
  logic [EV_W-1:0] events;
  logic [47:0]     ev_rec;
  logic            ev_empty, ev_ovf;
  logic [$clog2(EV_DEPTH):0] ev_count;
  logic            coll_q, ovf_q;

  nc_time_clock #(.W(32)) u_time (
    .clk, .rst_n, .gt_clock(node_rx.gt_clock), .gt_reset(node_rx.gt_reset), .now
  );

  always_comb begin
    events = '0;
    events[EV_TX_START] = tx_go;
    events[EV_TX_DONE]  = tx_done;
    events[EV_RX_START] = fr_start;
    events[EV_RX_END]   = fr_end;
    events[EV_CRC_ERR]  = fr_end & ~fr_crc_ok;
    events[EV_COLL]     = coll & ~coll_q;
    events[EV_PAT0 +: 4] = pat_match;
    events[EV_TIMER]    = |tm_pulse;
    events[EV_SM]       = resp[RESP_EVENT];
    events[EV_OVERFLOW] = rx_overflow & ~ovf_q;
    events[EV_CV]       = cv_seen;
    events[EV_SW +: 2]  = sw_ev;
  end

  nc_event_fifo #(.DEPTH(EV_DEPTH), .EVW(EV_W), .TW(32)) u_evf (
    .clk, .rst_n, .events, .suppress(ev_supp), .now, .pop(cmd[5]), .clr_overflow(cmd[6]),
    .rd_data(ev_rec), .empty(ev_empty), .count(ev_count), .overflow(ev_ovf)
  );

  // state machine

  always_comb begin
    stim = '0;
    stim[STIM_ONE]     = 1'b1;
    stim[STIM_CARRIER] = rx_sym.carrier;
    stim[STIM_COLL]    = coll;
    stim[STIM_RX_END]  = fr_end;
    stim[STIM_CRC_OK]  = fr_crc_ok;
    stim[STIM_PAT0 +: 4] = pat_seen;
    stim[STIM_TX_DONE] = tx_done;
    stim[STIM_TIMER]   = |tm_expired;
    stim[STIM_TX_BUSY] = tx_busy;
    stim[STIM_HOST]    = host_flag;
    stim[STIM_RX_CV]   = cv_seen;
    stim[STIM_DIR0]    = node_rx.carrier[0];
    stim[STIM_DIR1]    = node_rx.carrier[1];
  end

  nc_state_machine #(.NSTATE(NSTATE)) u_sm (
    .clk, .rst_n, .run(sm_run), .start(cmd[4]), .start_state(sm_start_state),
    .tbl_we(cpu_we && cpu_addr[8:6] == 3'b100), .tbl_addr(cpu_addr[$clog2(NSTATE)-1:0]),
    .tbl_wdata(sm_entry_t'(cpu_wdata)), .stimuli(stim), .resp, .state(sm_state)
  );

  // flags and interrupt
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sm_irq_q <= 1'b0; tx_done_q <= 1'b0; rx_done_q <= 1'b0;
      coll_q <= 1'b0; ovf_q <= 1'b0; p3_rx_byte_q <= '0;
    end else begin
      coll_q <= coll;
      ovf_q  <= rx_overflow;
      if (p3_rx_valid) p3_rx_byte_q <= p3_rx_byte;
      if (cmd[21]) sm_irq_q <= 1'b0; else if (resp[RESP_IRQ]) sm_irq_q <= 1'b1;
      if (cmd[22]) begin
        tx_done_q <= 1'b0; rx_done_q <= 1'b0;
      end else begin
        if (tx_done | tx_underrun) tx_done_q <= 1'b1;
        if (rx_done)               rx_done_q <= 1'b1;
      end
    end

  assign cpu_irq = tm_irq | sm_irq_q | tx_done_q | rx_done_q;

  always_comb begin
    cpu_rdata = '0;
    unique case (cpu_addr)
      9'h001: cpu_rdata = {20'h0, sm_start_state, host_flag, sm_run, edit_en, fwd_sel, crc_en};
      9'h002: cpu_rdata = 32'(tx_start);
      9'h003: cpu_rdata = 32'(tx_end);
      9'h004: cpu_rdata = 32'(rx_start);
      9'h005: cpu_rdata = 32'(rx_end);
      9'h006: cpu_rdata = {6'h0, pat_bank, rx_done_q, tx_done_q, sm_irq_q, sm_state, pat_seen, tm_expired,
                           1'b0, ev_ovf, ev_empty, rx_crc_ok, rx_overflow, rx_active, tx_busy,
                           tx_active};
      9'h007: cpu_rdata = 32'(rx_count);
      9'h01D: cpu_rdata = ev_rec[47:16];
      9'h01E: cpu_rdata = {~ev_empty, 15'h0, ev_rec[15:0]};
      9'h01F: cpu_rdata = 32'(ev_count);
      9'h026: cpu_rdata = {24'h0, p3_rx_byte_q};
      9'h027: cpu_rdata = now;
      default: ;
    endcase
  end

  // Unused by the register read-back: running timers, P3 slot, tx DMA done
  // (the transmitter's own done is used), editor activity.
  logic unused;
  assign unused = ^{tm_running, p3_slot, tx_dma_done, edited};
endmodule
