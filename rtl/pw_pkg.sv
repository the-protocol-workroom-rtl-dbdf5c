// pw_pkg: types and constants shared by the channel emulator and the node
// network controllers of the protocol research facility.
//
// Every block runs from one clock whose period is one bit time of the
// experimental network (10 Mb/s, so 100 ns).  A serial stream between a node
// and the channel emulator is carried as a four-signal symbol per clock:
// timing strobe, carrier, code violation and data, as on the node port
// connector.  Treating the timing line as a per-bit strobe, rather than a
// free-running clock, is a choice of this design.
package pw_pkg;

  // Serial symbol on one link (node port, tap output, delay cell, masked OR).
  typedef struct packed {
    logic timing;   // a bit is present in this clock
    logic carrier;  // active transmission
    logic cv;       // code violation (out-of-band symbol)
    logic data;     // data bit
  } sym_t;

  localparam sym_t SYM_IDLE = '0;

  // Node emulator -> channel emulator (connector pins 2, 4, 9, 12).
  typedef sym_t node_tx_t;

  // Channel emulator -> node emulator (pins 1, 3, 5, 6, 8, 10, 11 and the
  // optional collision-detect pair).
  typedef struct packed {
    logic       data;       // pin 1
    logic       cv;         // pin 3
    logic       gt_clock;   // pin 5, global time clock (strobe)
    logic       gt_reset;   // pin 6, global time reset
    logic       timing;     // pin 8, receive timing (strobe)
    logic [1:0] carrier;    // pins 10, 11: receive carrier, one per direction
    logic       cd_carrier; // collision detect, carrier method
    logic       cd_data;    // collision detect, data method
  } node_rx_t;

  // Fault conditions a delay cell output can be given in real time.
  typedef enum logic [2:0] {
    FLT_NONE   = 3'd0,  // pass unchanged
    FLT_OPEN   = 3'd1,  // broken link: nothing arrives
    FLT_JAM    = 3'd2,  // jammed link: carrier and data stuck at 1
    FLT_INVERT = 3'd3,  // every data bit inverted
    FLT_NOISE  = 3'd4,  // random bit errors at a programmed rate
    FLT_CV     = 3'd5   // every bit turned into a code violation
  } fault_t;

  // Configuration of one tap block.
  typedef struct packed {
    logic [1:0] pass;     // forward masked-OR input d to tap output d
    logic [1:0] inject;   // put the node's transmission on tap output d
    logic [1:0] rx_en;    // hear masked-OR input d
    logic       feedback; // hear the node's own transmission
  } tap_cfg_t;

  // Stimuli seen by the node state machine.
  localparam int STIM_W = 16;
  localparam int STIM_ONE      = 0;
  localparam int STIM_CARRIER  = 1;
  localparam int STIM_COLL     = 2;
  localparam int STIM_RX_END   = 3;
  localparam int STIM_CRC_OK   = 4;
  localparam int STIM_PAT0     = 5;   // 5..8: pattern matches 0..3
  localparam int STIM_TX_DONE  = 9;
  localparam int STIM_TIMER    = 10;
  localparam int STIM_TX_BUSY  = 11;
  localparam int STIM_HOST     = 12;
  localparam int STIM_RX_CV    = 13;
  localparam int STIM_DIR0     = 14;
  localparam int STIM_DIR1     = 15;

  // Responses the state machine can issue.
  localparam int RESP_W = 8;
  localparam int RESP_TX_GO    = 0;
  localparam int RESP_TX_ABORT = 1;
  localparam int RESP_RX_ARM   = 2;
  localparam int RESP_RX_ABORT = 3;
  localparam int RESP_TIMER0   = 4;
  localparam int RESP_SEND_CV  = 5;
  localparam int RESP_EVENT    = 6;
  localparam int RESP_IRQ      = 7;

  // One stimuli-response table entry.
  typedef struct packed {
    logic [3:0]        sel;     // stimulus tested in this state
    logic [5:0]        next_t;  // next state when it is 1
    logic [5:0]        next_f;  // next state when it is 0
    logic [RESP_W-1:0] resp_t;  // responses when it is 1
    logic [RESP_W-1:0] resp_f;  // responses when it is 0
  } sm_entry_t;

  // Event bits of one monitoring record.
  localparam int EV_W = 16;
  localparam int EV_TX_START = 0;
  localparam int EV_TX_DONE  = 1;
  localparam int EV_RX_START = 2;
  localparam int EV_RX_END   = 3;
  localparam int EV_CRC_ERR  = 4;
  localparam int EV_COLL     = 5;
  localparam int EV_PAT0     = 6;   // 6..9
  localparam int EV_TIMER    = 10;
  localparam int EV_SM       = 11;
  localparam int EV_OVERFLOW = 12;  // receive buffer overflow
  localparam int EV_CV       = 13;  // code violation received
  localparam int EV_SW       = 14;  // 14, 15: events defined by the 68020

  // P3 slot routing codes.
  typedef enum logic [1:0] {
    P3_IGNORE = 2'd0,
    P3_RAM    = 2'd1,
    P3_XCVR   = 2'd2
  } p3_route_t;

endpackage
