// nc_state_machine: the bit-event driven state machine of the network
// controller.  It makes link-layer decisions once per bit period from a
// programmable stimuli-response table and performs no computation.
//
// The table holds one entry per state (pw_pkg::sm_entry_t): the number of the
// stimulus to test, and for each outcome a next state and a set of response
// lines.  Each clock while `run` is high the current state's entry is read,
// its stimulus tested, the chosen responses pulse for one clock and the
// machine moves to the chosen next state.  A state that should wait simply
// names itself as the next state on the "not yet" branch.  `start` (from the
// 68020) enters state `start_state`.  The table is written by the 68020
// through tbl_we/tbl_addr/tbl_wdata and may be rewritten while the machine
// runs.  Stimulus and response assignments are in pw_pkg; table layout,
// number of states and branch form are choices of this design.
// Timing: responses are registered, one clock after the stimulus is sampled.
module nc_state_machine
  import pw_pkg::*;
#(
  parameter int NSTATE = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  logic                      start,
  input  logic [5:0]                start_state,
  input  logic                      tbl_we,
  input  logic [$clog2(NSTATE)-1:0] tbl_addr,
  input  sm_entry_t                 tbl_wdata,
  input  logic [STIM_W-1:0]         stimuli,
  output logic [RESP_W-1:0]         resp,
  output logic [5:0]                state
);
  sm_entry_t tbl [NSTATE];
  sm_entry_t cur;
  logic      s;

  always_ff @(posedge clk)
    if (tbl_we) tbl[tbl_addr] <= tbl_wdata;

  assign cur = tbl[state[$clog2(NSTATE)-1:0]];
  assign s   = stimuli[cur.sel];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= '0;
      resp  <= '0;
    end else begin
      resp <= '0;
      if (start)
        state <= start_state;
      else if (run) begin
        state <= s ? cur.next_t : cur.next_f;
        resp  <= s ? cur.resp_t : cur.resp_f;
      end
    end
endmodule
