// tb_nc_state_machine: loads a random 64-entry stimuli-response table, then
// drives random stimuli and compares state and responses every clock with a
// reference model of the table walk; also rewrites entries while running,
// and checks start and the hold when run is low.  A second phase loads a
// small CSMA-style transmit procedure (wait for request, send, on collision
// abort and start the back-off timer, retry on expiry, report at the end)
// and checks its response sequence.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_state_machine;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, start = 0, tbl_we = 0;
  logic [5:0] start_state = 0, tbl_addr = 0, state;
  sm_entry_t tbl_wdata;
  logic [15:0] stimuli = 0;
  logic [7:0] resp;
  sm_entry_t model [64];
  logic [5:0] ms;
  logic [7:0] mr;
  int checks = 0, failures = 0;
  int n_go = 0, n_abort = 0, n_irq = 0;

  nc_state_machine #(.NSTATE(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input sm_entry_t e);
    @(negedge clk); tbl_we = 1; tbl_addr = 6'(a); tbl_wdata = e; model[a] = e;
    @(negedge clk); tbl_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) wr(a, sm_entry_t'({$urandom, $urandom}));
    @(negedge clk); start = 1; start_state = 6'd5;
    @(negedge clk); start = 0;
    ms = 5;
    checks++;
    if (state !== 6'd5) failures++;
    for (int r = 0; r < 4000; r++) begin
      @(negedge clk);
      stimuli = 16'($urandom);
      run = ($urandom_range(0, 9) != 0);
      tbl_we = (r % 97 == 0);
      if (tbl_we) begin
        tbl_addr = 6'($urandom); tbl_wdata = sm_entry_t'({$urandom, $urandom});
      end
      if (run) begin
        mr = stimuli[model[ms].sel] ? model[ms].resp_t : model[ms].resp_f;
        ms = stimuli[model[ms].sel] ? model[ms].next_t : model[ms].next_f;
      end else mr = 0;
      if (tbl_we) model[tbl_addr] = tbl_wdata;
      @(posedge clk); #1;
      checks++;
      if (state !== ms || resp !== mr) begin
        failures++;
        if (failures < 5) $display("r %0d: state %0d want %0d resp %h want %h", r, state, ms, resp, mr);
      end
    end
    tbl_we = 0;
    // CSMA-style procedure
    //  0: HOST ? (TX_GO -> 1) : 0
    //  1: COLL ? (TX_ABORT|TIMER0 -> 2) : 3
    //  3: TX_DONE ? (EVENT|IRQ -> 0) : 1
    //  2: TIMER ? (TX_GO -> 1) : 2
    run = 0;
    wr(0, '{sel: 4'(STIM_HOST),    next_t: 1, next_f: 0, resp_t: 8'(1 << RESP_TX_GO), resp_f: 0});
    wr(1, '{sel: 4'(STIM_COLL),    next_t: 2, next_f: 3,
            resp_t: 8'((1 << RESP_TX_ABORT) | (1 << RESP_TIMER0)), resp_f: 0});
    wr(3, '{sel: 4'(STIM_TX_DONE), next_t: 0, next_f: 1,
            resp_t: 8'((1 << RESP_EVENT) | (1 << RESP_IRQ)), resp_f: 0});
    wr(2, '{sel: 4'(STIM_TIMER),   next_t: 1, next_f: 2, resp_t: 8'(1 << RESP_TX_GO), resp_f: 0});
    @(negedge clk); start = 1; start_state = 0; stimuli = 0;
    @(negedge clk); start = 0; run = 1;
    fork
      repeat (300) begin
        @(posedge clk); #1;
        if (resp[RESP_TX_GO]) n_go++;
        if (resp[RESP_TX_ABORT]) n_abort++;
        if (resp[RESP_IRQ]) n_irq++;
      end
      begin
        repeat (5) @(negedge clk);
        stimuli[STIM_HOST] = 1; @(negedge clk); stimuli[STIM_HOST] = 0;
        repeat (20) @(negedge clk);
        stimuli[STIM_COLL] = 1; @(negedge clk); @(negedge clk); stimuli[STIM_COLL] = 0;
        repeat (30) @(negedge clk);
        stimuli[STIM_TIMER] = 1; @(negedge clk); @(negedge clk); stimuli[STIM_TIMER] = 0;
        repeat (40) @(negedge clk);
        stimuli[STIM_TX_DONE] = 1; @(negedge clk); @(negedge clk); stimuli[STIM_TX_DONE] = 0;
      end
    join
    checks++;
    if (n_go != 2 || n_abort != 1 || n_irq != 1 || state !== 0) begin
      failures++;
      $display("procedure: go %0d abort %0d irq %0d state %0d", n_go, n_abort, n_irq, state);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
