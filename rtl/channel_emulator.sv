// channel_emulator: the hard-wired logic that replaces cable, transceivers and
// collision detection between the node emulators.
//
// Structure (per port p, direction d):
//   node p --> tap block p --> tap output 2p+d --> mux array --> delay cell i
//   --> fault injector i --> masked-OR array --> tap input 2p+d --> node p
// N_PORTS tap blocks give 2*N_PORTS tap outputs; N_DELAY multiplexers let any
// of them drive any delay cell; the masked-OR array lets any set of delay
// cells drive each tap input.  With 32 ports this is the 64 x (64:1 mux),
// 64 delay cells and 64 x (64:1 masked OR) of the full emulator.
// A global time generator drives the time clock and reset lines of all ports.
//
// Configuration is written by the host computer through a simple write port
// (cfg_we, cfg_addr, cfg_wdata), word addresses:
//   0x000 + i : delay cell i source, tap output number (low bits)
//   0x040 + i : delay cell i setting, d gives d+1 bit times
//   0x080 + i : fault of delay cell i: [2:0] mode (pw_pkg::fault_t),
//               [15:8] error rate for random errors
//   0x100 + 2*o + w : masked-OR output o, mask bits 32w..32w+31
//   0x180 + p : tap block p configuration (pw_pkg::tap_cfg_t, 7 bits)
//   0x1FF     : any write issues a global time reset to every node
// Writes take effect on the next clock, also while traffic flows, which is how
// topologies, delays and faults are changed in real time.  After reset every
// source is 0, every delay 0, no fault, every mask and tap configuration
// clear (all ports isolated).  The register map and reset values are choices
// of this design.  The latency of a link is (setting + 2) bit times: one for
// the delay cell at setting 0 and one for the fault injector.
module channel_emulator
  import pw_pkg::*;
#(
  parameter int N_PORTS = 32,
  parameter int N_DELAY = 64,
  parameter int DEPTH   = 1024,
  parameter int GT_DIV  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port (host computer)
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  // node ports
  input  node_tx_t    node_tx [N_PORTS],
  output node_rx_t    node_rx [N_PORTS]
);
  localparam int N_TAP = 2 * N_PORTS;
  localparam int SW    = $clog2(N_TAP);
  localparam int DW    = $clog2(DEPTH);
  localparam int MW    = (N_DELAY + 31) / 32;   // 32-bit words per mask

  // configuration registers
  logic [SW-1:0]     src_q   [N_DELAY];
  logic [DW-1:0]     dly_q   [N_DELAY];
  fault_t            fmode_q [N_DELAY];
  logic [7:0]        frate_q [N_DELAY];
  logic [MW*32-1:0]  mask_q  [N_TAP];
  tap_cfg_t          tap_q   [N_PORTS];
  logic              sync;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < N_DELAY; i++) begin
        src_q[i]   <= '0;
        dly_q[i]   <= '0;
        fmode_q[i] <= FLT_NONE;
        frate_q[i] <= '0;
      end
      for (int o = 0; o < N_TAP; o++)   mask_q[o] <= '0;
      for (int p = 0; p < N_PORTS; p++) tap_q[p]  <= '0;
    end else if (cfg_we) begin
      for (int i = 0; i < N_DELAY; i++) begin
        if (cfg_addr == 12'(32'h000 + i)) src_q[i] <= cfg_wdata[SW-1:0];
        if (cfg_addr == 12'(32'h040 + i)) dly_q[i] <= cfg_wdata[DW-1:0];
        if (cfg_addr == 12'(32'h080 + i)) begin
          fmode_q[i] <= fault_t'(cfg_wdata[2:0]);
          frate_q[i] <= cfg_wdata[15:8];
        end
      end
      for (int o = 0; o < N_TAP; o++)
        for (int w = 0; w < MW; w++)
          if (cfg_addr == 12'(32'h100 + 2*o + w)) mask_q[o][32*w +: 32] <= cfg_wdata;
      for (int p = 0; p < N_PORTS; p++)
        if (cfg_addr == 12'(32'h180 + p)) tap_q[p] <= tap_cfg_t'(cfg_wdata[$bits(tap_cfg_t)-1:0]);
    end

  assign sync = cfg_we && (cfg_addr == 12'h1FF);

  // fabric
  sym_t            tap_out  [N_TAP];
  sym_t            tap_in   [N_TAP];
  sym_t            dly_in   [N_DELAY];
  sym_t            dly_out  [N_DELAY];
  sym_t            flt_out  [N_DELAY];
  logic [N_DELAY-1:0] mask  [N_TAP];
  logic            gt_clock, gt_reset;

  ce_global_time #(.DIV(GT_DIV)) u_gt (
    .clk, .rst_n, .sync, .gt_clock, .gt_reset
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_tap
    sym_t from_f [2];
    sym_t to_f   [2];
    assign from_f[0] = tap_in[2*p];
    assign from_f[1] = tap_in[2*p+1];
    assign tap_out[2*p]   = to_f[0];
    assign tap_out[2*p+1] = to_f[1];
    ce_tap_block u_tap (
      .cfg(tap_q[p]), .node_tx(node_tx[p]), .from_fabric(from_f), .to_fabric(to_f),
      .gt_clock, .gt_reset, .node_rx(node_rx[p])
    );
  end

  ce_mux_array #(.N_IN(N_TAP), .N_OUT(N_DELAY)) u_mux (
    .din(tap_out), .sel(src_q), .dout(dly_in)
  );

  for (genvar i = 0; i < N_DELAY; i++) begin : g_cell
    ce_delay_cell #(.DEPTH(DEPTH)) u_dly (
      .clk, .rst_n, .delay(dly_q[i]), .din(dly_in[i]), .dout(dly_out[i])
    );
    ce_fault_injector #(.SEED(16'hACE1 ^ 16'(i * 40503))) u_flt (
      .clk, .rst_n, .mode(fmode_q[i]), .rate(frate_q[i]), .din(dly_out[i]), .dout(flt_out[i])
    );
  end

  for (genvar o = 0; o < N_TAP; o++) begin : g_mask
    assign mask[o] = mask_q[o][N_DELAY-1:0];
  end

  ce_masked_or #(.N_IN(N_DELAY), .N_OUT(N_TAP)) u_mor (
    .din(flt_out), .mask(mask), .dout(tap_in)
  );

endmodule
