// protocol_workroom_top: the experimental network of the protocol research
// facility: N_NODES network controllers, each on one port of the channel
// emulator, with every group of NCTL controllers sharing one P3 bus so that
// the group can act as one multi-port node emulator.
//
// The processors of the facility are outside this design: each controller's
// 68020 register port and host (P2) dual-port RAM port, and the channel
// emulator's configuration port (written by the cluster's host computer), are
// brought out as ports.  A P3 bus is the concatenation of its controllers'
// byte lanes.  With every P3 slot left unrouted (the reset state) the
// controllers behave as independent single-port nodes.
// Defaults: 32 nodes, 64 delay cells of 1024 steps, P3 groups of 8.
//
// Lint note: rst_n is reported as used both synchronously and
// asynchronously; the synchronous use is only the disable condition of the
// event FIFO's occupancy assertion, every flop resets asynchronously.
module protocol_workroom_top
  import pw_pkg::*;
#(
  parameter int N_NODES   = 32,
  parameter int NCTL      = 8,
  parameter int N_DELAY   = 2 * N_NODES,
  parameter int DEPTH     = 1024,
  parameter int RAM_WORDS = 8192,
  parameter int GT_DIV    = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // channel emulator configuration (host computer)
  input  logic                         ce_cfg_we,
  input  logic [11:0]                  ce_cfg_addr,
  input  logic [31:0]                  ce_cfg_wdata,
  // one 68020 register port per controller
  input  logic                         cpu_we    [N_NODES],
  input  logic [8:0]                   cpu_addr  [N_NODES],
  input  logic [31:0]                  cpu_wdata [N_NODES],
  output logic [31:0]                  cpu_rdata [N_NODES],
  output logic                         cpu_irq   [N_NODES],
  // one host (P2) RAM port per controller
  input  logic                         hp_en     [N_NODES],
  input  logic                         hp_we     [N_NODES],
  input  logic [$clog2(RAM_WORDS)-1:0] hp_addr   [N_NODES],
  input  logic [7:0]                   hp_wdata  [N_NODES],
  output logic [7:0]                   hp_rdata  [N_NODES],
  // node port signals, for observation
  output node_tx_t                     port_tx   [N_NODES],
  output node_rx_t                     port_rx   [N_NODES]
);
  localparam int NGRP = (N_NODES + NCTL - 1) / NCTL;

  logic [7:0]        lane [NGRP*NCTL];
  logic [8*NCTL-1:0] p3   [NGRP];

  for (genvar g = 0; g < NGRP; g++) begin : g_p3
    for (genvar k = 0; k < NCTL; k++) begin : g_lane
      assign p3[g][8*k +: 8] = lane[g*NCTL + k];
    end
  end

  // lanes of controller positions beyond N_NODES stay quiet
  for (genvar n = N_NODES; n < NGRP*NCTL; n++) begin : g_pad
    assign lane[n] = '0;
  end

  channel_emulator #(.N_PORTS(N_NODES), .N_DELAY(N_DELAY), .DEPTH(DEPTH), .GT_DIV(GT_DIV)) u_ce (
    .clk, .rst_n, .cfg_we(ce_cfg_we), .cfg_addr(ce_cfg_addr), .cfg_wdata(ce_cfg_wdata),
    .node_tx(port_tx), .node_rx(port_rx)
  );

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    network_controller #(.RAM_WORDS(RAM_WORDS), .NCTL(NCTL)) u_nc (
      .clk, .rst_n,
      .cpu_we(cpu_we[n]), .cpu_addr(cpu_addr[n]), .cpu_wdata(cpu_wdata[n]),
      .cpu_rdata(cpu_rdata[n]), .cpu_irq(cpu_irq[n]),
      .hp_en(hp_en[n]), .hp_we(hp_we[n]), .hp_addr(hp_addr[n]), .hp_wdata(hp_wdata[n]),
      .hp_rdata(hp_rdata[n]),
      .node_tx(port_tx[n]), .node_rx(port_rx[n]),
      .p3_lane(lane[n]), .p3_bus(p3[n / NCTL])
    );
  end
endmodule
