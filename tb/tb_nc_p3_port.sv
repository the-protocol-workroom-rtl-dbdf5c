// tb_nc_p3_port: three ports share one P3 bus.  Port 0 puts its transceiver
// bit of slot 2 and bit 5 of its message-RAM byte on the bus; port 1 takes
// bus bit 2 (port 0, slot 2) into its transceiver stream in slot 4, a
// circuit-switched 1.25 Mb/s channel with time-slot interchange; port 2
// takes bus bit 5 into its RAM byte, bit 0.  Port 1 also sends its slot 7 to
// port 0's slot 1 (the other direction).  Every frame's bits are checked
// against the frame they were sent in: exactly one frame of latency.
//
// The rules checked are those of the block as documented in its own header
// (the source design's behaviour plus this design's stated choices); the
// stimulus, sizes and reference model are this testbench's own.
module tb_nc_p3_port;
  import pw_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  p3_route_t txr [N][8];
  p3_route_t rxr [N][8];
  logic [4:0] sel [N][8];
  logic [7:0] ram_tx [N];
  sym_t xin [N];
  sym_t xout [N];
  logic [7:0] ram_rx [N];
  logic ram_v [N];
  logic [2:0] slot [N];
  logic [7:0] lane [N];
  logic [23:0] bus;
  logic s02 [2000];   // port 0 bit sent in slot 2 of frame f
  logic s17 [2000];   // port 1 bit sent in slot 7 of frame f
  logic [7:0] rb [2000];
  int checks = 0, failures = 0, cyc = 0, f;

  assign bus = {lane[2], lane[1], lane[0]};
  for (genvar p = 0; p < N; p++) begin : g_p
    nc_p3_port #(.NCTL(N)) dut (
      .clk, .rst_n, .tx_route(txr[p]), .rx_route(rxr[p]), .rx_sel(sel[p]),
      .ram_tx_byte(ram_tx[p]), .xcvr_in(xin[p]), .xcvr_out(xout[p]),
      .ram_rx_byte(ram_rx[p]), .ram_rx_valid(ram_v[p]), .slot(slot[p]),
      .lane_out(lane[p]), .bus_in(bus)
    );
  end

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++)
      for (int j = 0; j < 8; j++) begin txr[p][j] = P3_IGNORE; rxr[p][j] = P3_IGNORE; sel[p][j] = 0; end
    txr[0][2] = P3_XCVR; txr[0][5] = P3_RAM;
    rxr[1][4] = P3_XCVR; sel[1][4] = 5'd2;
    rxr[2][0] = P3_RAM;  sel[2][0] = 5'd5;
    txr[1][7] = P3_XCVR;
    rxr[0][1] = P3_XCVR; sel[0][1] = 5'd15;
    for (int p = 0; p < N; p++) begin ram_tx[p] = 0; xin[p] = SYM_IDLE; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 1600; cyc++) begin
      f = cyc / 8;
      // inputs for this clock
      xin[0] = '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom)};
      xin[1] = '{timing: 1'b1, carrier: 1'b1, cv: 1'b0, data: 1'($urandom)};
      if (cyc % 8 == 0) begin ram_tx[0] = 8'($urandom); rb[f] = ram_tx[0]; end
      if (cyc % 8 == 2) s02[f] = xin[0].data;
      if (cyc % 8 == 7) s17[f] = xin[1].data;
      @(posedge clk); #1;
      checks++;
      if (slot[0] !== 3'((cyc + 1) % 8)) failures++;
      // outputs registered in slot (cyc % 8)
      if (f >= 1) begin
        if (cyc % 8 == 4) begin
          checks++;
          if (xout[1].timing !== 1'b1 || xout[1].data !== s02[f - 1]) begin
            failures++;
            if (failures < 5) $display("cyc %0d: port1 got %b want %b", cyc, xout[1].data, s02[f - 1]);
          end
        end else begin
          checks++;
          if (xout[1].timing !== 1'b0 || xout[1].carrier !== 1'b1) failures++;
        end
        if (cyc % 8 == 1) begin
          checks++;
          if (xout[0].data !== s17[f - 1]) failures++;
        end
        if (cyc % 8 == 7) begin
          checks++;
          if (ram_v[2] !== 1'b1 || ram_rx[2] !== {7'h0, rb[f - 1][5]}) failures++;
        end
      end
      checks++;
      if (xout[2].carrier !== 1'b0) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
