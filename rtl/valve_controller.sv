// valve_controller: middle control layer, one per phase.
//
// Command packets from the master are checked (parity and CRC) by
// packet_rx; the last good one is held. The valve runs its own packet cycle
// of WINDOW_CLKS clocks, not synchronised to the master (WINDOW_OFFSET sets
// the counter's value at reset). At each of its window ticks it sends the held
// command packet through a single packet_tx whose line drives all N_CELLS
// links to the sub controllers, so all cells of a phase receive the same
// bits in the same clock and each picks its own frame. In the same tick it
// sends the master a status packet whose frame k is the last good status
// byte received from sub controller k.
//
// Fanning one packet out to all cells of the phase, and the free-running
// packet cycle of each controller, follow the published design (they give
// zero delay between cells of a phase and up to one packet cycle between
// phases). Holding the last good packet and the status packet layout are this
// design's choice.
module valve_controller
  import pcs_pkg::*;
#(
  parameter int unsigned N_CELLS       = 4,
  parameter int unsigned N_FRAMES      = 14,
  parameter int unsigned BIT_CLKS      = 8,
  parameter int unsigned WINDOW_CLKS   = 1596,
  parameter int unsigned WINDOW_OFFSET = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rx_master,
  output logic               tx_master,
  output logic [N_CELLS-1:0] tx_sub,
  input  logic [N_CELLS-1:0] rx_sub,
  output logic               window_tick,
  output logic               cmd_valid,     // a good master packet arrived
  output logic               cmd_err        // a bad master packet was dropped
);
  localparam int unsigned WW = $clog2(WINDOW_CLKS);

  logic [WW-1:0]            win;
  logic [N_FRAMES-1:0][7:0] cmd_data, up_data;
  logic                     down_txd, par_err, crc_err;
  logic [7:0]               sub_status [N_CELLS];

  assign window_tick = (win == WW'(WINDOW_CLKS - 1));
  assign cmd_err     = par_err || crc_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win <= WW'(WINDOW_OFFSET % WINDOW_CLKS);
    else        win <= window_tick ? '0 : win + 1'b1;
  end

  packet_rx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_rx_master (
    .clk, .rst_n, .rxd(rx_master), .data(cmd_data), .pkt_valid(cmd_valid),
    .parity_err(par_err), .crc_err(crc_err)
  );

  packet_tx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_tx_sub (
    .clk, .rst_n, .start(window_tick), .data(cmd_data), .txd(down_txd), .busy(), .done()
  );
  assign tx_sub = {N_CELLS{down_txd}};

  for (genvar k = 0; k < N_CELLS; k++) begin : g_sub
    logic [N_FRAMES-1:0][7:0] d;
    logic                     v;
    packet_rx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_rx_sub (
      .clk, .rst_n, .rxd(rx_sub[k]), .data(d), .pkt_valid(v), .parity_err(), .crc_err()
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sub_status[k] <= '0;
      else if (v) sub_status[k] <= d[0];
    end
  end

  always_comb begin
    up_data = '0;
    for (int k = 0; k < N_CELLS; k++) up_data[k] = sub_status[k];
  end

  packet_tx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_tx_master (
    .clk, .rst_n, .start(window_tick), .data(up_data), .txd(tx_master), .busy(), .done()
  );

  initial assert (N_CELLS <= N_FRAMES) else $error("N_CELLS must not exceed N_FRAMES");
endmodule
