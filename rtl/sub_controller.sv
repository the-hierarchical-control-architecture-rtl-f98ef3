// sub_controller: bottom control layer, one per standard cascaded unit.
//
// Command packets from the valve controller are checked by packet_rx; the
// cell uses data frame CELL_ID of the last good packet as its cmd_t. The two
// CHB leg commands go through dead_time to the gates S9/S10 (left leg) and
// S11/S12 (right leg); they change one clock after a good packet ends, so the
// bridge follows a copy of the master's PWM sampled once per packet cycle.
// The DAB is driven by dab_psm through four more dead_time units (S1..S8)
// with the phase shift given on `dab_phase`. local_protection blocks all
// twelve gates at once on over-current, over-voltage or link loss. Every
// WINDOW_CLKS clocks (counter preset to WINDOW_OFFSET at reset) the cell sends
// its status byte (frame 0) and CELL_ID (frame 1) to the valve controller.
// gate[i-1] drives switch Si of the unit; pkt_valid marks a good packet.
//
// The four duties (local DAB control, CHB PWM with dead zone, status and fault
// upload, fast local protection) are the published ones; the DAB control law
// is not described, so the phase is an input, and the byte layouts and
// protection rules are this design's choice.
module sub_controller
  import pcs_pkg::*;
#(
  parameter int unsigned CELL_ID         = 0,
  parameter int unsigned N_FRAMES        = 14,
  parameter int unsigned BIT_CLKS        = 8,
  parameter int unsigned WINDOW_CLKS     = 1596,
  parameter int unsigned WINDOW_OFFSET   = 0,
  parameter int unsigned DEAD_CLKS       = 240,
  parameter int unsigned DAB_HALF_PERIOD = 3000,
  parameter int unsigned PH_W            = 13,
  parameter int unsigned COMM_TIMEOUT    = 3 * WINDOW_CLKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rxd,
  output logic                   txd,
  input  logic signed [PH_W-1:0] dab_phase,
  input  logic                   fault_oc,
  input  logic                   fault_ov,
  output logic [11:0]            gate,
  output cmd_t                   cmd,
  output logic                   pkt_valid,
  output status_t                status
);
  localparam int unsigned WW = $clog2(WINDOW_CLKS);

  logic [N_FRAMES-1:0][7:0] rx_data, tx_data;
  logic                     gate_en, tick;
  logic [1:0]               pri_leg, sec_leg;
  logic [WW-1:0]            win;

  packet_rx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .pkt_valid, .parity_err(), .crc_err()
  );
  assign cmd = cmd_t'(rx_data[CELL_ID]);

  local_protection #(.COMM_TIMEOUT(COMM_TIMEOUT)) u_prot (
    .clk, .rst_n, .fault_oc, .fault_ov, .pkt_valid, .fault_reset(cmd.fault_reset),
    .run(cmd.run), .gate_en, .status
  );

  // CHB legs: S9/S10 and S11/S12.
  dead_time #(.DEAD_CLKS(DEAD_CLKS)) u_dt_a (
    .clk, .rst_n, .en(gate_en), .cmd(cmd.leg_a), .gate_hi(gate[8]), .gate_lo(gate[9])
  );
  dead_time #(.DEAD_CLKS(DEAD_CLKS)) u_dt_b (
    .clk, .rst_n, .en(gate_en), .cmd(cmd.leg_b), .gate_hi(gate[10]), .gate_lo(gate[11])
  );

  // DAB: primary S1..S4, secondary S5..S8.
  dab_psm #(.HALF_PERIOD(DAB_HALF_PERIOD), .PH_W(PH_W)) u_dab (
    .clk, .rst_n, .phase(dab_phase), .pri_leg, .sec_leg
  );
  for (genvar l = 0; l < 4; l++) begin : g_dab_leg
    logic leg_cmd;
    assign leg_cmd = (l < 2) ? pri_leg[l % 2] : sec_leg[l % 2];
    dead_time #(.DEAD_CLKS(DEAD_CLKS)) u_dt (
      .clk, .rst_n, .en(gate_en), .cmd(leg_cmd), .gate_hi(gate[2*l]), .gate_lo(gate[2*l+1])
    );
  end

  // Status upload.
  assign tick = (win == WW'(WINDOW_CLKS - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win <= WW'(WINDOW_OFFSET % WINDOW_CLKS);
    else        win <= tick ? '0 : win + 1'b1;
  end
  always_comb begin
    tx_data    = '0;
    tx_data[0] = status;
    tx_data[1] = 8'(CELL_ID);
  end
  packet_tx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_tx (
    .clk, .rst_n, .start(tick), .data(tx_data), .txd, .busy(), .done()
  );

  initial assert (CELL_ID < N_FRAMES) else $error("CELL_ID must be below N_FRAMES");
endmodule
