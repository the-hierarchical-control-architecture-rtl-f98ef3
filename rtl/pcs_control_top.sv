// pcs_control_top: three-layer control system of a three-phase cascaded
// battery energy-storage converter.
//
// One master controller, three valve controllers (phases A, B, C) and
// 3*N_CELLS sub controllers, joined by point-to-point serial links (the
// optical fibers, here plain wires). Master -> valve -> sub carries the CHB
// PWM as command packets; sub -> valve -> master carries status bytes. Each
// valve and sub controller runs its own packet cycle; VALVE_OFFSET and
// SUB_OFFSET set where in the cycle each one starts after reset, standing in
// for the unsynchronised start of separate boards. A command reaches the
// bridges of one phase at the same clock for all its cells, and between
// 2 and about 3 packet cycles after the master sampled it, depending on the
// valve's phase.
//
// `gate[ph][k][i-1]` drives switch Si of cell k of phase ph (S1..S8 DAB,
// S9..S12 CHB). `test_pulse` sends every cell of a phase the PWM of its
// first cell, for measuring link delays. `status` is the master's view of every cell's status byte.
// `cell_cmd` and `cell_pkt_valid` show the command each cell applies and the
// clock in which it received a good packet, for observing link timing.
module pcs_control_top
  import pcs_pkg::*;
#(
  parameter int unsigned N_CELLS         = 4,
  parameter int unsigned N_FRAMES        = 14,
  parameter int unsigned BIT_CLKS        = 8,
  parameter int unsigned WINDOW_CLKS     = 1596,
  parameter int unsigned CARRIER_HALF    = 30000,
  parameter int unsigned DEAD_CLKS       = 240,
  parameter int unsigned DAB_HALF_PERIOD = 3000,
  parameter int unsigned MOD_W           = 17,
  parameter int unsigned PH_W            = 13,
  parameter int unsigned VALVE_OFFSET [3] = '{0, 700, 1400},
  parameter int unsigned SUB_OFFSET       = 97
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [MOD_W-1:0] modulation [3],
  input  logic                    run,
  input  logic                    fault_reset,
  input  logic                    test_pulse,
  input  logic signed [PH_W-1:0]  dab_phase [3][N_CELLS],
  input  logic [N_CELLS-1:0]      fault_oc [3],
  input  logic [N_CELLS-1:0]      fault_ov [3],
  output logic [11:0]             gate [3][N_CELLS],
  output logic [N_CELLS-1:0]      pwm_leg_a [3],
  output logic [N_CELLS-1:0]      pwm_leg_b [3],
  output status_t                 status [3][N_CELLS],
  output logic                    any_fault,
  output logic                    master_tick,
  output logic [2:0]              valve_tick,
  output logic [2:0]              valve_cmd_valid,
  output cmd_t                    cell_cmd [3][N_CELLS],
  output logic [N_CELLS-1:0]      cell_pkt_valid [3]
);
  logic [2:0] m_tx, m_rx;

  master_controller #(
    .N_CELLS(N_CELLS), .N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS),
    .WINDOW_CLKS(WINDOW_CLKS), .CARRIER_HALF(CARRIER_HALF), .MOD_W(MOD_W)
  ) u_master (
    .clk, .rst_n, .modulation, .run, .fault_reset, .test_pulse, .tx(m_tx), .rx(m_rx),
    .leg_a(pwm_leg_a), .leg_b(pwm_leg_b), .window_tick(master_tick), .status, .any_fault
  );

  for (genvar ph = 0; ph < 3; ph++) begin : g_phase
    logic [N_CELLS-1:0] down, up;

    valve_controller #(
      .N_CELLS(N_CELLS), .N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS),
      .WINDOW_CLKS(WINDOW_CLKS), .WINDOW_OFFSET(VALVE_OFFSET[ph])
    ) u_valve (
      .clk, .rst_n, .rx_master(m_tx[ph]), .tx_master(m_rx[ph]), .tx_sub(down), .rx_sub(up),
      .window_tick(valve_tick[ph]), .cmd_valid(valve_cmd_valid[ph]), .cmd_err()
    );

    for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
      sub_controller #(
        .CELL_ID(k), .N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS), .WINDOW_CLKS(WINDOW_CLKS),
        .WINDOW_OFFSET(SUB_OFFSET * (ph * N_CELLS + k + 1)), .DEAD_CLKS(DEAD_CLKS),
        .DAB_HALF_PERIOD(DAB_HALF_PERIOD), .PH_W(PH_W)
      ) u_sub (
        .clk, .rst_n, .rxd(down[k]), .txd(up[k]), .dab_phase(dab_phase[ph][k]),
        .fault_oc(fault_oc[ph][k]), .fault_ov(fault_ov[ph][k]), .gate(gate[ph][k]),
        .cmd(cell_cmd[ph][k]), .pkt_valid(cell_pkt_valid[ph][k]), .status()
      );
    end
  end
endmodule
