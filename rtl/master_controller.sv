// master_controller: top control layer of the cascaded storage converter.
//
// Three cps_pwm units turn the per-phase modulation waves into the leg
// states of all N_CELLS H-bridge cells of each phase. Every WINDOW_CLKS
// clocks (the packet cycle tau_s, 1596 clocks = 13.3 us at 120 MHz) the
// current leg states are sampled into one command packet per phase, data
// frame k carrying the cmd_t byte of sub controller k, and the three packets
// leave on the three fiber links to the valve controllers in the same clock.
// Status packets coming back from each valve update `status`, frame k being
// the status_t byte of sub controller k of that phase.
//
// The published design generates the modulation wave and the PWM in the
// master and ships the PWM in packets; the closed-loop algorithm and AC-side
// sampling that produce the modulation waves are not described and are
// inputs here. The byte layouts and the shared window of the three phases are
// this design's choice.
//
// Test-pulse mode: with `test_pulse` high every cell of a phase is sent the
// legs of cell 0, so all bridges of the phase should switch together. This
// is how the link delays within and between phases are measured (the same
// pulse sent to all cascaded bridges of each phase).
module master_controller
  import pcs_pkg::*;
#(
  parameter int unsigned N_CELLS      = 4,
  parameter int unsigned N_FRAMES     = 14,
  parameter int unsigned BIT_CLKS     = 8,
  parameter int unsigned WINDOW_CLKS  = 1596,
  parameter int unsigned CARRIER_HALF = 30000,
  parameter int unsigned MOD_W        = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [MOD_W-1:0] modulation [3],
  input  logic                    run,
  input  logic                    fault_reset,
  input  logic                    test_pulse,
  output logic [2:0]              tx,
  input  logic [2:0]              rx,
  output logic [N_CELLS-1:0]      leg_a [3],
  output logic [N_CELLS-1:0]      leg_b [3],
  output logic                    window_tick,
  output status_t                 status [3][N_CELLS],
  output logic                    any_fault
);
  localparam int unsigned WW = $clog2(WINDOW_CLKS);

  logic [WW-1:0] win;
  assign window_tick = (win == WW'(WINDOW_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win <= '0;
    else        win <= window_tick ? '0 : win + 1'b1;
  end

  for (genvar ph = 0; ph < 3; ph++) begin : g_phase
    logic [N_FRAMES-1:0][7:0] tx_data, rx_data;
    logic                     rx_valid;

    cps_pwm #(.N_CELLS(N_CELLS), .CARRIER_HALF(CARRIER_HALF), .MOD_W(MOD_W)) u_pwm (
      .clk, .rst_n, .modulation(modulation[ph]), .leg_a(leg_a[ph]), .leg_b(leg_b[ph])
    );

    always_comb begin
      tx_data = '0;
      for (int k = 0; k < N_CELLS; k++) begin
        cmd_t c;
        c             = '0;
        c.leg_a       = test_pulse ? leg_a[ph][0] : leg_a[ph][k];
        c.leg_b       = test_pulse ? leg_b[ph][0] : leg_b[ph][k];
        c.run         = run;
        c.fault_reset = fault_reset;
        tx_data[k]    = c;
      end
    end

    packet_tx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_tx (
      .clk, .rst_n, .start(window_tick), .data(tx_data), .txd(tx[ph]), .busy(), .done()
    );

    packet_rx #(.N_FRAMES(N_FRAMES), .BIT_CLKS(BIT_CLKS)) u_rx (
      .clk, .rst_n, .rxd(rx[ph]), .data(rx_data), .pkt_valid(rx_valid),
      .parity_err(), .crc_err()
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < N_CELLS; k++) status[ph][k] <= '0;
      end else if (rx_valid) begin
        for (int k = 0; k < N_CELLS; k++) status[ph][k] <= status_t'(rx_data[k]);
      end
    end
  end

  always_comb begin
    any_fault = 1'b0;
    for (int ph = 0; ph < 3; ph++)
      for (int k = 0; k < N_CELLS; k++) any_fault |= status[ph][k].fault;
  end

  initial assert (N_CELLS <= N_FRAMES) else $error("N_CELLS must not exceed N_FRAMES");
  initial assert (WINDOW_CLKS > (N_FRAMES + 1) * FRAME_BITS * BIT_CLKS)
    else $error("packet does not fit in the packet cycle");
endmodule
