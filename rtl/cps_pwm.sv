// cps_pwm: carrier phase-shift PWM for the H-bridge cells of one phase.
//
// A counter running over one carrier period (2*CARRIER_HALF clocks) gives
// N_CELLS symmetric triangular carriers, the carrier of cell k delayed by
// k*CARRIER_HALF/N_CELLS clocks (k/(2n) of a period). Each cell uses unipolar
// modulation: the left leg is on while (CARRIER_HALF + m)/2 is above the
// carrier, the right leg while (CARRIER_HALF - m)/2 is above it. m = 0 gives
// 50% duty on both legs. Outputs are registered, one clock after the compare.
//
// Comparing a modulation wave with triangular carriers and phase-shifting
// the carriers of the cascaded cells follows the published design; the shift
// of 1/(2n) period and the unipolar leg mapping are this design's choice. The
// default CARRIER_HALF = 30000 gives the 2 kHz carrier at a 120 MHz clock.
module cps_pwm #(
  parameter int unsigned N_CELLS      = 4,
  parameter int unsigned CARRIER_HALF = 30000,
  parameter int unsigned MOD_W        = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [MOD_W-1:0] modulation,   // full scale +-CARRIER_HALF
  output logic [N_CELLS-1:0]      leg_a,
  output logic [N_CELLS-1:0]      leg_b
);
  localparam int unsigned PERIOD = 2 * CARRIER_HALF;
  localparam int unsigned CW     = $clog2(PERIOD);

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= (phase == CW'(PERIOD - 1)) ? '0 : phase + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg_a <= '0;
      leg_b <= '0;
    end else begin
      for (int k = 0; k < N_CELLS; k++) begin
        int p, tri_v, m;
        p = int'(phase) + int'(PERIOD) - (k * int'(CARRIER_HALF)) / int'(N_CELLS);
        if (p >= int'(PERIOD)) p -= int'(PERIOD);
        tri_v = (p < int'(CARRIER_HALF)) ? p : int'(PERIOD) - p;
        m     = int'(modulation);
        leg_a[k] <= (int'(CARRIER_HALF) + m) > 2 * tri_v;
        leg_b[k] <= (int'(CARRIER_HALF) - m) > 2 * tri_v;
      end
    end
  end
endmodule
