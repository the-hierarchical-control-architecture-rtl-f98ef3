// dab_psm: single phase-shift modulator for the dual-active-bridge converter.
//
// A counter over one switching period (2*HALF_PERIOD clocks) gives a 50%
// square wave for the primary bridge: leg 1 (S1/S2) is on in the first half,
// leg 2 (S3/S4) is its inverse, so S1/S4 and S2/S3 conduct together. The
// secondary bridge (legs S5/S6 and S7/S8) gets the same square wave delayed
// by `phase` clocks; a positive phase (secondary lagging) sends power from
// the battery side to the DC link, a negative one sends it back. `phase` is
// sampled once per period and changes only at the start of the primary
// first half. Outputs are leg commands; dead zones are
// added by dead_time. Phase-shift control of the DAB follows the published
// design; single phase shift, the period (default 6000 clocks, 20 kHz at
// 120 MHz) and the phase range +-HALF_PERIOD/2 are this design's choice.
module dab_psm #(
  parameter int unsigned HALF_PERIOD = 3000,
  parameter int unsigned PH_W        = 13
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [PH_W-1:0] phase,
  output logic [1:0]             pri_leg,   // [0] S1 upper of leg1, [1] S3 upper of leg2
  output logic [1:0]             sec_leg    // [0] S5 upper, [1] S7 upper
);
  localparam int unsigned PERIOD = 2 * HALF_PERIOD;
  localparam int unsigned CW     = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  int            ph_q;       // clamped phase, held for one period
  int            p, sp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      ph_q <= 0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(PERIOD - 1)) begin
        if (int'(phase) > int'(HALF_PERIOD / 2))       ph_q <= int'(HALF_PERIOD / 2);
        else if (int'(phase) < -int'(HALF_PERIOD / 2)) ph_q <= -int'(HALF_PERIOD / 2);
        else                                           ph_q <= int'(phase);
      end
    end
  end

  always_comb begin
    p  = int'(cnt);
    sp = p - ph_q;
    if (sp < 0)               sp += int'(PERIOD);
    if (sp >= int'(PERIOD))   sp -= int'(PERIOD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pri_leg <= 2'b00;
      sec_leg <= 2'b00;
    end else begin
      pri_leg[0] <= p  < int'(HALF_PERIOD);
      pri_leg[1] <= !(p < int'(HALF_PERIOD));
      sec_leg[0] <= sp < int'(HALF_PERIOD);
      sec_leg[1] <= !(sp < int'(HALF_PERIOD));
    end
  end
endmodule
