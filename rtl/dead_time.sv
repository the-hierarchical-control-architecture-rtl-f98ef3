// dead_time: complementary gate pair with a dead zone for one bridge leg.
//
// `cmd` = 1 asks for the upper switch, 0 for the lower one. After every
// change of `cmd` both gates are held off for DEAD_CLKS clocks before the
// newly requested switch is turned on, so the two switches of a leg are never
// on together. A change back inside the dead zone restarts it. `en` = 0 turns
// both gates off in the same clock (combinationally), for fast protection.
// Outputs of the dead-zone logic are registered: with `en` high both gates
// are off for DEAD_CLKS clocks and the new switch turns on in the clock after.
// Adding a dead zone in the sub controller is the published design; its
// length (default 240 clocks, 2 us at 120 MHz) is this design's choice.
module dead_time #(
  parameter int unsigned DEAD_CLKS = 240
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic cmd,
  output logic gate_hi,
  output logic gate_lo
);
  logic                            cmd_q;
  logic [$clog2(DEAD_CLKS+1)-1:0]  cnt;
  logic                            hi_q, lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q <= 1'b0;
      cnt   <= ($clog2(DEAD_CLKS+1))'(DEAD_CLKS - 1);
      hi_q  <= 1'b0;
      lo_q  <= 1'b0;
    end else if (cmd != cmd_q) begin
      cmd_q <= cmd;
      cnt   <= ($clog2(DEAD_CLKS+1))'(DEAD_CLKS - 1);
      hi_q  <= 1'b0;
      lo_q  <= 1'b0;
    end else if (cnt != 0) begin
      cnt   <= cnt - 1'b1;
    end else begin
      hi_q  <= cmd_q;
      lo_q  <= !cmd_q;
    end
  end

  assign gate_hi = en && hi_q;
  assign gate_lo = en && lo_q;

  // The two switches of one leg must never conduct together.
  assert property (@(posedge clk) disable iff (!rst_n) !(gate_hi && gate_lo));
endmodule
