// tb_dead_time: checks the dead zone of one leg.
//
// A random command sequence drives the leg. A reference counts the clocks
// since the last command change: the requested switch must be on exactly
// when the command has been stable for more than DEAD_CLKS clocks, the other
// one off; both must never be on together, and `en` low must turn both off
// in the same clock.
module tb_dead_time;
  localparam int D = 5;

  logic clk = 0, rst_n = 0, en = 1, cmd = 0;
  logic gate_hi, gate_lo;
  int checks = 0, failures = 0;
  int stable;    // clocks since cmd last changed, as seen at the clock edge
  logic prev;

  dead_time #(.DEAD_CLKS(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin stable <= 0; prev <= 0; end
    else begin
      prev   <= cmd;
      stable <= (cmd != prev) ? 0 : stable + 1;
    end
  end

  initial begin
    int exp_hi, exp_lo, runs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    runs = 0;
    for (int i = 0; i < 3000; i++) begin
      // hold for 1..12 clocks, sometimes shorter than the dead zone
      if ($urandom_range(0, 9) == 0) cmd = ~cmd;
      en = ($urandom_range(0, 49) != 0);
      #1;
      exp_hi = en && (stable >= D - 1) && prev == 1 && cmd == prev;
      exp_lo = en && (stable >= D - 1) && prev == 0 && cmd == prev;
      @(negedge clk);
      check(!(gate_hi && gate_lo), "no shoot-through");
      check(gate_hi == exp_hi && gate_lo == exp_lo,
            $sformatf("t=%0d cmd=%0d en=%0d stable=%0d hi=%0d lo=%0d", i, cmd, en, stable, gate_hi, gate_lo));
      runs += (gate_hi || gate_lo);
    end
    check(runs > 500, "gates were on for a good part of the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
