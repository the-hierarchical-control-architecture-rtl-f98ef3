// tb_dab_psm: checks the DAB single phase-shift modulator.
//
// With HALF_PERIOD = 50 the primary legs must be complementary 50% square
// waves of period 100 clocks, and the secondary leg 1 must equal the primary
// leg 1 delayed by the requested phase (a negative phase is a lead). A
// phase beyond +-HALF_PERIOD/2 must be clamped to that limit.
module tb_dab_psm;
  localparam int H = 50, P = 2 * H;

  logic clk = 0, rst_n = 0;
  logic signed [12:0] phase = 0;
  logic [1:0] pri_leg, sec_leg;
  int checks = 0, failures = 0;

  dab_psm #(.HALF_PERIOD(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int phs [5] = '{10, -10, 0, 40, -37};
    int expv [5] = '{10, -10, 0, 25, -25};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (phs[i]) begin
      logic [1:0] hp [$], hs [$];
      int hi, bad_shift, bad_comp;
      phase = 13'(phs[i]);
      repeat (2 * P + 5) @(negedge clk);
      hi = 0; bad_shift = 0; bad_comp = 0; hp.delete(); hs.delete();
      for (int t = 0; t < P; t++) begin
        hp.push_back(pri_leg); hs.push_back(sec_leg);
        hi += pri_leg[0];
        @(negedge clk);
      end
      for (int t = 0; t < P; t++) begin
        if (hs[t][0] != hp[(t - expv[i] + 2 * P) % P][0]) bad_shift++;
        if (hp[t][1] == hp[t][0] || hs[t][1] == hs[t][0]) bad_comp++;
      end
      check(hi == H, $sformatf("phase %0d: primary duty %0d/%0d", phs[i], hi, P));
      check(bad_shift == 0, $sformatf("phase %0d: %0d clocks off the %0d shift", phs[i], bad_shift, expv[i]));
      check(bad_comp == 0, $sformatf("phase %0d: legs not complementary", phs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
