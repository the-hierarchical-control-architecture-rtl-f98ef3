// tb_cps_pwm: checks duty and carrier phase shift of cps_pwm.
//
// With a small carrier (CARRIER_HALF = 60) the number of high clocks per
// carrier period of each leg is compared with a count worked out from the
// triangle's values, for several modulation values including 0 (50% duty).
// Cell k's leg waveform must equal cell 0's delayed by k*CARRIER_HALF/N_CELLS
// clocks, and the right leg must use the mirrored reference.
module tb_cps_pwm;
  localparam int NC = 4, H = 60, P = 2 * H;

  logic clk = 0, rst_n = 0;
  logic signed [16:0] modulation = 0;
  logic [NC-1:0] leg_a, leg_b;
  int checks = 0, failures = 0;
  logic [NC-1:0] hist_a [$];

  cps_pwm #(.N_CELLS(NC), .CARRIER_HALF(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // high clocks per period for a reference level v (compare v > 2*tri)
  function automatic int exp_high(input int v);
    int n;
    n = 0;
    for (int t = 0; t <= H; t++) if (v > 2 * t) n += (t == 0 || t == H) ? 1 : 2;
    return n;
  endfunction

  initial begin
    int ms [6] = '{0, 30, -30, 57, -60, 59};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (ms[i]) begin
      int ha [NC], hb [NC];
      modulation = 17'(ms[i]);
      repeat (P + 3) @(negedge clk);
      hist_a.delete();
      for (int k = 0; k < NC; k++) begin ha[k] = 0; hb[k] = 0; end
      for (int t = 0; t < P; t++) begin
        for (int k = 0; k < NC; k++) begin ha[k] += leg_a[k]; hb[k] += leg_b[k]; end
        hist_a.push_back(leg_a);
        @(negedge clk);
      end
      for (int k = 0; k < NC; k++) begin
        check(ha[k] == exp_high(H + ms[i]), $sformatf("m=%0d cell %0d leg A high %0d exp %0d", ms[i], k, ha[k], exp_high(H + ms[i])));
        check(hb[k] == exp_high(H - ms[i]), $sformatf("m=%0d cell %0d leg B high %0d", ms[i], k, hb[k]));
      end
      // phase shift: cell k at time t equals cell 0 at t - k*H/NC (cyclic)
      for (int k = 1; k < NC; k++) begin
        int sh, bad;
        sh = k * H / NC; bad = 0;
        for (int t = 0; t < P; t++) if (hist_a[t][k] != hist_a[(t - sh + P) % P][0]) bad++;
        check(bad == 0, $sformatf("m=%0d cell %0d shift mismatches %0d", ms[i], k, bad));
      end
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
