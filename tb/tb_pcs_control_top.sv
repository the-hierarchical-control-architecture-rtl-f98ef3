// tb_pcs_control_top: end-to-end test of the three-layer control system at
// its default sizes (4 cells per phase, 14+1-frame packets, 1596-clock packet
// cycle, 2 kHz carrier = 60000 clocks at 120 MHz).
//
// The same modulation wave drives all three phases, so the master's PWM is
// identical across phases and any difference at the bridges comes from the
// links. Mechanisms made to happen and counted:
//  - packets delivered master -> valve (per phase) and valve -> subs;
//  - deliveries to all four cells of a phase in the same clock;
//  - master-to-bridge latency of each PWM edge, which must lie between two
//    packet lengths and two packet lengths plus two packet cycles, and the
//    skew between phases for the same edge, at most one packet cycle;
//  - PWM pulses at duty 0.5, 0.2 and 0.02: the first two must all reach the
//    bridge, at 0.02 (10 us, below one 13.3 us packet cycle) some are lost;
//  - test-pulse mode (all cells of a phase get the same pulse): the S9 gates
//    of the four cells of a phase must rise in the same clock, and the
//    same edge at A1, B1 and C1 at most one packet cycle apart;
//  - an over-current on one cell: its gates stop at once, the master sees
//    the fault, fault reset clears it;
//  - run = 0 stops every gate; no leg ever has both switches on.
module tb_pcs_control_top;
  import pcs_pkg::*;
  localparam int NC = 4, W = 1596, PKT = 15 * 11 * 8, H = 30000, PER = 2 * H;

  logic clk = 0, rst_n = 0;
  logic signed [16:0] modulation [3];
  logic run = 0, fault_reset = 0, test_pulse = 0;
  logic signed [12:0] dab_phase [3][NC];
  logic [NC-1:0] fault_oc [3], fault_ov [3];
  logic [11:0] gate [3][NC];
  logic [NC-1:0] pwm_leg_a [3], pwm_leg_b [3];
  status_t status [3][NC];
  logic any_fault, master_tick;
  logic [2:0] valve_tick, valve_cmd_valid;
  cmd_t cell_cmd [3][NC];
  logic [NC-1:0] cell_pkt_valid [3];
  int checks = 0, failures = 0;

  pcs_control_top dut (.*);

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint now = 0;
  always @(posedge clk) now <= now + 1;

  // ---- packet delivery and in-phase simultaneity
  logic pv [3][NC];
  logic sub_la [3];
  always_comb
    for (int ph = 0; ph < 3; ph++) begin
      for (int k = 0; k < NC; k++) pv[ph][k] = cell_pkt_valid[ph][k];
      sub_la[ph] = cell_cmd[ph][0].leg_a;
    end
  int n_master_pkts [3] = '{0, 0, 0};
  int n_sub_pkts [3] = '{0, 0, 0};
  int n_split = 0;
  always @(posedge clk) if (rst_n)
    for (int ph = 0; ph < 3; ph++) begin
      int s;
      s = 0;
      for (int k = 0; k < NC; k++) s += pv[ph][k];
      n_master_pkts[ph] += valve_cmd_valid[ph];
      if (s == NC) n_sub_pkts[ph]++;
      else if (s != 0) n_split++;
    end

  // ---- latency and interphase skew of PWM rising edges (cell 0, leg A)
  bit measure = 0;
  longint m_edge [$];
  int e_idx [3] = '{0, 0, 0};
  longint lat [3][64];
  logic prev_m, prev_s [3];
  always @(posedge clk) begin
    prev_m <= pwm_leg_a[0][0];
    for (int ph = 0; ph < 3; ph++) prev_s[ph] <= sub_la[ph];
    if (measure) begin
      if (pwm_leg_a[0][0] && !prev_m) m_edge.push_back(now);
      for (int ph = 0; ph < 3; ph++)
        if (sub_la[ph] && !prev_s[ph] && e_idx[ph] < m_edge.size() && e_idx[ph] < 64) begin
          lat[ph][e_idx[ph]] = now - m_edge[e_idx[ph]];
          e_idx[ph]++;
        end
    end
  end

  // ---- pulse counting: master leg A of all phase-A cells vs gate S9
  bit cnt_m = 0, cnt_s = 0;
  int pulses_m = 0, pulses_s = 0;
  logic [NC-1:0] pm_q, ps_q;
  always @(posedge clk) begin
    for (int k = 0; k < NC; k++) begin
      pm_q[k] <= pwm_leg_a[0][k];
      ps_q[k] <= gate[0][k][8];
      if (cnt_m && pwm_leg_a[0][k] && !pm_q[k]) pulses_m++;
      if (cnt_s && gate[0][k][8] && !ps_q[k]) pulses_s++;
    end
  end

  // ---- test-pulse mode: gate S9 edges within and between phases
  bit tp_watch = 0;
  int tp_together = 0, tp_apart = 0;
  longint tp_edge [3][$];
  logic [NC-1:0] g9_q [3];
  always @(posedge clk) begin
    for (int ph = 0; ph < 3; ph++) begin
      logic [NC-1:0] g9, rise;
      for (int k = 0; k < NC; k++) g9[k] = gate[ph][k][8];
      rise = g9 & ~g9_q[ph];
      g9_q[ph] <= g9;
      if (tp_watch && rise != '0) begin
        if (rise == '1) tp_together++;
        else tp_apart++;
        if (rise[0]) tp_edge[ph].push_back(now);
      end
    end
  end

  // ---- shoot-through watch
  int shoot = 0;
  always @(posedge clk) if (rst_n)
    for (int ph = 0; ph < 3; ph++)
      for (int k = 0; k < NC; k++)
        for (int l = 0; l < 6; l++) if (gate[ph][k][2*l] && gate[ph][k][2*l+1]) shoot++;

  // wait until master carrier counter is at phase 30000 (no PWM edges near)
  // (the carrier counter starts from 0 in the first clock after reset)
  longint t_rel;
  task automatic to_boundary();
    @(negedge clk);
    while ((now - t_rel) % PER != H) @(negedge clk);
  endtask

  // count master and bridge pulses over n carrier periods
  task automatic count_pulses(input int d_pct, input int n, output int m, output int s);
    for (int ph = 0; ph < 3; ph++) modulation[ph] = 17'((2 * d_pct - 100) * H / 100);
    to_boundary();
    to_boundary();   // one full period to settle
    pulses_m = 0; pulses_s = 0;
    cnt_m = 1;
    fork
      begin repeat (7000) @(negedge clk); cnt_s = 1; end
    join_none
    repeat (n) begin repeat (10) @(negedge clk); to_boundary(); end
    cnt_m = 0;
    repeat (7000) @(negedge clk);
    cnt_s = 0;
    m = pulses_m; s = pulses_s;
    $display("duty %0d%%: %0d pulses from the master, %0d at the bridges", d_pct, m, s);
  endtask

  initial begin
    int m, s, lat_min, lat_max, skew_max, lost;
    for (int ph = 0; ph < 3; ph++) begin
      modulation[ph] = '0;
      fault_oc[ph] = '0; fault_ov[ph] = '0;
      for (int k = 0; k < NC; k++) dab_phase[ph][k] = 13'sd600;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    t_rel = now;
    run = 1;
    repeat (4 * W) @(negedge clk);
    check(any_fault == 0, "no fault after start");

    // latency and skew, duty 0.5
    measure = 1;
    repeat (6) begin repeat (10) @(negedge clk); to_boundary(); end
    repeat (8000) @(negedge clk);
    measure = 0;
    lat_min = 1 << 30; lat_max = 0; skew_max = 0;
    check(e_idx[0] >= 5 && e_idx[1] == e_idx[0] && e_idx[2] == e_idx[0], $sformatf("edges measured %0d %0d %0d", e_idx[0], e_idx[1], e_idx[2]));
    for (int i = 0; i < e_idx[0]; i++) begin
      longint lo, hi;
      lo = lat[0][i]; hi = lat[0][i];
      for (int ph = 0; ph < 3; ph++) begin
        if (lat[ph][i] < lo) lo = lat[ph][i];
        if (lat[ph][i] > hi) hi = lat[ph][i];
        check(lat[ph][i] >= 2 * PKT && lat[ph][i] <= 2 * PKT + 2 * W + 40,
              $sformatf("phase %0d edge %0d latency %0d clocks", ph, i, lat[ph][i]));
      end
      if (int'(lo) < lat_min) lat_min = int'(lo);
      if (int'(hi) > lat_max) lat_max = int'(hi);
      if (int'(hi - lo) > skew_max) skew_max = int'(hi - lo);
    end
    $display("edge latency %0d..%0d clocks, largest interphase skew %0d clocks", lat_min, lat_max, skew_max);
    check(skew_max <= W, "interphase skew within one packet cycle");
    check(skew_max > 0, "interphase skew occurred");

    // test-pulse mode, duty 0.5
    test_pulse = 1;
    repeat (4 * W) @(negedge clk);
    tp_watch = 1;
    repeat (6) begin repeat (10) @(negedge clk); to_boundary(); end
    tp_watch = 0;
    begin
      int n, smin, smax;
      n = tp_edge[0].size();
      if (tp_edge[1].size() < n) n = tp_edge[1].size();
      if (tp_edge[2].size() < n) n = tp_edge[2].size();
      smin = 1 << 30; smax = 0;
      for (int i = 0; i < n; i++) begin
        longint lo, hi;
        lo = tp_edge[0][i]; hi = lo;
        for (int ph = 1; ph < 3; ph++) begin
          if (tp_edge[ph][i] < lo) lo = tp_edge[ph][i];
          if (tp_edge[ph][i] > hi) hi = tp_edge[ph][i];
        end
        if (int'(hi - lo) < smin) smin = int'(hi - lo);
        if (int'(hi - lo) > smax) smax = int'(hi - lo);
      end
      $display("test pulse: %0d edges with all 4 cells of a phase together, %0d apart; A1/B1/C1 skew %0d..%0d clocks",
               tp_together, tp_apart, smin, smax);
      check(n >= 5 && tp_together >= 3 * n && tp_apart == 0, "test pulse: cells of a phase switch in the same clock");
      check(smax <= W, "test pulse: interphase skew within one packet cycle");
    end
    test_pulse = 0;

    // duty precision P = W / (2H) = 0.0266
    count_pulses(50, 3, m, s);
    check(m == 3 * NC && s == m, "duty 0.5: every pulse reproduced");
    count_pulses(20, 3, m, s);
    check(m == 3 * NC && s == m, "duty 0.2: every pulse reproduced");
    count_pulses(2, 3, m, s);
    lost = m - s;
    check(m == 3 * NC && lost > 0 && s > 0, $sformatf("duty 0.02: %0d of %0d pulses lost", lost, m));

    // local over-current on cell A2
    for (int ph = 0; ph < 3; ph++) modulation[ph] = '0;
    repeat (2 * W) @(negedge clk);
    fault_oc[0][1] = 1'b1; #1;
    check(gate[0][1] == 12'h000, "over-current blocks cell A2 at once");
    repeat (20) @(negedge clk);
    fault_oc[0][1] = 1'b0;
    repeat (4 * W) @(negedge clk);
    check(status[0][1].fault && status[0][1].over_current && any_fault, "master sees the fault of A2");
    check(status[0][0].running && status[1][1].running && !status[0][0].fault, "other cells keep running");
    begin
      int sw;
      logic p;
      sw = 0; p = gate[0][0][0];
      repeat (2 * 6000) begin @(negedge clk); sw += (gate[0][0][0] != p); p = gate[0][0][0]; end
      check(sw >= 3 && gate[0][1] == 12'h000, "A1 DAB switching while A2 stays blocked");
    end
    fault_reset = 1;
    repeat (3 * W) @(negedge clk);
    fault_reset = 0;
    repeat (4 * W) @(negedge clk);
    check(!any_fault && status[0][1].running, "fault reset clears A2");
    check(gate[0][1] != 12'h000, "A2 gates back");

    // stop
    run = 0;
    repeat (4 * W) @(negedge clk);
    begin
      bit all_off;
      all_off = 1;
      for (int ph = 0; ph < 3; ph++) for (int k = 0; k < NC; k++) if (gate[ph][k] != 0) all_off = 0;
      check(all_off, "run = 0 stops every gate");
    end

    $display("packets master->valve %0d %0d %0d, valve->4 cells together %0d %0d %0d, split deliveries %0d, shoot-through %0d",
             n_master_pkts[0], n_master_pkts[1], n_master_pkts[2], n_sub_pkts[0], n_sub_pkts[1], n_sub_pkts[2], n_split, shoot);
    for (int ph = 0; ph < 3; ph++) check(n_master_pkts[ph] > 100 && n_sub_pkts[ph] > 100, "packets delivered");
    check(n_split == 0, "cells of a phase always served in the same clock");
    check(shoot == 0, "never both switches of a leg on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
