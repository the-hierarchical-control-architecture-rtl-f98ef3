// tb_interphase_delay: delay between phases for boards that start at
// different points of their packet cycle.
//
// Four complete control systems at default sizes run side by side, each
// with its three valve controllers started at different counter values, in
// test-pulse mode with duty 0.5 (every cell of a phase gets the same
// pulse). For every rising edge the times at which gate S9 of cells A1, B1
// and C1 rises are compared. Checked for every system and edge: the four
// cells of a phase rise in the same clock, and the spread between phases
// stays below one packet cycle (1596 clocks, 13.3 us). Across the systems
// the spread must take both small values (under 10% of a packet cycle) and
// large ones (over 75%), as boards that are not synchronised can produce.
module tb_interphase_delay;
  import pcs_pkg::*;
  localparam int NC = 4, W = 1596, H = 30000, PER = 2 * H, NSYS = 4;

  logic clk = 0, rst_n = 0;
  logic signed [16:0] modulation [3];
  logic signed [12:0] dab_phase [3][NC];
  logic [NC-1:0] no_fault [3];
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint now = 0;
  always @(posedge clk) now <= now + 1;

  bit watch = 0;
  int spread_min [NSYS], spread_max [NSYS], split [NSYS], edges [NSYS];

  // valve start offsets of the four systems (clocks into the packet cycle)
  function automatic int unsigned offs(input int sys, input int ph);
    case (sys * 3 + ph)
      0: return 0;    1: return 40;   2: return 84;
      3: return 0;    4: return 300;  5: return 900;
      6: return 500;  7: return 520;  8: return 1500;
      9: return 0;   10: return 1200; default: return 400;
    endcase
  endfunction

  for (genvar s = 0; s < NSYS; s++) begin : g_sys
    logic [11:0] gate [3][NC];
    logic [NC-1:0] leg_a [3], leg_b [3];
    status_t status [3][NC];
    cmd_t cell_cmd [3][NC];
    logic [NC-1:0] cell_pkt_valid [3];
    logic any_fault, master_tick;
    logic [2:0] valve_tick, valve_cmd_valid;

    localparam int unsigned VO [3] = '{offs(s, 0), offs(s, 1), offs(s, 2)};
    pcs_control_top #(.VALVE_OFFSET(VO)) dut (
      .clk, .rst_n, .modulation, .run(1'b1), .fault_reset(1'b0), .test_pulse(1'b1),
      .dab_phase, .fault_oc(no_fault), .fault_ov(no_fault), .gate,
      .pwm_leg_a(leg_a), .pwm_leg_b(leg_b), .status, .any_fault, .master_tick,
      .valve_tick, .valve_cmd_valid, .cell_cmd, .cell_pkt_valid
    );

    logic [NC-1:0] g9_q [3];
    longint t_rise [3][$];
    initial begin spread_min[s] = 1 << 30; spread_max[s] = 0; split[s] = 0; edges[s] = 0; end
    always @(posedge clk) begin
      for (int ph = 0; ph < 3; ph++) begin
        logic [NC-1:0] g9, rise;
        for (int k = 0; k < NC; k++) g9[k] = gate[ph][k][8];
        rise = g9 & ~g9_q[ph];
        g9_q[ph] <= g9;
        if (watch && rise != '0) begin
          if (rise != '1) split[s]++;
          if (rise[0]) t_rise[ph].push_back(now);
        end
      end
      // once each phase has seen the same edge, compare them
      if (t_rise[0].size() > 0 && t_rise[1].size() > 0 && t_rise[2].size() > 0) begin
        longint a, b, c, lo, hi;
        a = t_rise[0].pop_front(); b = t_rise[1].pop_front(); c = t_rise[2].pop_front();
        lo = a; hi = a;
        if (b < lo) lo = b;
        if (c < lo) lo = c;
        if (b > hi) hi = b;
        if (c > hi) hi = c;
        if (int'(hi - lo) < spread_min[s]) spread_min[s] = int'(hi - lo);
        if (int'(hi - lo) > spread_max[s]) spread_max[s] = int'(hi - lo);
        edges[s]++;
      end
    end
  end

  initial begin
    int lo_all, hi_all;
    for (int ph = 0; ph < 3; ph++) begin
      modulation[ph] = '0;
      no_fault[ph] = '0;
      for (int k = 0; k < NC; k++) dab_phase[ph][k] = '0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (PER / 2) @(negedge clk);
    watch = 1;
    repeat (4 * PER) @(negedge clk);
    watch = 0;
    repeat (10000) @(negedge clk);
    lo_all = 1 << 30; hi_all = 0;
    for (int s = 0; s < NSYS; s++) begin
      $display("system %0d (valve offsets %0d %0d %0d): %0d edges, A1/B1/C1 spread %0d..%0d clocks (%0.2f..%0.2f us at 120 MHz)",
               s, offs(s, 0), offs(s, 1), offs(s, 2), edges[s], spread_min[s], spread_max[s],
               spread_min[s] / 120.0, spread_max[s] / 120.0);
      check(edges[s] >= 3, $sformatf("system %0d: edges seen", s));
      check(split[s] == 0, $sformatf("system %0d: cells of a phase rise together", s));
      check(spread_max[s] < W, $sformatf("system %0d: spread below one packet cycle", s));
      if (spread_min[s] < lo_all) lo_all = spread_min[s];
      if (spread_max[s] > hi_all) hi_all = spread_max[s];
    end
    check(lo_all < W / 10, $sformatf("a small spread occurs (%0d clocks)", lo_all));
    check(hi_all > 3 * W / 4, $sformatf("a large spread occurs (%0d clocks)", hi_all));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
