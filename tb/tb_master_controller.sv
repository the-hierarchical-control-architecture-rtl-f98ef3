// tb_master_controller: checks the master's command packets and status input.
//
// Reduced sizes: 4 bit clocks per bit, an 800-clock packet cycle and a
// 6000-clock carrier. For each phase a reference receiver decodes the
// command packets; frame k must hold the leg states cell k had in the clock
// the window opened, plus the run and fault-reset bits, and unused frames
// must be 0. Packets must start exactly WINDOW_CLKS apart on all three links
// together. Status packets driven into the master must show up on `status`
// and `any_fault`; a packet with a bad CRC must be ignored. In test-pulse
// mode every frame must carry the legs of cell 0.
module tb_master_controller;
  import pcs_pkg::*;
  localparam int NC = 4, N = 14, BC = 4, W = 800, H = 3000;

  logic clk = 0, rst_n = 0;
  logic signed [16:0] modulation [3];
  logic run = 1, fault_reset = 0, test_pulse = 0;
  logic [2:0] tx, rx;
  logic [NC-1:0] leg_a [3], leg_b [3];
  logic window_tick;
  status_t status [3][NC];
  logic any_fault;
  int checks = 0, failures = 0;

  master_controller #(.N_CELLS(NC), .N_FRAMES(N), .BIT_CLKS(BC), .WINDOW_CLKS(W),
                      .CARRIER_HALF(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected command bytes, captured when the window opens
  logic [7:0] exp_q [3][$];
  always @(negedge clk) if (rst_n && window_tick)
    for (int ph = 0; ph < 3; ph++) begin
      logic [7:0] b;
      for (int k = 0; k < NC; k++) begin
        b = test_pulse ? {4'b0, fault_reset, run, leg_b[ph][0], leg_a[ph][0]}
                       : {4'b0, fault_reset, run, leg_b[ph][k], leg_a[ph][k]};
        exp_q[ph].push_back(b);
      end
    end

  for (genvar ph = 0; ph < 3; ph++) begin : g_mon
    tb_link_monitor #(.N(N), .BC(BC)) mon (.clk, .line(tx[ph]));
    tb_link_driver  #(.N(N), .BC(BC)) drv (.clk, .line(rx[ph]));
    int seen = 0;
    longint last_t = -1;
    always @(mon.count) if (mon.count > 0) begin
      check(mon.ok, $sformatf("phase %0d packet %0d format", ph, mon.count));
      for (int k = 0; k < NC; k++) begin
        logic [7:0] e;
        e = exp_q[ph].pop_front();
        check(mon.bytes[k] == e, $sformatf("phase %0d cell %0d cmd %h exp %h", ph, k, mon.bytes[k], e));
      end
      for (int k = NC; k < N; k++) check(mon.bytes[k] == 8'h00, "unused frame is 0");
      if (last_t >= 0) check(mon.t_start - last_t == W, $sformatf("packet cycle %0d", mon.t_start - last_t));
      last_t = mon.t_start;
      seen++;
    end
  end

  initial begin
    logic [7:0] st [];
    int legs_seen;
    st = new[N];
    modulation[0] = 17'sd0; modulation[1] = 17'sd1500; modulation[2] = -17'sd2500;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5 * W) @(negedge clk);
    fault_reset = 1; run = 0;
    repeat (3 * W) @(negedge clk);
    fault_reset = 0; run = 1;
    // test-pulse mode: all cells get cell 0's legs
    test_pulse = 1;
    repeat (10 * W) @(negedge clk);
    test_pulse = 0;
    // status from phase B: cell 2 over-current fault
    foreach (st[i]) st[i] = 8'h00;
    st[0] = 8'h10; st[1] = 8'h10; st[2] = 8'h03; st[3] = 8'h10;
    g_mon[1].drv.send(st, 1'b0);
    repeat (20) @(negedge clk);
    check(status[1][2] == 8'h03 && status[1][0] == 8'h10 && any_fault, "status received, fault seen");
    check(status[0][2] == 8'h00 && status[2][2] == 8'h00, "other phases unchanged");
    // corrupted packet clearing the fault must be ignored
    st[2] = 8'h10;
    g_mon[1].drv.send(st, 1'b1);
    repeat (20) @(negedge clk);
    check(status[1][2] == 8'h03 && any_fault, "bad CRC status packet ignored");
    g_mon[1].drv.send(st, 1'b0);
    repeat (20) @(negedge clk);
    check(status[1][2] == 8'h10 && !any_fault, "fault cleared by good packet");
    repeat (2 * W) @(negedge clk);
    check(g_mon[0].seen >= 10 && g_mon[0].mon.bad == 0, $sformatf("phase A packets %0d", g_mon[0].seen));
    check(g_mon[1].seen >= 10 && g_mon[1].mon.bad == 0, $sformatf("phase B packets %0d", g_mon[1].seen));
    check(g_mon[2].seen >= 10 && g_mon[2].mon.bad == 0, $sformatf("phase C packets %0d", g_mon[2].seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
