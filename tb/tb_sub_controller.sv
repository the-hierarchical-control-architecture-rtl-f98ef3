// tb_sub_controller: checks one sub controller end to end at its links.
//
// Reduced sizes: cell 2 of 6 data frames, 4 clocks per bit, 400-clock
// packet cycle, 3-clock dead zone, 40-clock DAB period. A reference driver
// plays the valve controller, sending a packet every cycle in which frame 2
// carries this cell's command and the other frames the opposite legs. A
// reference receiver decodes the status packets the cell sends up.
// Checked: the CHB gates follow this cell's frame only, after the dead zone;
// the DAB gates switch with both switches of a leg never on together; an
// over-current blocks all twelve gates in the same clock and is reported in
// the status packet; fault reset clears it; link loss and run = 0 stop the
// gates.
module tb_sub_controller;
  import pcs_pkg::*;
  localparam int N = 6, BC = 4, W = 400, D = 3, DH = 20, ID = 2;

  logic clk = 0, rst_n = 0;
  logic rxd, txd;
  logic signed [12:0] dab_phase = 13'sd5;
  logic fault_oc = 0, fault_ov = 0;
  logic [11:0] gate;
  cmd_t cmd;
  logic pkt_valid;
  status_t status;
  int checks = 0, failures = 0;

  sub_controller #(.CELL_ID(ID), .N_FRAMES(N), .BIT_CLKS(BC), .WINDOW_CLKS(W),
                   .DEAD_CLKS(D), .DAB_HALF_PERIOD(DH)) dut (.*);

  tb_link_driver  #(.N(N), .BC(BC)) drv (.clk, .line(rxd));
  tb_link_monitor #(.N(N), .BC(BC)) mon (.clk, .line(txd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // valve side: one packet per cycle while feeding
  bit feed = 0;
  logic [7:0] my_cmd = 8'h00;
  int sent = 0;
  initial begin
    logic [7:0] b [];
    b = new[N];
    forever begin
      if (feed) begin
        foreach (b[i]) b[i] = (i == ID) ? my_cmd : (my_cmd ^ 8'h03);
        drv.send(b, 1'b0);
        sent++;
        repeat (W - (N + 1) * 11 * BC) @(posedge clk);
      end else @(posedge clk);
    end
  end

  // shoot-through watch
  int shoot = 0;
  always @(negedge clk) if (rst_n)
    for (int l = 0; l < 6; l++) if (gate[2*l] && gate[2*l+1]) shoot++;

  task automatic wait_packets(input int n);
    int s0;
    s0 = sent;
    wait (sent >= s0 + n);
    repeat (D + 4) @(negedge clk);
  endtask

  task automatic next_status();
    int c0;
    c0 = mon.count;
    wait (mon.count > c0 + 1);
    #1;
  endtask

  initial begin
    int s1_hi, s1_edges;
    logic prev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(gate == 12'h000, "no gates before any command");
    my_cmd = 8'h05;  // run, leg A up, leg B down
    feed = 1;
    wait_packets(2);
    check(gate[8] && !gate[9] && !gate[10] && gate[11], $sformatf("S9 and S12 on, gate=%h", gate));
    // DAB gates over two periods
    s1_hi = 0; s1_edges = 0; prev = gate[0];
    for (int t = 0; t < 4 * DH; t++) begin
      @(negedge clk);
      s1_hi += gate[0];
      s1_edges += (gate[0] != prev);
      prev = gate[0];
    end
    check(s1_hi == 2 * (DH - D), $sformatf("S1 on %0d clocks in two periods", s1_hi));
    check(s1_edges >= 3, "S1 switches");
    my_cmd = 8'h06;  // run, leg A down, leg B up
    wait_packets(2);
    check(!gate[8] && gate[9] && gate[10] && !gate[11], $sformatf("S10 and S11 on, gate=%h", gate));
    check(cmd == cmd_t'(8'h06), "own frame picked");
    // over-current
    @(negedge clk); fault_oc = 1; #1;
    check(gate == 12'h000, "over-current blocks all gates at once");
    repeat (3) @(negedge clk); fault_oc = 0;
    next_status();
    check(mon.ok && mon.bytes[0] == 8'h03 && mon.bytes[1] == 8'(ID), $sformatf("fault status uploaded %h %h", mon.bytes[0], mon.bytes[1]));
    check(gate == 12'h000, "fault latched");
    my_cmd = 8'h0e;  // fault reset
    wait_packets(2);
    my_cmd = 8'h06;
    wait_packets(2);
    check(gate[9] && gate[10], "running again after fault reset");
    next_status();
    check(mon.bytes[0] == 8'h10, $sformatf("running status uploaded %h", mon.bytes[0]));
    // run = 0
    my_cmd = 8'h02;
    wait_packets(2);
    check(gate == 12'h000, "run low stops gates");
    my_cmd = 8'h06;
    wait_packets(2);
    check(gate[9] && gate[10], "run again");
    // link loss
    feed = 0;
    repeat (4 * W) @(negedge clk);
    check(gate == 12'h000 && status.link_lost, "link loss stops gates");
    check(shoot == 0, "never both switches of a leg on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
