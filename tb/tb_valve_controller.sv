// tb_valve_controller: checks relaying between master and sub controllers.
//
// Reduced sizes: 3 cells, 6 data frames, 4 clocks per bit, a 400-clock
// packet cycle. A reference driver sends command packets as the master; at
// each of its own window ticks the valve must send the last good command
// packet on every sub link, identical and starting in the same clock, and
// must keep the old data when a command packet has a bad CRC. Status packets
// driven on each sub link must come back in the valve's packet to the
// master, cell k's status byte in frame k.
module tb_valve_controller;
  localparam int NC = 3, N = 6, BC = 4, W = 400;

  logic clk = 0, rst_n = 0;
  logic rx_master, tx_master;
  logic [NC-1:0] tx_sub, rx_sub;
  logic window_tick, cmd_valid, cmd_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;

  valve_controller #(.N_CELLS(NC), .N_FRAMES(N), .BIT_CLKS(BC), .WINDOW_CLKS(W),
                     .WINDOW_OFFSET(150)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin n_valid += cmd_valid; n_err += cmd_err; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  tb_link_driver  #(.N(N), .BC(BC)) mdrv (.clk, .line(rx_master));
  tb_link_monitor #(.N(N), .BC(BC)) mmon (.clk, .line(tx_master));
  tb_link_monitor #(.N(N), .BC(BC)) smon0 (.clk, .line(tx_sub[0]));
  tb_link_monitor #(.N(N), .BC(BC)) smon1 (.clk, .line(tx_sub[1]));
  tb_link_monitor #(.N(N), .BC(BC)) smon2 (.clk, .line(tx_sub[2]));
  tb_link_driver  #(.N(N), .BC(BC)) sdrv0 (.clk, .line(rx_sub[0]));
  tb_link_driver  #(.N(N), .BC(BC)) sdrv1 (.clk, .line(rx_sub[1]));
  tb_link_driver  #(.N(N), .BC(BC)) sdrv2 (.clk, .line(rx_sub[2]));

  // wait for the next complete packet on the sub links and compare it
  task automatic expect_down(input logic [7:0] e [], input string what);
    int c0;
    longint t0;
    t0 = smon0.now;
    do begin
      c0 = smon0.count;
      wait (smon0.count > c0 && smon1.count > c0 && smon2.count > c0);
      #1;
    end while (smon0.t_start < t0);
    check(smon0.ok && smon1.ok && smon2.ok, {what, ": format"});
    check(smon0.t_start == smon1.t_start && smon0.t_start == smon2.t_start, {what, ": same start on all links"});
    for (int i = 0; i < N; i++)
      check(smon0.bytes[i] == e[i] && smon1.bytes[i] == e[i] && smon2.bytes[i] == e[i],
            $sformatf("%s: frame %0d got %h exp %h", what, i, smon0.bytes[i], e[i]));
  endtask

  initial begin
    logic [7:0] a [], b [], s [];
    a = new[N]; b = new[N]; s = new[N];
    foreach (a[i]) begin a[i] = 8'($urandom); b[i] = 8'($urandom); s[i] = 8'h00; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    mdrv.send(a, 1'b0);
    repeat (5) @(negedge clk);
    check(n_valid == 1 && n_err == 0, "command packet accepted");
    expect_down(a, "packet A");
    expect_down(a, "packet A repeated");
    mdrv.send(b, 1'b1);
    repeat (5) @(negedge clk);
    check(n_err == 1 && n_valid == 1, "bad command packet flagged");
    expect_down(a, "old data kept after bad packet");
    mdrv.send(b, 1'b0);
    expect_down(b, "packet B");
    // status upward
    s[0] = 8'h10; sdrv0.send(s, 1'b0);
    s[0] = 8'h03; sdrv1.send(s, 1'b0);
    s[0] = 8'h11; sdrv2.send(s, 1'b0);
    begin
      int c0;
      longint t0;
      t0 = mmon.now;
      do begin
        c0 = mmon.count;
        wait (mmon.count > c0);
        #1;
      end while (mmon.t_start < t0);
      check(mmon.ok, "status packet format");
      check(mmon.bytes[0] == 8'h10 && mmon.bytes[1] == 8'h03 && mmon.bytes[2] == 8'h11,
            $sformatf("status frames %h %h %h", mmon.bytes[0], mmon.bytes[1], mmon.bytes[2]));
      for (int i = NC; i < N; i++) check(mmon.bytes[i] == 8'h00, "unused status frame is 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * W) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
