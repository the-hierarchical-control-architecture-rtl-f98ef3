// tb_local_protection: checks fault blocking, latching, clearing and status.
//
// Over-current and over-voltage must drop `gate_en` in the same clock and
// stay latched after the cause goes away until `fault_reset`; a reset while
// the cause is present must not clear. With no good packet for COMM_TIMEOUT
// clocks the link-lost fault must trip. The status byte must show each cause.
module tb_local_protection;
  import pcs_pkg::*;
  localparam int TO = 20;

  logic clk = 0, rst_n = 0;
  logic fault_oc = 0, fault_ov = 0, pkt_valid = 0, fault_reset = 0, run = 0;
  logic gate_en;
  status_t status;
  int checks = 0, failures = 0;
  bit feed = 1;
  int since;

  local_protection #(.COMM_TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;

  // keep the link alive with a packet every 10 clocks while feed is set
  always @(negedge clk) begin
    if (!rst_n) since = 0;
    else begin
      since++;
      pkt_valid = feed && (since % 10 == 0);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!gate_en && status == 8'h00, "stopped after reset");
    run = 1; #1;
    check(gate_en, "run enables gates");
    repeat (30) @(negedge clk);
    check(gate_en && status.running && !status.fault, "running, link alive");
    // over-current: immediate block
    fault_oc = 1; #1;
    check(!gate_en, "over-current blocks in the same clock");
    @(negedge clk); fault_oc = 0;
    repeat (5) @(negedge clk);
    check(!gate_en && status.fault && status.over_current && !status.running, "over-current latched");
    fault_reset = 1; @(negedge clk); fault_reset = 0; @(negedge clk);
    check(gate_en && !status.fault && status == 8'h10, "cleared by fault reset");
    // over-voltage with reset while present
    fault_ov = 1; #1;
    check(!gate_en, "over-voltage blocks in the same clock");
    fault_reset = 1; repeat (3) @(negedge clk);
    check(!gate_en && status.over_voltage, "no clear while cause present");
    fault_ov = 0; @(negedge clk); fault_reset = 0; @(negedge clk);
    check(gate_en && status == 8'h10, "cleared once cause gone");
    // link loss
    wait (pkt_valid); @(negedge clk); feed = 0;
    repeat (TO - 3) @(negedge clk);
    check(gate_en, "short silence tolerated");
    repeat (10) @(negedge clk);
    check(!gate_en && status.link_lost && status.fault, "link loss trips");
    feed = 1; repeat (15) @(negedge clk);
    check(!gate_en && status.link_lost, "link loss latched");
    fault_reset = 1; @(negedge clk); fault_reset = 0; @(negedge clk);
    check(gate_en && status == 8'h10, "link loss cleared");
    run = 0; #1;
    check(!gate_en && !status.running, "run low stops gates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
