// local_protection: fast local protection and status of one sub controller.
//
// Three fault causes are watched: the over-current and over-voltage
// comparator inputs and loss of the command link (no good packet for
// COMM_TIMEOUT clocks). A fault drops `gate_en` in the same clock it appears
// (combinational path from the comparator inputs) and is latched. The latch
// is cleared by `fault_reset` only when no cause is present any more.
// `gate_en` = run && no fault. `status` (status_t) reports the latched causes
// and the running state to the upper layers, one clock behind.
// That the sub controller protects itself locally and reports status and
// faults upward follows the published design; the fault causes, the
// timeout (default 4788 clocks, three packet cycles) and the clearing rule
// are this design's choice.
module local_protection
  import pcs_pkg::*;
#(
  parameter int unsigned COMM_TIMEOUT = 4788
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fault_oc,
  input  logic    fault_ov,
  input  logic    pkt_valid,
  input  logic    fault_reset,
  input  logic    run,
  output logic    gate_en,
  output status_t status
);
  logic [$clog2(COMM_TIMEOUT+1)-1:0] silent;
  logic oc_q, ov_q, lost_q, link_lost;

  assign link_lost = (silent == ($clog2(COMM_TIMEOUT+1))'(COMM_TIMEOUT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      silent <= '0;
    end else if (pkt_valid) begin
      silent <= '0;
    end else if (!link_lost) begin
      silent <= silent + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oc_q   <= 1'b0;
      ov_q   <= 1'b0;
      lost_q <= 1'b0;
    end else if (fault_reset && !fault_oc && !fault_ov && !link_lost) begin
      oc_q   <= 1'b0;
      ov_q   <= 1'b0;
      lost_q <= 1'b0;
    end else begin
      oc_q   <= oc_q   || fault_oc;
      ov_q   <= ov_q   || fault_ov;
      lost_q <= lost_q || link_lost;
    end
  end

  assign gate_en = run && !(oc_q || ov_q || lost_q || fault_oc || fault_ov || link_lost);

  always_comb begin
    status              = '0;
    status.over_current = oc_q;
    status.over_voltage = ov_q;
    status.link_lost    = lost_q;
    status.fault        = oc_q || ov_q || lost_q;
    status.running      = run && !status.fault;
  end
endmodule
