// frame_rx: receiver for one 11-bit link frame.
//
// The line passes a two-flop synchroniser. A falling edge on the idle line
// starts a frame; the start bit is checked half a bit later and every further
// bit is sampled in its middle, BIT_CLKS clocks apart. In the clock the stop
// bit is sampled `valid` pulses with the byte (received MSB first), and
// `frame_ok` tells whether the start, odd-parity and stop bits were right.
// `active` is high while a frame is being received. The receiver is ready for
// the next start edge right after the stop-bit sample.
module frame_rx
  import pcs_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_ok,
  output logic       active
);
  logic                          s1, s2, s3;     // synchroniser + edge detect
  logic [FRAME_BITS-2:0]         shreg;   // bits sampled so far
  logic [$clog2(FRAME_BITS):0]   bit_cnt;
  logic [$clog2(BIT_CLKS):0]     clk_cnt;
  logic [FRAME_BITS-1:0]         frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1, s2, s3} <= 3'b111;
    end else begin
      {s1, s2, s3} <= {rxd, s1, s2};
    end
  end

  assign frame = {shreg, s2};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      shreg    <= '1;
      bit_cnt  <= '0;
      clk_cnt  <= '0;
      valid    <= 1'b0;
      frame_ok <= 1'b0;
      data     <= '0;
    end else begin
      valid <= 1'b0;
      if (!active) begin
        if (s3 && !s2) begin          // falling edge: start bit begins
          active  <= 1'b1;
          bit_cnt <= '0;
          clk_cnt <= ($clog2(BIT_CLKS)+1)'(BIT_CLKS / 2 - 1);
        end
      end else if (clk_cnt == '0) begin
        clk_cnt <= ($clog2(BIT_CLKS)+1)'(BIT_CLKS - 1);
        shreg   <= frame[FRAME_BITS-2:0];
        if (bit_cnt == 0 && s2) begin
          active <= 1'b0;            // glitch, not a start bit
        end else if (bit_cnt == ($clog2(FRAME_BITS)+1)'(FRAME_BITS - 1)) begin
          active   <= 1'b0;
          valid    <= 1'b1;
          data     <= frame[9:2];
          frame_ok <= !frame[10] && frame[0] && (frame[1] == odd_parity(frame[9:2]));
        end
        bit_cnt <= bit_cnt + 1'b1;
      end else begin
        clk_cnt <= clk_cnt - 1'b1;
      end
    end
  end
endmodule
