// frame_tx: serialiser for one 11-bit link frame.
//
// On `start` (while not busy) the byte `data` is latched and sent as
// start bit 0, eight data bits MSB first, odd parity bit, stop bit 1, each bit
// held for BIT_CLKS clocks. The line idles high. `done` pulses in the last
// clock of the stop bit, so a new `start` in that same clock follows without
// a gap. The frame layout is the published one; the bit order and odd parity
// are this design's reading of the captured waveforms.
module frame_tx
  import pcs_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy,
  output logic       done
);
  logic [FRAME_BITS-1:0]        shreg;   // MSB is on the line
  logic [$clog2(FRAME_BITS)-1:0] bit_cnt;
  logic [$clog2(BIT_CLKS)-1:0]   clk_cnt;
  logic                          last;

  localparam logic [$clog2(FRAME_BITS)-1:0] LAST_BIT = ($clog2(FRAME_BITS))'(FRAME_BITS - 1);
  localparam logic [$clog2(BIT_CLKS)-1:0]   LAST_CLK = ($clog2(BIT_CLKS))'(BIT_CLKS - 1);

  assign last = busy && (clk_cnt == LAST_CLK) && (bit_cnt == LAST_BIT);
  assign done = last;
  assign txd  = busy ? shreg[FRAME_BITS-1] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      shreg   <= '1;
      bit_cnt <= '0;
      clk_cnt <= '0;
    end else if (start && (!busy || last)) begin
      busy    <= 1'b1;
      shreg   <= {1'b0, data, odd_parity(data), 1'b1};
      bit_cnt <= '0;
      clk_cnt <= '0;
    end else if (busy) begin
      if (clk_cnt == LAST_CLK) begin
        clk_cnt <= '0;
        shreg   <= {shreg[FRAME_BITS-2:0], 1'b1};
        if (bit_cnt == LAST_BIT) busy <= 1'b0;
        else bit_cnt <= bit_cnt + 1'b1;
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
