// packet_tx: sends one link packet of N_FRAMES data frames and a check frame.
//
// On `start` (ignored while busy) the N_FRAMES bytes on `data` are latched,
// then sent back to back as 11-bit frames (see frame_tx) followed by one
// check frame holding the CRC-8 of all data bytes. A packet therefore lasts
// (N_FRAMES+1)*11*BIT_CLKS clocks: 1320 clocks (11 us at 120 MHz) for the
// 14+1 frames used by default. `done` pulses in the last clock of the check
// frame. The packet shape is the published protocol; the CRC polynomial and
// initial value are this design's choice.
module packet_tx
  import pcs_pkg::*;
#(
  parameter int unsigned N_FRAMES = 14,
  parameter int unsigned BIT_CLKS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [N_FRAMES-1:0][7:0] data,
  output logic                     txd,
  output logic                     busy,
  output logic                     done
);
  logic [N_FRAMES-1:0][7:0]      buf_q;
  localparam int unsigned IW = $clog2(N_FRAMES + 1);
  localparam logic [IW-1:0] CHECK_IDX = IW'(N_FRAMES);

  logic [IW-1:0]                 idx;       // frame being sent, N_FRAMES = check
  logic [IW-1:0]                 idx_next;
  logic [7:0]                    crc;
  logic                          f_start, f_done, f_busy;
  logic [7:0]                    f_data;

  frame_tx #(.BIT_CLKS(BIT_CLKS)) u_frame (
    .clk, .rst_n, .start(f_start), .data(f_data), .txd, .busy(f_busy), .done(f_done)
  );

  // Next frame starts at packet start and at the end of each non-final frame.
  assign idx_next = idx + 1'b1;
  assign f_start  = (start && !busy) || (busy && f_done && idx != CHECK_IDX);
  always_comb begin
    if (start && !busy)         f_data = data[0];
    else if (idx_next < CHECK_IDX) f_data = buf_q[idx_next];
    else                        f_data = crc;
  end
  assign done = busy && f_done && idx == CHECK_IDX;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
      crc   <= CRC_INIT;
      buf_q <= '0;
    end else if (start && !busy) begin
      busy  <= 1'b1;
      idx   <= '0;
      buf_q <= data;
      crc   <= crc8_step(CRC_INIT, data[0]);
    end else if (busy && f_done) begin
      if (idx == CHECK_IDX) begin
        busy <= 1'b0;
      end else begin
        idx <= idx_next;
        if (idx_next < CHECK_IDX) crc <= crc8_step(crc, buf_q[idx_next]);
      end
    end
  end
endmodule
