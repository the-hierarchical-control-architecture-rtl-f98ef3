// packet_rx: receives link packets and checks them twice over.
//
// Frames from frame_rx are counted; frame N_FRAMES (counting from 0) is the
// check frame. Every frame must have correct start, odd-parity and stop bits,
// and the check frame must equal the CRC-8 of the data bytes. Only a packet
// passing both checks updates `data` and pulses `pkt_valid` (in the clock
// after the check frame's stop-bit sample); a bad packet is dropped whole and
// flagged with `parity_err` or `crc_err`. If the line stays idle for GAP_CLKS
// clocks after a frame the frame counter restarts, which re-aligns the
// receiver to packet boundaries using the idle time between packets.
module packet_rx
  import pcs_pkg::*;
#(
  parameter int unsigned N_FRAMES = 14,
  parameter int unsigned BIT_CLKS = 8,
  parameter int unsigned GAP_CLKS = 3 * BIT_CLKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rxd,
  output logic [N_FRAMES-1:0][7:0] data,
  output logic                     pkt_valid,
  output logic                     parity_err,
  output logic                     crc_err
);
  logic [7:0]                    f_data;
  logic                          f_valid, f_ok, f_active;
  logic [N_FRAMES-1:0][7:0]      buf_q;
  logic [$clog2(N_FRAMES+1)-1:0] idx;
  logic [7:0]                    crc;
  logic                          bad;
  logic [$clog2(GAP_CLKS+1)-1:0] gap;

  frame_rx #(.BIT_CLKS(BIT_CLKS)) u_frame (
    .clk, .rst_n, .rxd, .data(f_data), .valid(f_valid), .frame_ok(f_ok), .active(f_active)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      crc        <= CRC_INIT;
      bad        <= 1'b0;
      buf_q      <= '0;
      data       <= '0;
      pkt_valid  <= 1'b0;
      parity_err <= 1'b0;
      crc_err    <= 1'b0;
      gap        <= '0;
    end else begin
      pkt_valid  <= 1'b0;
      parity_err <= 1'b0;
      crc_err    <= 1'b0;
      if (f_valid) begin
        gap <= '0;
        if (idx == ($clog2(N_FRAMES+1))'(N_FRAMES)) begin
          idx <= '0;
          crc <= CRC_INIT;
          bad <= 1'b0;
          if (bad || !f_ok)        parity_err <= 1'b1;
          else if (f_data != crc)  crc_err    <= 1'b1;
          else begin
            data      <= buf_q;
            pkt_valid <= 1'b1;
          end
        end else begin
          buf_q[idx] <= f_data;
          crc        <= crc8_step(crc, f_data);
          bad        <= bad || !f_ok;
          idx        <= idx + 1'b1;
        end
      end else if (!f_active && idx != 0) begin
        if (gap == ($clog2(GAP_CLKS+1))'(GAP_CLKS)) begin
          idx <= '0;             // packet broken off: resynchronise
          crc <= CRC_INIT;
          bad <= 1'b0;
          gap <= '0;
        end else begin
          gap <= gap + 1'b1;
        end
      end
    end
  end
endmodule
