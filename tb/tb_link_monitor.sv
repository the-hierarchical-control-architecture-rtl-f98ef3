// tb_link_monitor: reference receiver for testbenches.
//
// Watches one serial line, finds each packet's start bit, samples every bit
// in its middle and checks start, odd parity, stop and the CRC check frame
// against tb_link_pkg. After each packet `bytes` holds its data, `count`
// increments, `ok` tells whether every check passed and `t_start` is the
// clock count at the packet's first falling edge. Frames after the first
// must follow back to back.
module tb_link_monitor
  import tb_link_pkg::*;
#(
  parameter int N  = 14,
  parameter int BC = 8
) (
  input logic clk,
  input logic line
);
  logic [7:0] bytes [N];
  int count = 0;
  int bad = 0;
  bit ok = 0;
  longint t_start = 0;
  longint now = 0;

  always @(posedge clk) now <= now + 1;

  initial begin
    // let reset settle the line before looking for packets
    repeat (20) @(posedge clk);
    forever begin
      logic [7:0] got [];
      logic [10:0] f;
      bit good;
      got = new[N];
      @(negedge line);
      t_start = now;
      good = 1;
      for (int i = 0; i <= N; i++) begin
        if (i > 0) begin
          // next start bit must begin right after the stop bit
          repeat (BC / 2) @(posedge clk);
        end
        repeat (BC / 2) @(posedge clk);
        for (int b = 0; b < 11; b++) begin
          #1 f[b] = line;
          if (b < 10) repeat (BC) @(posedge clk);
        end
        if (i < N) begin
          for (int b = 0; b < 8; b++) got[i][7 - b] = f[1 + b];
          if (f != frame_bits(got[i])) good = 0;
        end else begin
          if (f != frame_bits(crc_ref(got, N))) good = 0;
        end
      end
      for (int i = 0; i < N; i++) bytes[i] = got[i];
      ok = good;
      if (!good) bad++;
      count++;
    end
  end
endmodule
