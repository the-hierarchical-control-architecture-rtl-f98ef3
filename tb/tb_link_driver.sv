// tb_link_driver: reference transmitter for testbenches.
//
// send(bytes, corrupt) puts one packet on `line` synchronously to `clk`,
// BC clocks per bit, frames built by tb_link_pkg. corrupt = 1 flips the CRC
// frame's data so the receiver must reject the packet.
module tb_link_driver
  import tb_link_pkg::*;
#(
  parameter int N  = 14,
  parameter int BC = 8
) (
  input  logic clk,
  output logic line
);
  initial line = 1'b1;

  task automatic send(input logic [7:0] b [], input bit corrupt);
    logic [10:0] f;
    for (int i = 0; i <= N; i++) begin
      f = frame_bits(i < N ? b[i] : crc_ref(b, N) ^ (corrupt ? 8'h01 : 8'h00));
      for (int k = 0; k < 11; k++) begin
        line <= f[k];
        repeat (BC) @(posedge clk);
      end
    end
    line <= 1'b1;
  endtask
endmodule
