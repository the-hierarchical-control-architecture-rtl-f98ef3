// tb_packet_tx: checks the serial packet format of packet_tx.
//
// A reference receiver samples the line in the middle of every bit and
// compares it with the frames built by tb_link_pkg (start 0, data MSB
// first, odd parity, stop 1, CRC-8 check frame). Also checked: the 170/85
// bit patterns of two adjacent frames, the packet length of 15 frames x 11
// bits x 8 clocks = 1320 clocks, and that a start during a packet is ignored.
module tb_packet_tx;
  import tb_link_pkg::*;
  localparam int N = 14, BC = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][7:0] data;
  logic txd, busy, done;
  int checks = 0, failures = 0;

  packet_tx #(.N_FRAMES(N), .BIT_CLKS(BC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_and_check(input logic [N-1:0][7:0] d, input bit glitch_start);
    logic [7:0] bytes [];
    logic [10:0] exp_f;
    int t_done;
    bytes = new[N];
    for (int i = 0; i < N; i++) bytes[i] = d[i];
    @(negedge clk); data = d; start = 1;
    @(negedge clk); start = 0; data = '0;
    // now one clock into the start bit; sample each bit in its middle
    repeat (BC/2 - 1) @(negedge clk);
    for (int f = 0; f <= N; f++) begin
      exp_f = frame_bits(f < N ? bytes[f] : crc_ref(bytes, N));
      for (int b = 0; b < 11; b++) begin
        check(txd == exp_f[b], $sformatf("frame %0d bit %0d", f, b));
        if (glitch_start && f == 3 && b == 2) begin start = 1; data = '1; end
        else start = 0;
        repeat (BC) @(negedge clk);
      end
    end
    check(!busy && txd, "idle after packet");
  endtask

  initial begin
    logic [N-1:0][7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(txd == 1'b1, "line idles high");
    // two adjacent frames 170 and 85
    for (int i = 0; i < N; i++) d[i] = (i % 2 == 0) ? 8'd170 : 8'd85;
    check(frame_bits(8'd170) == 11'b11_0101_0101_0, "170 frame pattern");
    check(frame_bits(8'd85)  == 11'b11_1010_1010_0, "85 frame pattern");
    send_and_check(d, 1'b0);
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < N; i++) d[i] = 8'($urandom);
      send_and_check(d, r == 2);
    end
    // packet length
    begin
      int t0, n;
      @(negedge clk); data = d; start = 1;
      @(negedge clk); start = 0; n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n == (N + 1) * 11 * BC, $sformatf("packet length %0d clocks", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
