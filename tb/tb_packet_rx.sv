// tb_packet_rx: checks packet reception and the parity + CRC double check.
//
// The testbench drives the line itself from frames built by tb_link_pkg.
// Good packets must appear on `data` with one `pkt_valid` pulse; a packet
// with a flipped data bit must raise `parity_err`, one with a wrong check
// frame `crc_err`, and neither may change `data`. A packet broken off after
// a few frames must be dropped and the next packet received correctly.
module tb_packet_rx;
  import tb_link_pkg::*;
  localparam int N = 14, BC = 8;

  logic clk = 0, rst_n = 0, rxd = 1;
  logic [N-1:0][7:0] data;
  logic pkt_valid, parity_err, crc_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_par = 0, n_crc = 0;

  packet_rx #(.N_FRAMES(N), .BIT_CLKS(BC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_valid += pkt_valid;
    n_par   += parity_err;
    n_crc   += crc_err;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mode 0 good, 1 flip a data bit of frame 5, 2 wrong CRC, 3 stop after 4 frames
  task automatic drive(input logic [7:0] b [], input int mode);
    logic [10:0] f;
    int nf;
    nf = (mode == 3) ? 4 : N + 1;
    for (int i = 0; i < nf; i++) begin
      f = frame_bits(i < N ? b[i] : crc_ref(b, N) ^ (mode == 2 ? 8'h10 : 8'h00));
      if (mode == 1 && i == 5) f[3] = ~f[3];
      for (int k = 0; k < 11; k++) begin
        rxd = f[k];
        repeat (BC) @(negedge clk);
      end
    end
    rxd = 1;
    repeat (300) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b [];
    logic [N-1:0][7:0] expd;
    int v0, p0, c0;
    b = new[N];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    for (int r = 0; r < 20; r++) begin
      int mode;
      mode = (r < 4) ? 0 : int'($urandom_range(0, 3));
      if (r == 1) mode = 1;
      if (r == 2) mode = 2;
      if (r == 3) mode = 3;
      for (int i = 0; i < N; i++) b[i] = (r == 0) ? ((i % 2) ? 8'd85 : 8'd170) : 8'($urandom);
      v0 = n_valid; p0 = n_par; c0 = n_crc;
      drive(b, mode);
      case (mode)
        0: begin
          for (int i = 0; i < N; i++) expd[i] = b[i];
          check(n_valid == v0 + 1 && data == expd, $sformatf("good packet %0d", r));
          check(n_par == p0 && n_crc == c0, "no error on good packet");
        end
        1: check(n_par == p0 + 1 && n_valid == v0 && data == expd, "parity error caught");
        2: check(n_crc == c0 + 1 && n_valid == v0 && data == expd, "CRC error caught");
        3: check(n_valid == v0 && data == expd, "short packet dropped");
      endcase
    end
    check(n_valid > 4, "several packets received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
