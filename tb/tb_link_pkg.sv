// tb_link_pkg: reference functions for the link testbenches.
//
// Written independently of the RTL: the CRC is computed bit-serially with a
// shift register, the parity by counting ones.
package tb_link_pkg;

  // CRC-8, polynomial x^8+x^2+x+1, initial 0, MSB first, over n bytes.
  function automatic logic [7:0] crc_ref(input logic [7:0] d [], input int n);
    logic [7:0] r;
    r = 8'h00;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = r[7] ^ d[i][b];
        r  = {r[6:0], 1'b0};
        if (fb) r = r ^ 8'h07;
      end
    return r;
  endfunction

  // Line bits of one frame, element 0 first on the line.
  function automatic logic [10:0] frame_bits(input logic [7:0] d);
    int ones;
    logic [10:0] f;
    ones = 0;
    for (int b = 0; b < 8; b++) ones += d[b];
    f[0] = 1'b0;
    for (int b = 0; b < 8; b++) f[1 + b] = d[7 - b];
    f[9]  = (ones % 2 == 0);   // odd parity
    f[10] = 1'b1;
    return f;
  endfunction

endpackage
