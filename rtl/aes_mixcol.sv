// aes_mixcol: MixColumn of a 128-bit state (combinational).
//
// Each column (A0..A3) is multiplied by the circulant matrix [02 03 01 01] in
// GF(2^8). Multiplication by 02 is a shift with conditional XOR of 8'h1b, by
// 03 is that plus the operand, so every output bit is a small XOR tree: a first
// layer of up to 3-input XORs (the products) and a second layer of 4-input
// XORs (the sum of four products), as the equations of the cipher give.
module aes_mixcol
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = din[127-32*c -: 8];
      a1 = din[119-32*c -: 8];
      a2 = din[111-32*c -: 8];
      a3 = din[103-32*c -: 8];
      dout[127-32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      dout[119-32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      dout[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      dout[103-32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
  end

endmodule
