// aes_invmixcol: InvMixColumn of a 128-bit state (combinational).
//
// Each column (B0..B3) is multiplied by the circulant matrix [0E 0B 0D 09] in
// GF(2^8). The constant multiplications reduce to fixed XOR networks of the
// input bits (up to 6 inputs per product bit), followed by a 4-input XOR per
// output bit. This is deeper than MixColumn and sets the critical path of the
// decryption loop.
module aes_invmixcol
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  function automatic byte_t mul9(byte_t b);
    byte_t b2, b4, b8;
    b2 = xtime(b); b4 = xtime(b2); b8 = xtime(b4);
    return b8 ^ b;
  endfunction
  function automatic byte_t mulb(byte_t b);
    byte_t b2, b4, b8;
    b2 = xtime(b); b4 = xtime(b2); b8 = xtime(b4);
    return b8 ^ b2 ^ b;
  endfunction
  function automatic byte_t muld(byte_t b);
    byte_t b2, b4, b8;
    b2 = xtime(b); b4 = xtime(b2); b8 = xtime(b4);
    return b8 ^ b4 ^ b;
  endfunction
  function automatic byte_t mule(byte_t b);
    byte_t b2, b4, b8;
    b2 = xtime(b); b4 = xtime(b2); b8 = xtime(b4);
    return b8 ^ b4 ^ b2;
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t b0, b1, b2, b3;
      b0 = din[127-32*c -: 8];
      b1 = din[119-32*c -: 8];
      b2 = din[111-32*c -: 8];
      b3 = din[103-32*c -: 8];
      dout[127-32*c -: 8] = mule(b0) ^ mulb(b1) ^ muld(b2) ^ mul9(b3);
      dout[119-32*c -: 8] = mul9(b0) ^ mule(b1) ^ mulb(b2) ^ muld(b3);
      dout[111-32*c -: 8] = muld(b0) ^ mul9(b1) ^ mule(b2) ^ mulb(b3);
      dout[103-32*c -: 8] = mulb(b0) ^ muld(b1) ^ mul9(b2) ^ mule(b3);
    end
  end

endmodule
