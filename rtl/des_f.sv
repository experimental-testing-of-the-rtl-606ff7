// des_f: the DES round function F(R, K), combinational.
//
// Expands the 32-bit right half to 48 bits (E), adds the 48-bit round key
// (XOR), passes the eight 6-bit groups through S-boxes S1..S8 (6 -> 4 bits
// each) and permutes the 32-bit result (P), exactly as the DES standard
// defines it. Implemented as plain logic (no memories), so a round completes
// in one clock together with the XOR into the left half.
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r,
  input  rkey_t       k,
  output logic [31:0] f
);

  logic [47:0] x;
  logic [31:0] s;

  always_comb begin
    x = expand(r) ^ k;
    for (int n = 0; n < 8; n++)
      s[31-4*n -: 4] = sbox(3'(n), x[47-6*n -: 6]);
    f = pbox(s);
  end

endmodule
