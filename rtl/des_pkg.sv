// des_pkg: tables and helper functions of the Data Encryption Standard.
//
// Follows the DES specification (FIPS 46-3). Bit numbering is that of the
// standard: bit 1 is the most significant bit of a word. A table entry t at
// output position j means "output bit j is input bit t". The final
// permutation FP is computed as the inverse of IP instead of being stored.
// S-box tables are listed row by row (row = outer input bits b1,b6, column =
// inner bits b2..b5), 64 4-bit entries per box.
package des_pkg;

  typedef logic [63:0] dblock_t;    // 64-bit data block
  typedef logic [55:0] key56_t;     // key after PC-1 (C0 || D0)
  typedef logic [47:0] rkey_t;      // round key

  localparam byte unsigned IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10,  2, 60, 52, 44, 36, 28, 20, 12,  4,
    62, 54, 46, 38, 30, 22, 14,  6, 64, 56, 48, 40, 32, 24, 16,  8,
    57, 49, 41, 33, 25, 17,  9,  1, 59, 51, 43, 35, 27, 19, 11,  3,
    61, 53, 45, 37, 29, 21, 13,  5, 63, 55, 47, 39, 31, 23, 15,  7
  };
  localparam byte unsigned E_T [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,  8,  9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1
  };
  localparam byte unsigned P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,  1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9, 19, 13, 30,  6, 22, 11,  4, 25
  };
  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,  1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27, 19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,  7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29, 21, 13,  5, 28, 20, 12,  4
  };
  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,  3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8, 16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };

  // Left-rotation amounts of the key halves per round (1..16).
  localparam byte unsigned SHIFTS_T [16] = '{
     1,  1,  2,  2,  2,  2,  2,  2,  1,  2,  2,  2,  2,  2,  2,  1
  };

  localparam logic [3:0] SBOX_T [8][64] = '{
    // S1
    '{14,  4, 13,  1,  2, 15, 11,  8,  3, 10,  6, 12,  5,  9,  0,  7,
       0, 15,  7,  4, 14,  2, 13,  1, 10,  6, 12, 11,  9,  5,  3,  8,
       4,  1, 14,  8, 13,  6,  2, 11, 15, 12,  9,  7,  3, 10,  5,  0,
      15, 12,  8,  2,  4,  9,  1,  7,  5, 11,  3, 14, 10,  0,  6, 13},
    // S2
    '{15,  1,  8, 14,  6, 11,  3,  4,  9,  7,  2, 13, 12,  0,  5, 10,
       3, 13,  4,  7, 15,  2,  8, 14, 12,  0,  1, 10,  6,  9, 11,  5,
       0, 14,  7, 11, 10,  4, 13,  1,  5,  8, 12,  6,  9,  3,  2, 15,
      13,  8, 10,  1,  3, 15,  4,  2, 11,  6,  7, 12,  0,  5, 14,  9},
    // S3
    '{10,  0,  9, 14,  6,  3, 15,  5,  1, 13, 12,  7, 11,  4,  2,  8,
      13,  7,  0,  9,  3,  4,  6, 10,  2,  8,  5, 14, 12, 11, 15,  1,
      13,  6,  4,  9,  8, 15,  3,  0, 11,  1,  2, 12,  5, 10, 14,  7,
       1, 10, 13,  0,  6,  9,  8,  7,  4, 15, 14,  3, 11,  5,  2, 12},
    // S4
    '{ 7, 13, 14,  3,  0,  6,  9, 10,  1,  2,  8,  5, 11, 12,  4, 15,
      13,  8, 11,  5,  6, 15,  0,  3,  4,  7,  2, 12,  1, 10, 14,  9,
      10,  6,  9,  0, 12, 11,  7, 13, 15,  1,  3, 14,  5,  2,  8,  4,
       3, 15,  0,  6, 10,  1, 13,  8,  9,  4,  5, 11, 12,  7,  2, 14},
    // S5
    '{ 2, 12,  4,  1,  7, 10, 11,  6,  8,  5,  3, 15, 13,  0, 14,  9,
      14, 11,  2, 12,  4,  7, 13,  1,  5,  0, 15, 10,  3,  9,  8,  6,
       4,  2,  1, 11, 10, 13,  7,  8, 15,  9, 12,  5,  6,  3,  0, 14,
      11,  8, 12,  7,  1, 14,  2, 13,  6, 15,  0,  9, 10,  4,  5,  3},
    // S6
    '{12,  1, 10, 15,  9,  2,  6,  8,  0, 13,  3,  4, 14,  7,  5, 11,
      10, 15,  4,  2,  7, 12,  9,  5,  6,  1, 13, 14,  0, 11,  3,  8,
       9, 14, 15,  5,  2,  8, 12,  3,  7,  0,  4, 10,  1, 13, 11,  6,
       4,  3,  2, 12,  9,  5, 15, 10, 11, 14,  1,  7,  6,  0,  8, 13},
    // S7
    '{ 4, 11,  2, 14, 15,  0,  8, 13,  3, 12,  9,  7,  5, 10,  6,  1,
      13,  0, 11,  7,  4,  9,  1, 10, 14,  3,  5, 12,  2, 15,  8,  6,
       1,  4, 11, 13, 12,  3,  7, 14, 10, 15,  6,  8,  0,  5,  9,  2,
       6, 11, 13,  8,  1,  4, 10,  7,  9,  5,  0, 15, 14,  2,  3, 12},
    // S8
    '{13,  2,  8,  4,  6, 15, 11,  1, 10,  9,  3, 14,  5,  0, 12,  7,
       1, 15, 13,  8, 10,  3,  7,  4, 12,  5,  6, 11,  0, 14,  9,  2,
       7, 11,  4,  1,  9, 12, 14,  2,  0,  6, 10, 13, 15,  3,  5,  8,
       2,  1, 14,  7,  4, 10,  8, 13, 15, 12,  9,  0,  3,  5,  6, 11}
  };

  function automatic dblock_t ip(dblock_t x);
    dblock_t o;
    for (int j = 0; j < 64; j++) o[63-j] = x[64-int'(IP_T[j])];
    return o;
  endfunction

  function automatic dblock_t fp(dblock_t x);
    dblock_t o;
    for (int j = 0; j < 64; j++) o[64-int'(IP_T[j])] = x[63-j];
    return o;
  endfunction

  function automatic logic [47:0] expand(logic [31:0] r);
    logic [47:0] o;
    for (int j = 0; j < 48; j++) o[47-j] = r[32-int'(E_T[j])];
    return o;
  endfunction

  function automatic logic [31:0] pbox(logic [31:0] x);
    logic [31:0] o;
    for (int j = 0; j < 32; j++) o[31-j] = x[32-int'(P_T[j])];
    return o;
  endfunction

  function automatic key56_t pc1(logic [63:0] k);
    key56_t o;
    for (int j = 0; j < 56; j++) o[55-j] = k[64-int'(PC1_T[j])];
    return o;
  endfunction

  function automatic rkey_t pc2(key56_t cd);
    rkey_t o;
    for (int j = 0; j < 48; j++) o[47-j] = cd[56-int'(PC2_T[j])];
    return o;
  endfunction

  function automatic logic [3:0] sbox(logic [2:0] n, logic [5:0] b);
    return SBOX_T[n][{b[5], b[0], b[4:1]}];
  endfunction

  // Rotate both 28-bit key halves C and D left / right by one position, or
  // by two when `two` is set.
  function automatic key56_t rotl_cd(key56_t cd, logic two);
    logic [27:0] c, d;
    c = cd[55:28];
    d = cd[27:0];
    return two ? {c[25:0], c[27:26], d[25:0], d[27:26]} : {c[26:0], c[27], d[26:0], d[27]};
  endfunction

  function automatic key56_t rotr_cd(key56_t cd, logic two);
    logic [27:0] c, d;
    c = cd[55:28];
    d = cd[27:0];
    return two ? {c[1:0], c[27:2], d[1:0], d[27:2]} : {c[0], c[27:1], d[0], d[27:1]};
  endfunction

endpackage
