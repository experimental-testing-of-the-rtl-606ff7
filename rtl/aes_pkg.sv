// aes_pkg: shared types and functions of the Rijndael (AES) datapath.
//
// GF(2^8) arithmetic uses the field polynomial m(x) = x^8 + x^4 + x^3 + x + 1.
// The forward S-box is computed, not tabulated: S(a) = affine(a^-1), where the
// inverse is a^254 and the affine map is b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3)
// ^ rotl(b,4) ^ 8'h63. The inverse S-box is filled in by inverting the forward one.
// These functions are only evaluated to fill the S-box ROMs at elaboration.
//
// State layout: a 128-bit block is 16 bytes, byte 0 in bits [127:120]. Byte
// n sits in row n%4 and column n/4 (column-major, as in the AES standard).
// ShiftRow/InvShiftRow are pure byte re-orderings (routing only, no logic).
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;

  // Key length selector for the 3-in-1 key schedule and the round counter.
  typedef enum logic [1:0] {KEY128 = 2'd0, KEY192 = 2'd1, KEY256 = 2'd2} keylen_e;

  localparam int unsigned N_STREAMS = 16;  // streams held in M1..M3
  localparam int unsigned N_KEYSETS = 16;  // banks of round keys

  // Number of rounds Nr for a key length.
  function automatic logic [3:0] num_rounds(keylen_e kl);
    case (kl)
      KEY128:  return 4'd10;
      KEY192:  return 4'd12;
      default: return 4'd14;
    endcase
  endfunction

  // Multiply by x ('02') modulo m(x).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply (shift-and-add).
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t ginv(byte_t a);
    byte_t r, sq;
    // a^254 = a^2 * a^4 * ... * a^128
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gmul(sq, sq);
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox(byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Contents of one S-box block RAM: forward table in locations 0..255,
  // inverse table in locations 256..511 (address bit 8 selects decryption).
  typedef logic [511:0][7:0] sbox_rom_t;

  function automatic sbox_rom_t sbox_rom();
    sbox_rom_t rom;
    byte_t     s;
    for (int i = 0; i < 256; i++) begin
      s = sbox(byte_t'(i));
      rom[i]         = s;
      rom[256 + int'(s)] = byte_t'(i);
    end
    return rom;
  endfunction

  function automatic byte_t get_byte(block_t s, int n);
    return s[127-8*n -: 8];
  endfunction

  // ShiftRow: row r rotates left by r columns. Output byte at (r,c) takes
  // the input byte at (r, c+r mod 4).
  function automatic block_t shift_row(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  function automatic block_t inv_shift_row(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = s[127-8*(4*c+r) -: 8];
    return o;
  endfunction

  // Word rotation and substitution used by the key schedule.
  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
