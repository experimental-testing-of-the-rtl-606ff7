// des_key_sched: on-the-fly Triple DES key scheduling unit.
//
// Main keys are stored after Permuted Choice 1 (64 -> 56 bits) in four banks
// of three keys (K1, K2, K3); a bank is selected per block, and a key can be
// written into one bank while another bank is in use (separate write and read
// ports, combinational read as in distributed RAM). Two round-key paths run
// from the bank:
//   encryption : register holds C_n D_n; loaded with the main key rotated
//                left once (round 1), then rotated left by 1 or 2 per round.
//   decryption : register holds C_17-j D_17-j for decryption round j; loaded
//                with the unrotated main key (C16 D16 = C0 D0), then rotated
//                right by 1 or 2 per round.
// Each path has its own PC-2 (56 -> 48 bits); the e/d multiplexer picks the
// path of the DES stage in progress, registered when a path is loaded.
//
// Control (from the cipher controller), all acting at the clock edge:
//   ld  : load the path chosen by `dec` from bank rd_bank, key rd_idx
//   adv : advance the path chosen by `dec` so that it holds the key of
//         round `rnd` (2..16) of the current DES
// The round key for the round computed in a clock is valid in that clock.
module des_key_sched
  import des_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned BW        = $clog2(NUM_BANKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // key write port (64-bit key as supplied, parity bits included)
  input  logic          kw_en,
  input  logic [BW-1:0] kw_bank,
  input  logic [1:0]    kw_idx,    // 0: K1, 1: K2, 2: K3
  input  logic [63:0]   kw_key,
  // key selection and path control
  input  logic [BW-1:0] rd_bank,
  input  logic [1:0]    rd_idx,
  input  logic          ld,
  input  logic          adv,
  input  logic          dec,
  input  logic [4:0]    rnd,
  output rkey_t         rkey
);

  key56_t keys [NUM_BANKS][3];
  key56_t main_key, enc_q, dec_q;
  logic   sel_dec;
  logic   two_e, two_d;

  always_ff @(posedge clk) begin
    if (kw_en) keys[kw_bank][kw_idx] <= pc1(kw_key);
  end

  assign main_key = keys[rd_bank][rd_idx];

  // rotation amounts: left for round rnd, right back from round 18-rnd
  always_comb begin
    two_e = (SHIFTS_T[4'(rnd - 5'd1)] == 8'd2);
    two_d = (SHIFTS_T[4'(5'd17 - rnd)] == 8'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_q   <= '0;
      dec_q   <= '0;
      sel_dec <= 1'b0;
    end else begin
      if (ld) sel_dec <= dec;
      if (!dec && ld)       enc_q <= rotl_cd(main_key, 1'b0);
      else if (!dec && adv) enc_q <= rotl_cd(enc_q, two_e);
      if (dec && ld)        dec_q <= main_key;
      else if (dec && adv)  dec_q <= rotr_cd(dec_q, two_d);
    end
  end

  assign rkey = sel_dec ? pc2(dec_q) : pc2(enc_q);

endmodule
