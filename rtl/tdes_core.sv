// tdes_core: basic iterative Triple DES (EDE) encryption/decryption, CBC mode.
//
// One DES round (des_round) is iterated 48 times per 64-bit block, one round
// per clock, with round keys generated on the fly (des_key_sched). Encryption
// is E_K3(D_K2(E_K1(x))), decryption D_K1(E_K2(D_K3(y))); the stage order of
// encryption/decryption paths and keys is chosen per block. In CBC mode the
// plaintext is XORed with the previous ciphertext before encryption, and the
// decryption result is XORed with the previous ciphertext afterwards. The
// chaining value is kept in a register; a block with `in_first` set uses
// `in_iv` instead (start of a packet).
//
// Timing: a block is accepted on a clock edge (in_valid && in_ready); rounds
// 1..48 are computed in the following 48 clocks, and in the 48th the result is
// on out_data with out_valid high for one clock. A new block can be accepted
// at the end of that clock, so throughput is one block per 48 clocks. There is
// no output back-pressure.
module tdes_core
  import des_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned BW        = $clog2(NUM_BANKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // main key load
  input  logic          kw_en,
  input  logic [BW-1:0] kw_bank,
  input  logic [1:0]    kw_idx,
  input  logic [63:0]   kw_key,
  // blocks
  input  logic          in_valid,
  output logic          in_ready,
  input  dblock_t       in_data,
  input  logic [BW-1:0] in_bank,
  input  logic          in_dec,
  input  logic          in_first,
  input  dblock_t       in_iv,
  output logic          out_valid,
  output dblock_t       out_data,
  output logic          out_dec
);

  logic          running, last, accept;
  logic [5:0]    rnd;          // round computed in this clock, 1..48
  logic          dec_q;
  logic [BW-1:0] bank_q;
  dblock_t       chain_q;      // chaining value for the next block
  dblock_t       cin_q;        // ciphertext under decryption
  dblock_t       prev_q;       // chaining value used by the block in flight
  dblock_t       chain_use, x_in, x_ip, res;
  logic [31:0]   out_l, out_r;
  logic          ks_ld, ks_adv, ks_dec;
  logic [1:0]    ks_idx, stage_nxt;
  logic [4:0]    ks_rnd;
  logic [3:0]    rmod;
  rkey_t         rkey;

  assign last     = running && (rnd == 6'd48);
  assign in_ready = !running || last;
  assign accept   = in_valid && in_ready;

  always_comb begin
    if (in_first)   chain_use = in_iv;
    else if (last)  chain_use = dec_q ? cin_q : res;
    else            chain_use = chain_q;
  end

  assign x_in = in_dec ? in_data : (in_data ^ chain_use);
  assign x_ip = ip(x_in);

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      rnd     <= 6'd1;
      dec_q   <= 1'b0;
      bank_q  <= '0;
      chain_q <= '0;
      cin_q   <= '0;
      prev_q  <= '0;
    end else begin
      if (last) chain_q <= dec_q ? cin_q : res;
      if (accept) begin
        running <= 1'b1;
        rnd     <= 6'd1;
        dec_q   <= in_dec;
        bank_q  <= in_bank;
        cin_q   <= in_data;
        prev_q  <= chain_use;
      end else if (last) begin
        running <= 1'b0;
      end else if (running) begin
        rnd     <= rnd + 6'd1;
      end
    end
  end

  // Key path control. Stage s of a block (0, 1, 2) uses the decryption path
  // when (block is decrypted) xor (s == 1), and key index s for encryption or
  // 2 - s for decryption.
  assign rmod      = 4'(rnd % 6'd16);                 // 0 at the last round of a DES
  assign stage_nxt = (rnd == 6'd16) ? 2'd1 : 2'd2;    // stage entered after a boundary
  always_comb begin
    ks_ld  = 1'b0;
    ks_adv = 1'b0;
    ks_dec = 1'b0;
    ks_idx = 2'd0;
    ks_rnd = 5'd1;
    if (accept) begin
      ks_ld  = 1'b1;
      ks_dec = in_dec;
      ks_idx = in_dec ? 2'd2 : 2'd0;
    end else if (running && !last) begin
      if (rmod == 4'd0) begin
        ks_ld  = 1'b1;
        ks_dec = dec_q ^ (stage_nxt == 2'd1);
        ks_idx = dec_q ? (2'd2 - stage_nxt) : stage_nxt;
      end else begin
        ks_adv = 1'b1;
        ks_dec = dec_q ^ (rnd > 6'd16 && rnd < 6'd32);
        ks_rnd = {1'b0, rmod} + 5'd1;
      end
    end
  end

  des_key_sched #(.NUM_BANKS(NUM_BANKS)) u_ks (
    .clk(clk), .rst_n(rst_n),
    .kw_en(kw_en), .kw_bank(kw_bank), .kw_idx(kw_idx), .kw_key(kw_key),
    .rd_bank(accept ? in_bank : bank_q), .rd_idx(ks_idx),
    .ld(ks_ld), .adv(ks_adv), .dec(ks_dec), .rnd(ks_rnd), .rkey(rkey)
  );

  des_round u_round (
    .clk(clk), .rst_n(rst_n),
    .load(accept), .adv(running && !last), .swap(rmod != 4'd0),
    .in_l(x_ip[63:32]), .in_r(x_ip[31:0]), .rkey(rkey),
    .out_l(out_l), .out_r(out_r)
  );

  assign res       = dec_q ? (fp({out_l, out_r}) ^ prev_q) : fp({out_l, out_r});
  assign out_valid = last;
  assign out_data  = res;
  assign out_dec   = dec_q;

endmodule
