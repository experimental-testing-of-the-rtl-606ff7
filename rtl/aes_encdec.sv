// aes_encdec: basic iterative Rijndael encryption/decryption unit, CBC mode.
//
// One 128-bit block is processed in Nr+1 clocks (11, 13 or 15 for 128-, 192-
// and 256-bit keys); a new block may be accepted in the clock its predecessor
// leaves, so the unit sustains one block per Nr+1 clocks. The only round
// register is R1, the output register of the S-box block ROMs. Per clock the
// loop evaluates, from R1 and the current round key k:
//   encryption : S-box in = ShiftRow(MixColumn(R1) ^ k)
//   decryption : S-box in = InvShiftRow(InvMixColumn(R1 ^ k))
// Decryption keeps the order of the inverse cipher (key addition before
// InvMixColumn), so it uses the encryption round keys unchanged, in reverse.
// The first clock takes the input block instead: ShiftRow(din ^ k0 ^ R3) for
// encryption (R3 = previous ciphertext of the stream, CBC), InvShiftRow(din ^
// kNr) for decryption. The last round skips MixColumn/InvMixColumn:
//   encryption output = R1 ^ kNr
//   decryption output = R1 ^ k0 ^ R4 (R4 = previous ciphertext, CBC)
//
// CBC state for 16 streams lives in three 16 x 128 buffers: M1 holds the last
// ciphertext of each encrypting stream, M2 the last ciphertext of each
// decrypting stream, and M3 the ciphertext currently being decrypted, which is
// copied (through R5) into M2 when its block completes. `iv_we` sets a
// stream's entry in M1 and M2 to its initialisation vector before the stream's
// first block; it is accepted only while the unit is idle.
//
// Timing (t counts clocks after the accepting edge):
//   accept edge : input block, stream, key set and mode latched; M1, M2 and
//                 the round key memory read (key k0 or kNr); M3 written.
//   t = 0..Nr-1 : R1 loaded at the end of each clock.
//   t = Nr      : out_valid, result on out_data; at the end of this clock the
//                 chaining value is stored and the next block may be accepted.
// There is no output back-pressure: the result is valid for one clock.
// The round key memory is external (aes_roundkey_mem) and is read through
// rk_* with one clock of latency.
module aes_encdec
  import aes_pkg::*;
#(
  parameter int unsigned NUM_STREAMS = aes_pkg::N_STREAMS,
  parameter int unsigned NUM_SETS    = aes_pkg::N_KEYSETS,
  parameter int unsigned STW         = $clog2(NUM_STREAMS),
  parameter int unsigned SW          = $clog2(NUM_SETS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // block input
  input  logic           in_valid,
  output logic           in_ready,
  input  block_t         in_data,
  input  logic [STW-1:0] in_stream,
  input  logic [SW-1:0]  in_keyset,
  input  keylen_e        in_keylen,
  input  logic           in_dec,      // 1: decrypt, 0: encrypt
  // initialisation vector load
  input  logic           iv_we,
  output logic           iv_ready,
  input  logic [STW-1:0] iv_stream,
  input  block_t         iv_data,
  // block output
  output logic           out_valid,
  output block_t         out_data,
  output logic [STW-1:0] out_stream,
  output logic           out_dec,
  // round key memory read port
  output logic           rk_rd_en,
  output logic [SW-1:0]  rk_set,
  output logic [3:0]     rk_round,
  input  block_t         rk_key
);

  logic           running;
  logic [3:0]     t;
  logic [3:0]     nr_q;
  logic           dec_q;
  logic [STW-1:0] stream_q;
  logic [SW-1:0]  set_q;
  block_t         din_q;
  logic           accept;
  logic           last;
  logic           r1_en;
  block_t         r1, r3, r4, r5;
  block_t         mc, imc, sb_in, top_x, mid_x;
  logic [3:0]     nr_in;

  assign nr_in    = num_rounds(in_keylen);
  assign last     = running && (t == nr_q);
  assign in_ready = !running || last;
  assign accept   = in_valid && in_ready;
  assign iv_ready = !running;
  assign r1_en    = running && (t != nr_q);

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      t        <= '0;
      nr_q     <= 4'd10;
      dec_q    <= 1'b0;
      stream_q <= '0;
      set_q    <= '0;
      din_q    <= '0;
    end else begin
      if (accept) begin
        running  <= 1'b1;
        t        <= '0;
        nr_q     <= nr_in;
        dec_q    <= in_dec;
        stream_q <= in_stream;
        set_q    <= in_keyset;
        din_q    <= in_data;
      end else if (last) begin
        running  <= 1'b0;
      end else if (running) begin
        t        <= t + 4'd1;
      end
    end
  end

  // Round key address: the key for clock t+1 is fetched at the end of clock t.
  always_comb begin
    rk_rd_en = accept || running;     // no key reads while idle
    if (accept) begin
      rk_set   = in_keyset;
      rk_round = in_dec ? nr_in : 4'd0;
    end else begin
      rk_set   = set_q;
      rk_round = dec_q ? (nr_q - t - 4'd1) : (t + 4'd1);
    end
  end

  // ---------------- datapath ----------------
  aes_mixcol    u_mc  (.din(r1),    .dout(mc));
  aes_invmixcol u_imc (.din(mid_x), .dout(imc));

  assign top_x = din_q ^ rk_key;     // initial AddRoundKey
  assign mid_x = r1 ^ rk_key;        // AddRoundKey after the S-boxes

  // S-box input multiplexer (four sources)
  always_comb begin
    case ({dec_q, t == 4'd0})
      2'b01:   sb_in = shift_row(top_x ^ r3);
      2'b00:   sb_in = shift_row(mc ^ rk_key);
      2'b11:   sb_in = inv_shift_row(top_x);
      default: sb_in = inv_shift_row(imc);
    endcase
  end

  aes_bytesub u_bs (.clk(clk), .en(r1_en), .dec(dec_q), .din(sb_in), .r1(r1));

  assign out_valid  = last;
  assign out_data   = dec_q ? (mid_x ^ r4) : mid_x;
  assign out_stream = stream_q;
  assign out_dec    = dec_q;

  // ---------------- CBC buffers ----------------
  // M1: encryption chaining value (mux1: IV or new ciphertext), read into R3
  aes_cbc_buffer #(.DEPTH(NUM_STREAMS)) u_m1 (
    .clk(clk), .rst_n(rst_n),
    .we(iv_we || (last && !dec_q)),
    .waddr(iv_we ? iv_stream : stream_q),
    .wdata(iv_we ? iv_data : mid_x),
    .rd_en(accept), .raddr(in_stream), .rdata(r3)
  );
  // M3: ciphertext under decryption, read into R5 one clock after its write
  aes_cbc_buffer #(.DEPTH(NUM_STREAMS)) u_m3 (
    .clk(clk), .rst_n(rst_n),
    .we(accept && in_dec), .waddr(in_stream), .wdata(in_data),
    .rd_en(running && t == 4'd0), .raddr(stream_q), .rdata(r5)
  );
  // M2: decryption chaining value (mux2: IV or R5), read into R4
  aes_cbc_buffer #(.DEPTH(NUM_STREAMS)) u_m2 (
    .clk(clk), .rst_n(rst_n),
    .we(iv_we || (last && dec_q)),
    .waddr(iv_we ? iv_stream : stream_q),
    .wdata(iv_we ? iv_data : r5),
    .rd_en(accept), .raddr(in_stream), .rdata(r4)
  );

  // IV writes share the buffer write ports with the datapath.
  a_iv_idle: assert property (@(posedge clk) disable iff (!rst_n) iv_we |-> iv_ready);

endmodule
