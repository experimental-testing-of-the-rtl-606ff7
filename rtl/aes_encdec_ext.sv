// aes_encdec_ext: extended (inner-round pipelined) Rijndael unit, CBC mode.
//
// Same function and ports as aes_encdec, with the extra pipeline registers of
// the extended architecture: R0 after the input key addition and R2a/R2b/R2c
// after the round logic, so a round takes two clocks (S-box stage into R1,
// then MixColumn/InvMixColumn and key addition into R2). Two blocks are in the
// loop at once, in two slots that alternate clock by clock; each block takes
// 2*(Nr+1) clocks from acceptance to result, so the unit delivers two blocks
// every 2*(Nr+1) clocks, the same block rate per clock as the basic unit but
// with roughly half the logic depth per clock.
//
// Per block (c = clock index after the accepting edge):
//   c = 0          : R0 <= din ^ k0 (kNr for decryption); read M1 into R3,
//                    M3 into R5 and M2 into R4
//   c = 1          : R1 <= ByteSub(ShiftRow(R0 ^ R3))   (enc)
//                    R1 <= InvByteSub(InvShiftRow(R0))  (dec); M2 <= R5
//   c = 2r         : R2a <= MixColumn(R1) ^ k_r          (enc, r < Nr)
//                    R2c <= InvMixColumn(R1 ^ k_Nr-r)     (dec, r < Nr)
//   c = 2r+1       : R1 <= ByteSub(ShiftRow(R2a)) / InvByteSub(InvShiftRow(R2c))
//   c = 2Nr        : R2b <= R1 ^ kNr (enc) / R1 ^ k0 (dec)
//   c = 2Nr+1      : result on out_data: R2b (enc) or R2b ^ chain (dec);
//                    M1 <= ciphertext (enc); the slot may accept a new block
// The slot of a block is the parity of the clock in which it is accepted, so
// the two slots never need R1, R0/R2 or the round key port in the same clock.
//
// CBC: encryption of two blocks of the same stream cannot overlap (each needs
// the previous ciphertext), so a block is held off (in_ready low) while the
// other slot encrypts the same stream. Decryption of two blocks of one stream
// may overlap: M3 keeps the incoming ciphertext, and it is moved to M2 (through
// R5) one clock after acceptance, before a following block of the stream reads
// M2; the previous ciphertext read for a block is kept in a per-slot register.
// IV writes are accepted only when both slots are idle.
//
// Interface: as aes_encdec (valid/ready input, one-clock out_valid pulse, no
// output back-pressure, round key read port with one clock latency), plus
// 'stall', high in a clock where a block is offered but held off because the
// other slot is encrypting the same stream.
//
// From the document: the register set R0, R1, R2a-c, R3-R5, M1-M3, and the
// goal of processing two independent streams at the same time. This design's
// own choices: the slot-by-clock-parity schedule, the point at which R0 and
// R2b are used, the per-slot chaining register and the hold-off rule for
// same-stream encryption.
module aes_encdec_ext
  import aes_pkg::*;
#(
  parameter int unsigned NUM_STREAMS = aes_pkg::N_STREAMS,
  parameter int unsigned NUM_SETS    = aes_pkg::N_KEYSETS,
  parameter int unsigned STW         = $clog2(NUM_STREAMS),
  parameter int unsigned SW          = $clog2(NUM_SETS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  block_t         in_data,
  input  logic [STW-1:0] in_stream,
  input  logic [SW-1:0]  in_keyset,
  input  keylen_e        in_keylen,
  input  logic           in_dec,
  input  logic           iv_we,
  output logic           iv_ready,
  input  logic [STW-1:0] iv_stream,
  input  block_t         iv_data,
  output logic           out_valid,
  output block_t         out_data,
  output logic [STW-1:0] out_stream,
  output logic           out_dec,
  output logic           rk_rd_en,
  output logic [SW-1:0]  rk_set,
  output logic [3:0]     rk_round,
  input  block_t         rk_key,
  output logic           stall          // a block waits for the other slot (CBC rule)
);

  typedef struct packed {
    logic           run;
    logic [4:0]     c;
    logic [3:0]     nr;
    logic           dec;
    logic [STW-1:0] stream;
    logic [SW-1:0]  set;
  } slot_t;

  slot_t          slot [2];
  block_t         chain [2];       // previous ciphertext of a decrypting block
  logic           ph;              // phase of this clock: slot ph is in an odd
                                   // step (S-box stage), slot !ph in an even one
  logic           q, e;
  block_t         din_q, r0, r1, r2a, r2b, r2c, r3, r4, r5;
  block_t         sb_in, mc, imc, mid_x;
  logic           accept, free_q, same_enc, r1_en;
  logic [3:0]     nr_in;
  logic [4:0]     last_c [2];

  assign q = ph;
  assign e = ~ph;
  assign nr_in = num_rounds(in_keylen);
  for (genvar s = 0; s < 2; s++) begin : g_last
    assign last_c[s] = {slot[s].nr, 1'b1};    // 2*Nr + 1
  end

  // slot q is in an odd step; it can take a new block if idle or finishing
  assign free_q   = !slot[q].run || (slot[q].c == last_c[q]);
  assign same_enc = !in_dec && slot[e].run && !slot[e].dec && (slot[e].stream == in_stream);
  assign in_ready = free_q && !same_enc;
  assign stall    = in_valid && free_q && same_enc;
  assign accept   = in_valid && in_ready;
  assign iv_ready = !slot[0].run && !slot[1].run;

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph    <= 1'b0;
      din_q <= '0;
      for (int s = 0; s < 2; s++) begin
        slot[s]  <= '0;
        chain[s] <= '0;
      end
    end else begin
      ph <= ~ph;
      for (int s = 0; s < 2; s++)
        if (slot[s].run) slot[s].c <= slot[s].c + 5'd1;
      if (slot[q].run && slot[q].c == last_c[q]) slot[q].run <= 1'b0;
      if (accept) begin
        slot[q] <= '{run: 1'b1, c: 5'd0, nr: nr_in, dec: in_dec, stream: in_stream, set: in_keyset};
        din_q   <= in_data;
      end
      // keep R4 for a decrypting block (R4 is valid in its step 1)
      if (slot[q].run && slot[q].c == 5'd1) chain[q] <= r4;
    end
  end

  // Round key address: at the end of a clock, fetch the key slot q needs in
  // its next (even) step.
  always_comb begin
    rk_rd_en = accept || slot[q].run; // no key reads while idle
    if (accept) begin
      rk_set   = in_keyset;
      rk_round = in_dec ? nr_in : 4'd0;
    end else begin
      rk_set   = slot[q].set;
      rk_round = slot[q].dec ? (slot[q].nr - slot[q].c[4:1] - 4'd1) : (slot[q].c[4:1] + 4'd1);
    end
  end

  // ---------------- datapath ----------------
  assign mid_x = r1 ^ rk_key;
  aes_mixcol    u_mc  (.din(r1),    .dout(mc));
  aes_invmixcol u_imc (.din(mid_x), .dout(imc));

  // even step of slot e: R0 / R2a / R2b / R2c
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0  <= '0;
      r2a <= '0;
      r2b <= '0;
      r2c <= '0;
    end else if (slot[e].run) begin
      if (slot[e].c == 5'd0)                   r0  <= din_q ^ rk_key;
      else if (slot[e].c == {slot[e].nr, 1'b0}) r2b <= mid_x;
      else if (slot[e].dec)                    r2c <= imc;
      else                                     r2a <= mc ^ rk_key;
    end
  end

  // odd step of slot q: S-box stage into R1
  always_comb begin
    case ({slot[q].dec, slot[q].c == 5'd1})
      2'b01:   sb_in = shift_row(r0 ^ r3);
      2'b00:   sb_in = shift_row(r2a);
      2'b11:   sb_in = inv_shift_row(r0);
      default: sb_in = inv_shift_row(r2c);
    endcase
  end
  assign r1_en = slot[q].run && (slot[q].c != last_c[q]);

  aes_bytesub u_bs (.clk(clk), .en(r1_en), .dec(slot[q].dec), .din(sb_in), .r1(r1));

  assign out_valid  = slot[q].run && (slot[q].c == last_c[q]);
  assign out_data   = slot[q].dec ? (r2b ^ chain[q]) : r2b;
  assign out_stream = slot[q].stream;
  assign out_dec    = slot[q].dec;

  // ---------------- CBC buffers ----------------
  logic rd_step0;
  assign rd_step0 = slot[e].run && (slot[e].c == 5'd0);

  aes_cbc_buffer #(.DEPTH(NUM_STREAMS)) u_m1 (
    .clk(clk), .rst_n(rst_n),
    .we(iv_we || (out_valid && !slot[q].dec)),
    .waddr(iv_we ? iv_stream : slot[q].stream),
    .wdata(iv_we ? iv_data : r2b),
    .rd_en(rd_step0 && !slot[e].dec), .raddr(slot[e].stream), .rdata(r3)
  );
  aes_cbc_buffer #(.DEPTH(NUM_STREAMS), .WRITE_THROUGH(1'b0)) u_m3 (
    .clk(clk), .rst_n(rst_n),
    .we(accept && in_dec), .waddr(in_stream), .wdata(in_data),
    .rd_en(rd_step0 && slot[e].dec), .raddr(slot[e].stream), .rdata(r5)
  );
  aes_cbc_buffer #(.DEPTH(NUM_STREAMS)) u_m2 (
    .clk(clk), .rst_n(rst_n),
    .we(iv_we || (slot[q].run && slot[q].dec && slot[q].c == 5'd1)),
    .waddr(iv_we ? iv_stream : slot[q].stream),
    .wdata(iv_we ? iv_data : r5),
    .rd_en(rd_step0 && slot[e].dec), .raddr(slot[e].stream), .rdata(r4)
  );

  a_iv_idle: assert property (@(posedge clk) disable iff (!rst_n) iv_we |-> iv_ready);
  a_one_out: assert property (@(posedge clk) disable iff (!rst_n)
                              !(slot[e].run && slot[e].c == last_c[e]));

endmodule
