// tdes_pipe: extended (unrolled, pipelined) Triple DES, EDE, CBC, 16 streams.
//
// The sixteen rounds of one DES are unrolled into sixteen pipeline stages
// round(1)..round(16), each with its own input register and its own next-key
// module (des_next_key) that derives the round key from the key state of the
// previous stage. The output of round(16) is fed back to round(1), so a block
// makes three passes through the ring (E_K1, D_K2, E_K3 for encryption; D_K3,
// E_K2, D_K1 for decryption), 48 clocks in all. Up to 16 blocks are in the
// ring at once, one per stage; they must belong to different streams when
// they are encrypted, because in CBC mode each block of a stream needs the
// previous ciphertext.
//
// Stage n holds L, R, the block's stream, direction, pass number (0..2), key
// bank and, for decryption, the previous ciphertext. Rounds 1..15 swap the
// halves and round 16 does not, so the round(16) output is the DES
// pre-output; the final permutation of one pass and the initial permutation
// of the next cancel, and only the block entering the ring goes through IP
// and only the block leaving it through FP.
//
// Entry to round(1): a block that has finished pass 0 or 1 at round(16) is
// fed back (pass + 1, key of that pass from its bank); otherwise a new block
// may enter (in_valid && in_ready). A new block enters in the clock where a
// finished block leaves, so a stream's blocks follow each other in the same
// ring slot. Key banks: 16 banks of three main keys, stored after PC-1 (a
// 64-bit key is written through kw_*, any time, one clock).
//
// CBC: one chaining register per stream. Encryption XORs the plaintext with
// the stream's last ciphertext before IP; that value is bypassed from the
// leaving block when it is the stream's previous block. Decryption takes the
// chaining value at entry, stores the incoming ciphertext as the new chaining
// value and XORs the carried value into the result after FP. in_first selects
// in_iv as the chaining value (start of a packet).
//
// Timing: a block entered at a clock edge leaves 48 clocks later: out_valid
// is high for one clock with out_data, out_stream and out_dec. in_ready is
// low while a block is being fed back into round(1), and while the offered
// stream has an encryption in the ring (stall is then high). No output
// back-pressure.
//
// From the document: 16 unrolled pipelined rounds with feedback, 16 key
// banks after PC-1, one next-key module per round, no mux3/mux4, up to 16
// independent streams. This design's own choices: the pass/key bookkeeping,
// the per-stream chaining registers and the hold-off rule, the IV input, and
// the handshake.
module tdes_pipe
  import des_pkg::*;
#(
  parameter int unsigned NUM_BANKS   = 16,
  parameter int unsigned NUM_STREAMS = 16,
  parameter int unsigned BW          = $clog2(NUM_BANKS),
  parameter int unsigned STW         = $clog2(NUM_STREAMS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // main key load
  input  logic           kw_en,
  input  logic [BW-1:0]  kw_bank,
  input  logic [1:0]     kw_idx,
  input  logic [63:0]    kw_key,
  // blocks
  input  logic           in_valid,
  output logic           in_ready,
  input  dblock_t        in_data,
  input  logic [STW-1:0] in_stream,
  input  logic [BW-1:0]  in_bank,
  input  logic           in_dec,
  input  logic           in_first,
  input  dblock_t        in_iv,
  output logic           out_valid,
  output dblock_t        out_data,
  output logic [STW-1:0] out_stream,
  output logic           out_dec,
  output logic           stall
);

  typedef struct packed {
    logic [31:0]    l;
    logic [31:0]    r;
    logic [STW-1:0] stream;
    logic           dec;
    logic [1:0]     pass;
    logic [BW-1:0]  bank;
    dblock_t        prev;
  } stage_t;

  stage_t                 st [1:16];     // input register of round(n)
  logic [16:1]            sv;            // stage n holds a block
  logic [31:0]            ol [1:16], or_ [1:16];
  key56_t                 ki [0:16];     // key state; ki[0] read from the banks
  rkey_t                  kr [1:16];
  logic                   kdir [1:16];   // direction of the key loaded into stage n
  key56_t                 kmem [NUM_BANKS][3];
  dblock_t                chain [NUM_STREAMS];
  logic [NUM_STREAMS-1:0] enc_busy;

  logic    fb, leave, accept, blocked, same_prev;
  dblock_t res, chain_use, x_ip;
  logic [1:0] pass_in, kidx;
  logic [BW-1:0] bank_in;
  logic    dec_in;

  // ---------------- key banks ----------------
  always_ff @(posedge clk) begin
    if (kw_en && kw_idx != 2'd3) kmem[kw_bank][kw_idx] <= pc1(kw_key);
  end

  // ---------------- ring entry ----------------
  assign fb    = sv[16] && (st[16].pass != 2'd2);
  assign leave = sv[16] && (st[16].pass == 2'd2);
  assign res   = st[16].dec ? (fp({ol[16], or_[16]}) ^ st[16].prev) : fp({ol[16], or_[16]});

  assign same_prev = leave && !st[16].dec && (st[16].stream == in_stream);
  assign blocked   = enc_busy[in_stream] && !same_prev;
  assign in_ready  = !fb && !blocked;
  assign accept    = in_valid && in_ready;
  assign stall     = in_valid && !fb && blocked;

  always_comb begin
    if (in_first)       chain_use = in_iv;
    else if (same_prev) chain_use = res;
    else                chain_use = chain[in_stream];
  end
  assign x_ip = ip(in_dec ? in_data : (in_data ^ chain_use));

  // pass, direction and key of the block entering round(1)
  assign pass_in = fb ? st[16].pass + 2'd1 : 2'd0;
  assign dec_in  = fb ? st[16].dec : in_dec;
  assign bank_in = fb ? st[16].bank : in_bank;
  assign kidx    = dec_in ? (2'd2 - pass_in) : pass_in;
  assign ki[0]   = kmem[bank_in][kidx];
  assign kdir[1] = dec_in ^ (pass_in == 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sv <= '0;
    else        sv <= {sv[15:1], fb || accept};
  end

  always_ff @(posedge clk) begin
    if (fb) begin
      st[1].l      <= ol[16];
      st[1].r      <= or_[16];
      st[1].stream <= st[16].stream;
      st[1].prev   <= st[16].prev;
    end else begin
      st[1].l      <= x_ip[63:32];
      st[1].r      <= x_ip[31:0];
      st[1].stream <= in_stream;
      st[1].prev   <= chain_use;
    end
    st[1].dec  <= dec_in;
    st[1].pass <= pass_in;
    st[1].bank <= bank_in;
  end

  // ---------------- chaining registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_busy <= '0;
      for (int s = 0; s < NUM_STREAMS; s++) chain[s] <= '0;
    end else begin
      if (leave && !st[16].dec) begin
        chain[st[16].stream]    <= res;
        enc_busy[st[16].stream] <= 1'b0;
      end
      if (accept && in_dec)  chain[in_stream]    <= in_data;
      if (accept && !in_dec) enc_busy[in_stream] <= 1'b1;
    end
  end

  // ---------------- unrolled rounds ----------------
  for (genvar n = 1; n <= 16; n++) begin : g_round
    logic [31:0] f;

    des_next_key #(.N(n)) u_nk (
      .clk(clk), .ld(1'b1), .dec(kdir[n]), .i_prev(ki[n-1]), .i_out(ki[n]), .k_out(kr[n])
    );

    des_f u_f (.r(st[n].r), .k(kr[n]), .f(f));

    if (n == 16) begin : g_last     // no swap after the last round
      assign ol[n]  = st[n].l ^ f;
      assign or_[n] = st[n].r;
    end else begin : g_mid
      assign ol[n]  = st[n].r;
      assign or_[n] = st[n].l ^ f;

      assign kdir[n+1] = st[n].dec ^ (st[n].pass == 2'd1);

      always_ff @(posedge clk) begin
        st[n+1].l      <= ol[n];
        st[n+1].r      <= or_[n];
        st[n+1].stream <= st[n].stream;
        st[n+1].dec    <= st[n].dec;
        st[n+1].pass   <= st[n].pass;
        st[n+1].bank   <= st[n].bank;
        st[n+1].prev   <= st[n].prev;
      end
    end
  end

  assign out_valid  = leave;
  assign out_data   = res;
  assign out_stream = st[16].stream;
  assign out_dec    = st[16].dec;

endmodule
