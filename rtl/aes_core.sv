// aes_core: complete Rijndael cipher with round key module, CBC, 16 streams.
//
// Joins the round key module (3-in-1 key scheduler aes_key_sched writing the
// banks of round keys aes_roundkey_mem) and the iterative encryption/
// decryption unit aes_encdec, which reads one round key per clock. Keys are
// expanded in advance into one of 16 key sets; because the scheduler has its
// own write port, a new key set can be built while blocks are processed with
// another one. Each block names the key set, key length, stream and direction
// it uses, so switching key length or key is immediate.
//
// Interface: key load (kx_*) as in aes_key_sched; IV load and block in/out
// as in aes_encdec. A block must not use a key set that is still being
// written (the caller waits for kx_done).
//
// EXTENDED selects the unit: 0 (default) the basic iterative unit aes_encdec,
// Nr+1 clocks per block; 1 the inner-round pipelined unit aes_encdec_ext, two
// blocks of different streams every 2(Nr+1) clocks. Both units have the same
// ports; 'stall' is only ever high in the extended unit. Both architectures
// are the document's; which one is the default is this design's choice (the
// basic one is the one whose clock rate was measured on the board).
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned NUM_STREAMS = aes_pkg::N_STREAMS,
  parameter int unsigned NUM_SETS    = aes_pkg::N_KEYSETS,
  parameter bit          EXTENDED    = 1'b0,
  parameter int unsigned STW         = $clog2(NUM_STREAMS),
  parameter int unsigned SW          = $clog2(NUM_SETS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // key expansion
  input  logic           kx_start,
  input  keylen_e        kx_keylen,
  input  logic [SW-1:0]  kx_set,
  input  logic [63:0]    kx_key,
  input  logic           kx_key_valid,
  output logic           kx_key_ready,
  output logic           kx_busy,
  output logic           kx_done,
  // IV load
  input  logic           iv_we,
  output logic           iv_ready,
  input  logic [STW-1:0] iv_stream,
  input  block_t         iv_data,
  // blocks
  input  logic           in_valid,
  output logic           in_ready,
  input  block_t         in_data,
  input  logic [STW-1:0] in_stream,
  input  logic [SW-1:0]  in_keyset,
  input  keylen_e        in_keylen,
  input  logic           in_dec,
  output logic           out_valid,
  output block_t         out_data,
  output logic [STW-1:0] out_stream,
  output logic           out_dec,
  output logic           stall
);

  logic          rk_we, rk_half, rk_rd_en;
  logic [SW-1:0] rk_wset, rk_rset;
  logic [3:0]    rk_wround, rk_rround;
  logic [63:0]   rk_wdata;
  block_t        rk_key;

  aes_key_sched #(.NUM_SETS(NUM_SETS)) u_ks (
    .clk(clk), .rst_n(rst_n),
    .start(kx_start), .keylen(kx_keylen), .set(kx_set),
    .kin(kx_key), .kin_valid(kx_key_valid), .kin_ready(kx_key_ready),
    .busy(kx_busy), .done(kx_done),
    .rk_we(rk_we), .rk_set(rk_wset), .rk_round(rk_wround), .rk_half(rk_half), .rk_wdata(rk_wdata)
  );

  aes_roundkey_mem #(.NUM_SETS(NUM_SETS)) u_rkm (
    .clk(clk),
    .we(rk_we), .wset(rk_wset), .wround(rk_wround), .whalf(rk_half), .wdata(rk_wdata),
    .rd_en(rk_rd_en), .rset(rk_rset), .rround(rk_rround), .rkey(rk_key)
  );

  if (EXTENDED) begin : g_ext
    aes_encdec_ext #(.NUM_STREAMS(NUM_STREAMS), .NUM_SETS(NUM_SETS)) u_ed (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_stream(in_stream),
      .in_keyset(in_keyset), .in_keylen(in_keylen), .in_dec(in_dec),
      .iv_we(iv_we), .iv_ready(iv_ready), .iv_stream(iv_stream), .iv_data(iv_data),
      .out_valid(out_valid), .out_data(out_data), .out_stream(out_stream), .out_dec(out_dec),
      .rk_rd_en(rk_rd_en), .rk_set(rk_rset), .rk_round(rk_rround), .rk_key(rk_key),
      .stall(stall)
    );
  end else begin : g_basic
    aes_encdec #(.NUM_STREAMS(NUM_STREAMS), .NUM_SETS(NUM_SETS)) u_ed (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_stream(in_stream),
      .in_keyset(in_keyset), .in_keylen(in_keylen), .in_dec(in_dec),
      .iv_we(iv_we), .iv_ready(iv_ready), .iv_stream(iv_stream), .iv_data(iv_data),
      .out_valid(out_valid), .out_data(out_data), .out_stream(out_stream), .out_dec(out_dec),
      .rk_rd_en(rk_rd_en), .rk_set(rk_rset), .rk_round(rk_rround), .rk_key(rk_key)
    );
    assign stall = 1'b0;
  end

endmodule
