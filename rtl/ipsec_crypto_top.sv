// ipsec_crypto_top: double-algorithm IPsec encryption/decryption engine.
//
// Holds the two cipher engines that share one FPGA in this design: the
// Rijndael (AES) engine aes_core (128-bit blocks, 128/192/256-bit keys, CBC
// for 16 streams, 16 round-key sets) and the Triple DES engine tdes_core
// (64-bit blocks, EDE, CBC, four banks of key triples). The engines are
// independent and run concurrently; each has its own ports, which on the
// accelerator board connect to the host interface FIFOs. Clock and reset are
// shared. See the two engines for the port timing.
//
// EXTENDED selects the architecture of both engines. 0 (default): the basic
// iterative units, AES in Nr+1 clocks per block and Triple DES in 48 clocks
// per block with four key banks. 1: the extended units, AES with inner-round
// pipelining (aes_encdec_ext, two streams in flight) and Triple DES unrolled
// into a 16-stage ring (tdes_pipe, 16 key banks, up to 16 streams in flight).
// The Triple DES ports are sized for the extended engine: in the basic one
// only the two low bits of the bank numbers are used, and des_in_stream is
// just carried to des_out_stream. The stall outputs are high while an offered
// block is held off because the same stream is already being encrypted (only
// in the extended units). Both architectures are the document's; having them
// selectable in one top and the basic one as default are this design's
// choices.
module ipsec_crypto_top
  import aes_pkg::*;
  import des_pkg::*;
#(
  parameter bit EXTENDED = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- Rijndael: key expansion ----
  input  logic        aes_kx_start,
  input  keylen_e     aes_kx_keylen,
  input  logic [3:0]  aes_kx_set,
  input  logic [63:0] aes_kx_key,
  input  logic        aes_kx_key_valid,
  output logic        aes_kx_key_ready,
  output logic        aes_kx_busy,
  output logic        aes_kx_done,
  // ---- Rijndael: IV load ----
  input  logic        aes_iv_we,
  output logic        aes_iv_ready,
  input  logic [3:0]  aes_iv_stream,
  input  block_t      aes_iv_data,
  // ---- Rijndael: blocks ----
  input  logic        aes_in_valid,
  output logic        aes_in_ready,
  input  block_t      aes_in_data,
  input  logic [3:0]  aes_in_stream,
  input  logic [3:0]  aes_in_keyset,
  input  keylen_e     aes_in_keylen,
  input  logic        aes_in_dec,
  output logic        aes_out_valid,
  output block_t      aes_out_data,
  output logic [3:0]  aes_out_stream,
  output logic        aes_out_dec,
  output logic        aes_stall,
  // ---- Triple DES: keys ----
  input  logic        des_kw_en,
  input  logic [3:0]  des_kw_bank,
  input  logic [1:0]  des_kw_idx,
  input  logic [63:0] des_kw_key,
  // ---- Triple DES: blocks ----
  input  logic        des_in_valid,
  output logic        des_in_ready,
  input  dblock_t     des_in_data,
  input  logic [3:0]  des_in_stream,
  input  logic [3:0]  des_in_bank,
  input  logic        des_in_dec,
  input  logic        des_in_first,
  input  dblock_t     des_in_iv,
  output logic        des_out_valid,
  output dblock_t     des_out_data,
  output logic [3:0]  des_out_stream,
  output logic        des_out_dec,
  output logic        des_stall
);

  aes_core #(.EXTENDED(EXTENDED)) u_aes (
    .clk(clk), .rst_n(rst_n),
    .kx_start(aes_kx_start), .kx_keylen(aes_kx_keylen), .kx_set(aes_kx_set),
    .kx_key(aes_kx_key), .kx_key_valid(aes_kx_key_valid), .kx_key_ready(aes_kx_key_ready),
    .kx_busy(aes_kx_busy), .kx_done(aes_kx_done),
    .iv_we(aes_iv_we), .iv_ready(aes_iv_ready), .iv_stream(aes_iv_stream), .iv_data(aes_iv_data),
    .in_valid(aes_in_valid), .in_ready(aes_in_ready), .in_data(aes_in_data),
    .in_stream(aes_in_stream), .in_keyset(aes_in_keyset), .in_keylen(aes_in_keylen),
    .in_dec(aes_in_dec),
    .out_valid(aes_out_valid), .out_data(aes_out_data), .out_stream(aes_out_stream),
    .out_dec(aes_out_dec), .stall(aes_stall)
  );

  if (EXTENDED) begin : g_tdes_ext
    tdes_pipe u_tdes (
      .clk(clk), .rst_n(rst_n),
      .kw_en(des_kw_en), .kw_bank(des_kw_bank), .kw_idx(des_kw_idx), .kw_key(des_kw_key),
      .in_valid(des_in_valid), .in_ready(des_in_ready), .in_data(des_in_data),
      .in_stream(des_in_stream), .in_bank(des_in_bank), .in_dec(des_in_dec),
      .in_first(des_in_first), .in_iv(des_in_iv),
      .out_valid(des_out_valid), .out_data(des_out_data), .out_stream(des_out_stream),
      .out_dec(des_out_dec), .stall(des_stall)
    );
  end else begin : g_tdes_basic
    logic [3:0] stream_q;

    tdes_core u_tdes (
      .clk(clk), .rst_n(rst_n),
      .kw_en(des_kw_en), .kw_bank(des_kw_bank[1:0]), .kw_idx(des_kw_idx), .kw_key(des_kw_key),
      .in_valid(des_in_valid), .in_ready(des_in_ready), .in_data(des_in_data),
      .in_bank(des_in_bank[1:0]), .in_dec(des_in_dec), .in_first(des_in_first), .in_iv(des_in_iv),
      .out_valid(des_out_valid), .out_data(des_out_data), .out_dec(des_out_dec)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            stream_q <= '0;
      else if (des_in_valid && des_in_ready) stream_q <= des_in_stream;
    end

    assign des_out_stream = stream_q;
    assign des_stall      = 1'b0;
  end

endmodule
