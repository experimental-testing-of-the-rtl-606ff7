// aes_roundkey_mem: banks of Rijndael round keys.
//
// NUM_SETS banks of 16 round keys of 128 bits each: address = {set, round}.
// Built as two 256 x 64 memories (left and right halves of each round key),
// each of which maps to four 256 x 16 block RAMs. The key scheduler writes
// 64 bits per clock (two 32-bit key words) into one half; the cipher reads a
// whole 128-bit round key per clock from both halves through a registered read
// port. Writing one set while the cipher reads another is allowed, so a new
// main key can be expanded while data are processed with an older one.
module aes_roundkey_mem
  import aes_pkg::*;
#(
  parameter int unsigned NUM_SETS = 16,
  parameter int unsigned SW       = $clog2(NUM_SETS)
) (
  input  logic          clk,
  // write port: 64 bits (words w_i, w_i+1) into one half of a round key
  input  logic          we,
  input  logic [SW-1:0] wset,
  input  logic [3:0]    wround,
  input  logic          whalf,     // 0: bits [127:64], 1: bits [63:0]
  input  logic [63:0]   wdata,
  // read port: one full round key, available one clock after the address
  input  logic          rd_en,
  input  logic [SW-1:0] rset,
  input  logic [3:0]    rround,
  output block_t        rkey
);

  localparam int unsigned DEPTH = NUM_SETS * 16;

  logic [63:0] mem_hi [DEPTH];
  logic [63:0] mem_lo [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !whalf) mem_hi[{wset, wround}] <= wdata;
    if (we &&  whalf) mem_lo[{wset, wround}] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rkey <= {mem_hi[{rset, rround}], mem_lo[{rset, rround}]};
  end

endmodule
