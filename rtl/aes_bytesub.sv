// aes_bytesub: ByteSub / InvByteSub of a whole 128-bit state, with register R1.
//
// Sixteen 8x8 S-box lookups run in parallel on eight dual-port 512 x 8 block
// ROMs (aes_sbox_bram); each ROM serves two bytes, one per port. Forward and
// inverse tables share each ROM, and `dec` picks the inverse half. The block
// RAM output registers together form the 128-bit round register R1, so the
// result appears one clock after the input (one lookup per clock, no stall).
module aes_bytesub
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   en,     // load R1
  input  logic   dec,    // 1: InvByteSub, 0: ByteSub
  input  block_t din,
  output block_t r1      // register R1
);

  for (genvar m = 0; m < 8; m++) begin : g_bram
    aes_sbox_bram u_bram (
      .clk    (clk),
      .en     (en),
      .addr_a ({dec, din[127-16*m -: 8]}),
      .addr_b ({dec, din[119-16*m -: 8]}),
      .dout_a (r1[127-16*m -: 8]),
      .dout_b (r1[119-16*m -: 8])
    );
  end

endmodule
