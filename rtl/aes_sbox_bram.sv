// aes_sbox_bram: one dual-port 512 x 8 S-box ROM with registered outputs.
//
// Models one 4-kbit block RAM configured as 512 x 8. Locations 0..255 hold
// the forward S-box (ByteSub) and 256..511 the inverse S-box (InvByteSub), so
// that a combined encryption/decryption unit uses one memory for both; the top
// address bit is the decrypt select. Each port performs one lookup per clock:
// the address presented before a rising edge appears on the output after it
// (one cycle read latency, the output latch of the block RAM).
module aes_sbox_bram
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       en,      // clock enable for both output registers
  input  logic [8:0] addr_a,
  input  logic [8:0] addr_b,
  output byte_t      dout_a,
  output byte_t      dout_b
);

  localparam sbox_rom_t ROM = sbox_rom();

  always_ff @(posedge clk) begin
    if (en) begin
      dout_a <= ROM[addr_a];
      dout_b <= ROM[addr_b];
    end
  end

endmodule
