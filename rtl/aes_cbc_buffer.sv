// aes_cbc_buffer: 16 x 128-bit chaining-value buffer with registered read.
//
// One location per independent data stream holds the most recent ciphertext
// block of that stream (or its initialisation vector before the first block).
// It is used three times in the Rijndael unit: M1 (encryption feedback, read
// register R3), M2 (decryption chaining value, read register R4) and M3
// (incoming ciphertext, read register R5). Write is synchronous; read is
// synchronous with the output register loaded when `rd_en` is high, like a
// block RAM with its output latch. With WRITE_THROUGH = 1 (default) a write
// and a read of the same location in the same cycle return the new data, so a
// stream's next block can start in the clock in which the previous block's
// result is stored; with WRITE_THROUGH = 0 they return the old contents.
module aes_cbc_buffer
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH         = 16,
  parameter bit          WRITE_THROUGH = 1'b1,
  parameter int unsigned AW            = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  block_t        wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output block_t        rdata      // read register (R3 / R4 / R5)
);

  block_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rdata <= '0;
    else if (rd_en) rdata <= (WRITE_THROUGH && we && waddr == raddr) ? wdata : mem[raddr];
  end

endmodule
