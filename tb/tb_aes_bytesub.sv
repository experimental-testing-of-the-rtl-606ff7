// tb_aes_bytesub: checks the 16-byte ByteSub/InvByteSub stage and register R1.
//
// The expected S-box is rebuilt here by a different method from the one in
// the design: GF(2^8) logarithms with generator 03 give the inverse, followed
// by the affine map. Known entries S(00)=63, S(53)=ED, S(FF)=16 are checked
// too. Random states are applied in both directions, and the one-clock latency
// and the clock enable of R1 are checked.
module tb_aes_bytesub;
  import aes_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   en = 0, dec = 0;
  block_t din = 0, r1;
  aes_bytesub dut (.*);

  byte_t fwd [256], inv [256];
  initial begin
    byte_t e [256];
    int    lg [256];
    byte_t x, b, s;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      e[i] = x; lg[x] = i;
      x = x ^ {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);   // x * 03
    end
    for (int a = 0; a < 256; a++) begin
      b = (a == 0) ? 8'h00 : e[(255 - lg[a]) % 255];
      s = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
      fwd[a] = s; inv[s] = byte_t'(a);
    end
  end

  initial begin
    block_t exp_v, prev;
    #1;
    checks += 3;
    if (fwd[8'h00] != 8'h63 || fwd[8'h53] != 8'hed || fwd[8'hff] != 8'h16) failures++;
    if (inv[8'h63] != 8'h00) failures++;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      din = {$urandom, $urandom, $urandom, $urandom};
      dec = n[0];
      en  = 1;
      for (int i = 0; i < 16; i++)
        exp_v[127-8*i -: 8] = dec ? inv[din[127-8*i -: 8]] : fwd[din[127-8*i -: 8]];
      @(negedge clk);
      checks++;
      if (r1 !== exp_v) begin failures++; $display("FAIL %h dec=%0d -> %h exp %h", din, dec, r1, exp_v); end
    end
    // R1 holds while the enable is low
    prev = r1; en = 0; din = ~din;
    @(negedge clk);
    checks++;
    if (r1 !== prev) begin failures++; $display("FAIL enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
