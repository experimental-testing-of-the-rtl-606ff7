// tb_aes_mixcol: checks MixColumn against published example columns and
// against a column-by-column GF(2^8) reference computed with shift-and-add
// multiplication by the matrix rows [02 03 01 01].
module tb_aes_mixcol;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  block_t din, dout;
  aes_mixcol dut (.*);

  function automatic byte_t mul(byte_t a, int c);
    byte_t p;
    p = 0;
    for (int i = 0; i < 4; i++) begin
      if (c[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  initial begin
    int m [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};
    block_t e;
    din = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}; #1;
    checks++;
    if (dout !== {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}) begin failures++; $display("FAIL known %h", dout); end
    din = {32'hd4d4d4d5, 32'h2d26314c, 32'hd4bf5d30, 32'he0b452ae}; #1;
    checks++;
    if (dout !== {32'hd5d5d7d6, 32'h4d7ebdf8, 32'h046681e5, 32'he0cb199a}) begin failures++; $display("FAIL known2 %h", dout); end
    for (int n = 0; n < 300; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          byte_t acc;
          acc = 0;
          for (int k = 0; k < 4; k++) acc ^= mul(din[127-32*c-8*k -: 8], m[r][k]);
          e[127-32*c-8*r -: 8] = acc;
        end
      #1;
      checks++;
      if (dout !== e) begin failures++; $display("FAIL %h -> %h exp %h", din, dout, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
