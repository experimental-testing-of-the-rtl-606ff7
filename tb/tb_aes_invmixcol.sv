// tb_aes_invmixcol: checks InvMixColumn against published example columns, a
// GF(2^8) reference with the matrix rows [0E 0B 0D 09], and the round trip
// InvMixColumn(MixColumn(x)) = x with the MixColumn module.
module tb_aes_invmixcol;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  block_t din, dout, mc_out;
  aes_invmixcol dut (.din(din), .dout(dout));
  block_t x;
  aes_mixcol u_mc (.din(x), .dout(mc_out));

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
    int m [4][4] = '{'{14, 11, 13, 9}, '{9, 14, 11, 13}, '{13, 9, 14, 11}, '{11, 13, 9, 14}};
    block_t e;
    din = {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}; #1;
    checks++;
    if (dout !== {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}) begin failures++; $display("FAIL known %h", dout); end
    for (int n = 0; n < 300; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      din = n[0] ? mc_out : x;
      #1;
      din = n[0] ? mc_out : x;
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
      if (n[0]) begin
        checks++;
        if (dout !== x) begin failures++; $display("FAIL round trip"); end
      end
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
