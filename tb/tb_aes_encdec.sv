// tb_aes_encdec: checks the iterative Rijndael encryption/decryption unit on
// its own. The round key memory is instantiated next to it and filled
// directly with the published AES-128 round keys of the FIPS-197 example key
// 2b7e1516...; the key scheduler is not used. Two streams are processed
// interleaved (one encrypting, one decrypting, NIST SP 800-38A CBC example),
// followed by a stream that encrypts back to back. Checks: every output block,
// its stream and direction tags, the 11-clock block latency, that blocks are
// accepted back to back, and that IV writes are refused while busy.
module tb_aes_encdec;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  block_t RK [11] = '{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};
  block_t PT [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                     128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  block_t CT [4] = '{128'h7649abac8119b246cee98e9b12e9197d, 128'h5086cb9b507219ee95db113a917678b2,
                     128'h73bed6b8e3c1743b7116e69e22229516, 128'h3ff1caa1681fac09120eca307586e1a7};
  localparam block_t IV = 128'h000102030405060708090a0b0c0d0e0f;

  logic        in_valid = 0, in_ready, in_dec = 0, iv_we = 0, iv_ready, out_valid, out_dec;
  block_t      in_data = 0, iv_data = 0, out_data, rk_key;
  logic [3:0]  in_stream = 0, in_keyset = 0, iv_stream = 0, out_stream, rk_set, rk_round;
  keylen_e     in_keylen = KEY128;
  logic        rk_rd_en;
  logic        we = 0, whalf = 0;
  logic [3:0]  wset = 0, wround = 0;
  logic [63:0] wdata = 0;

  aes_encdec dut (.*);
  aes_roundkey_mem u_rkm (.clk(clk), .we(we), .wset(wset), .wround(wround), .whalf(whalf), .wdata(wdata),
                          .rd_en(rk_rd_en), .rset(rk_set), .rround(rk_round), .rkey(rk_key));

  block_t     exp_q [$];
  logic [4:0] tag_q [$];
  longint     acc_t [$];
  longint     cyc = 0;
  int         n_out = 0, n_b2b = 0, n_ivblock = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      block_t e; logic [4:0] g; longint a;
      e = exp_q.pop_front(); g = tag_q.pop_front(); a = acc_t.pop_front();
      checks += 3;
      if (out_data !== e) begin failures++; $display("FAIL data %h exp %h", out_data, e); end
      if ({out_dec, out_stream} !== g) begin failures++; $display("FAIL tags"); end
      if (cyc - a != 11) begin failures++; $display("FAIL latency %0d", cyc - a); end
      n_out++;
    end
    if (rst_n && out_valid && in_valid && in_ready) n_b2b++;
    if (rst_n && iv_we && !iv_ready) n_ivblock++;
  end

  task automatic send(block_t d, logic [3:0] s, logic dec, block_t e);
    @(negedge clk);
    in_valid = 1; in_data = d; in_stream = s; in_dec = dec;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    exp_q.push_back(e); tag_q.push_back({dec, s}); acc_t.push_back(cyc);
    #1 in_valid = 0;
  endtask

  task automatic set_iv(logic [3:0] s);
    @(negedge clk);
    iv_we = 1; iv_stream = s; iv_data = IV;
    @(negedge clk);
    iv_we = 0;
  endtask

  initial begin
    for (int r = 0; r < 11; r++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        we = 1; wset = 4'd6; wround = 4'(r); whalf = h[0]; wdata = h ? RK[r][63:0] : RK[r][127:64];
      end
    @(negedge clk) we = 0;
    rst_n = 1;
    in_keyset = 4'd6;
    set_iv(4'd1); set_iv(4'd14); set_iv(4'd8);
    for (int b = 0; b < 4; b++) begin
      send(PT[b], 4'd1, 1'b0, CT[b]);
      send(CT[b], 4'd14, 1'b1, PT[b]);
    end
    for (int b = 0; b < 4; b++) send(PT[b], 4'd8, 1'b0, CT[b]);
    // an IV write attempted while a block is in flight must be refused
    @(negedge clk);
    checks++;
    if (iv_ready) begin failures++; $display("FAIL iv_ready while busy"); end
    repeat (15) @(posedge clk);
    checks += 2;
    if (n_out != 12) begin failures++; $display("FAIL outputs %0d", n_out); end
    if (n_b2b < 10) begin failures++; $display("FAIL back-to-back %0d", n_b2b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
