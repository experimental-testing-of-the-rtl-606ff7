// tb_aes_core: self-checking test of the complete Rijndael cipher in CBC mode.
//
// Expected values are the CBC examples of NIST SP 800-38A (AES-128/192/256,
// four blocks each, IV 000102..0f), which were cross-checked against an
// independent software implementation. The test
//  - expands three main keys (128, 192, 256 bits) into key sets 0..2,
//  - interleaves encryption and decryption of six streams, one block each in
//    turn, with all three key lengths (immediate key-length switching),
//  - expands a fourth key into set 3 while blocks are being processed,
//  - then encrypts four blocks of one stream back to back with set 3,
// and checks every output block, its stream tag, and that each block takes
// exactly Nr+1 clocks from acceptance to result.
module tb_aes_core;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  block_t PT  [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                      128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  block_t CT [3][4] = '{
    '{128'h7649abac8119b246cee98e9b12e9197d, 128'h5086cb9b507219ee95db113a917678b2,
      128'h73bed6b8e3c1743b7116e69e22229516, 128'h3ff1caa1681fac09120eca307586e1a7},
    '{128'h4f021db243bc633d7178183a9fa071e8, 128'hb4d9ada9ad7dedf4e5e738763f69145a,
      128'h571b242012fb7ae07fa9baac3df102e0, 128'h08b0e27988598881d920a9e64f5615cd},
    '{128'hf58c4c04d6e5f1ba779eabfb5f7bfbd6, 128'h9cfc4e967edb808d679f777bc6702c7d,
      128'h39f23369a9d9bacfa530e26304231461, 128'hb2eb05e2c39be9fcda6c19078c6a9d1b}};
  logic [255:0] KEY [3] = '{
    {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0},
    {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0},
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4};
  localparam block_t IV = 128'h000102030405060708090a0b0c0d0e0f;

  logic        kx_start = 0, kx_key_valid = 0, kx_key_ready, kx_busy, kx_done;
  keylen_e     kx_keylen = KEY128;
  logic [3:0]  kx_set = 0;
  logic [63:0] kx_key = 0;
  logic        iv_we = 0, iv_ready;
  logic [3:0]  iv_stream = 0;
  block_t      iv_data = 0;
  logic        in_valid = 0, in_ready, in_dec = 0;
  block_t      in_data = 0;
  logic [3:0]  in_stream = 0, in_keyset = 0;
  keylen_e     in_keylen = KEY128;
  logic        out_valid, out_dec, stall;
  block_t      out_data;
  logic [3:0]  out_stream;

  aes_core dut (.*);

  // expected results, in order
  block_t     exp_q [$];
  logic [3:0] exps_q [$];
  int         expn_q [$];
  longint     acc_t [$];
  longint     cyc = 0;
  int         n_out = 0, n_enc = 0, n_dec = 0, n_kl [3] = '{0, 0, 0}, n_overlap = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      block_t e; logic [3:0] s; int nr; longint a;
      e = exp_q.pop_front(); s = exps_q.pop_front(); nr = expn_q.pop_front(); a = acc_t.pop_front();
      checks += 3;
      if (out_data !== e) begin failures++; $display("FAIL data %h exp %h", out_data, e); end
      if (out_stream !== s) begin failures++; $display("FAIL stream %0d exp %0d", out_stream, s); end
      if (cyc - a != longint'(nr + 1)) begin failures++; $display("FAIL latency %0d exp %0d", cyc - a, nr + 1); end
      n_out++;
      if (out_dec) n_dec++; else n_enc++;
    end
    if (rst_n && kx_busy && dut.g_basic.u_ed.running) n_overlap++;
  end

  // Stimulus changes on the falling edge; a handshake completes on the
  // rising edge at which valid and ready are both high.
  task automatic expand(input int ki, input logic [3:0] set);
    int nw;
    nw = (ki == 0) ? 2 : (ki == 1) ? 3 : 4;
    @(negedge clk);
    kx_start = 1; kx_keylen = keylen_e'(ki); kx_set = set;
    @(negedge clk);
    kx_start = 0;
    for (int w = 0; w < nw; w++) begin
      kx_key = KEY[ki][255-64*w -: 64]; kx_key_valid = 1;
      while (!kx_key_ready) @(negedge clk);
      @(negedge clk);
    end
    kx_key_valid = 0;
  endtask

  task automatic set_iv(input logic [3:0] s, input block_t v);
    @(negedge clk);
    iv_we = 1; iv_stream = s; iv_data = v;
    while (!iv_ready) begin iv_we = 0; @(negedge clk); iv_we = 1; end
    @(negedge clk);
    iv_we = 0;
  endtask

  task automatic send(input block_t d, input logic [3:0] s, input logic [3:0] set, input int ki,
                      input logic dec, input block_t e);
    @(negedge clk);
    in_valid = 1; in_data = d; in_stream = s; in_keyset = set; in_keylen = keylen_e'(ki); in_dec = dec;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    exp_q.push_back(e); exps_q.push_back(s); expn_q.push_back(10 + 2 * ki); acc_t.push_back(cyc);
    n_kl[ki]++;
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      expand(k, 4'(k));
      while (kx_busy) @(posedge clk);
    end
    for (int k = 0; k < 3; k++) begin
      set_iv(4'(2 * k), IV);       // encrypting streams 0, 2, 4
      set_iv(4'(2 * k + 9), IV);   // decrypting streams 9, 11, 13
    end
    set_iv(4'd3, IV);
    fork
      begin
        for (int b = 0; b < 4; b++)
          for (int k = 0; k < 3; k++) begin
            send(PT[b], 4'(2 * k), 4'(k), k, 1'b0, CT[k][b]);
            send(CT[k][b], 4'(2 * k + 9), 4'(k), k, 1'b1, PT[b]);
          end
      end
      begin
        repeat (20) @(posedge clk);
        expand(0, 4'd3);             // new key set built while blocks flow
      end
    join
    while (kx_busy) @(posedge clk);
    for (int b = 0; b < 4; b++) send(PT[b], 4'd3, 4'd3, 0, 1'b0, CT[0][b]);
    repeat (20) @(posedge clk);
    checks += 5;
    if (n_out != 28 || exp_q.size() != 0) begin failures++; $display("FAIL outputs %0d", n_out); end
    if (n_enc == 0 || n_dec == 0) begin failures++; $display("FAIL enc/dec not both exercised"); end
    for (int k = 0; k < 3; k++) if (n_kl[k] == 0) begin failures++; $display("FAIL key length %0d unused", k); end
    if (n_overlap == 0) begin failures++; $display("FAIL key expansion never overlapped processing"); end
    $display("blocks enc=%0d dec=%0d keylen128/192/256=%0d/%0d/%0d overlap_cycles=%0d",
             n_enc, n_dec, n_kl[0], n_kl[1], n_kl[2], n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
