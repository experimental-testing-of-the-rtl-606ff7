// tb_ipsec_crypto_top_ext: end-to-end test of the double-algorithm engine
// with the extended architectures selected (EXTENDED = 1): inner-round
// pipelined AES (two blocks in flight, 2(Nr+1) clocks per block) and the
// 16-stage Triple DES ring (48 clocks per block, up to 16 blocks in flight).
//
// The stimulus and expected values are those of the test of the basic
// engine: the AES side expands a 128-, a 192- and a 256-bit key, loads IVs,
// interleaves encryption and decryption of six streams, expands a fourth key
// while blocks are in flight and encrypts one stream back to back with it;
// the Triple DES side writes two key triples into banks 0 and 2, encrypts and
// decrypts four CBC blocks with each (the bank number is used as the stream
// number) and writes a third triple while running. Expected values come from
// independent software implementations. Besides every output block and its
// latency, the test counts the mechanisms of the basic test plus those of
// the extended units: two AES blocks in flight, AES hold-off of a same-stream
// encryption, several Triple DES blocks in the ring, and Triple DES hold-off.
// A mechanism that never happened counts as a failure.
module tb_ipsec_crypto_top_ext;
  import aes_pkg::*;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- reference data ----------------
  block_t PT [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
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

  dblock_t DPT [4] = '{64'h4e6f772069732074, 64'h6865207469672074, 64'h68652074696d6520, 64'h666f7220616c6c20};
  dblock_t DCT [2][4] = '{
    '{64'hf3c0ff026c023089, 64'hb2ef2b3c857983a3, 64'hc693f92916e901fc, 64'h963aff62ce34d0db},
    '{64'h7940af13a65b6d44, 64'hcdbbd3fecac3d628, 64'h927eff195e52ea92, 64'h46e181b9fbe78f65}};
  dblock_t DKEYS [2][3] = '{
    '{64'h0123456789abcdef, 64'h23456789abcdef01, 64'h456789abcdef0123},
    '{64'h133457799bbcdff1, 64'h0e329232ea6d0d73, 64'h7ca110454a1a6e57}};
  dblock_t DIVS [2] = '{64'h1234567890abcdef, 64'h0};

  // ---------------- DUT ----------------
  logic        aes_kx_start = 0, aes_kx_key_valid = 0, aes_kx_key_ready, aes_kx_busy, aes_kx_done;
  keylen_e     aes_kx_keylen = KEY128;
  logic [3:0]  aes_kx_set = 0;
  logic [63:0] aes_kx_key = 0;
  logic        aes_iv_we = 0, aes_iv_ready;
  logic [3:0]  aes_iv_stream = 0;
  block_t      aes_iv_data = 0;
  logic        aes_in_valid = 0, aes_in_ready, aes_in_dec = 0;
  block_t      aes_in_data = 0;
  logic [3:0]  aes_in_stream = 0, aes_in_keyset = 0;
  keylen_e     aes_in_keylen = KEY128;
  logic        aes_out_valid, aes_out_dec;
  block_t      aes_out_data;
  logic [3:0]  aes_out_stream;
  logic        des_kw_en = 0;
  logic [3:0]  des_kw_bank = 0, des_in_bank = 0, des_in_stream = 0, des_out_stream;
  logic [1:0]  des_kw_idx = 0;
  logic        aes_stall, des_stall;
  logic [63:0] des_kw_key = 0;
  logic        des_in_valid = 0, des_in_ready, des_in_dec = 0, des_in_first = 0;
  dblock_t     des_in_data = 0, des_in_iv = 0, des_out_data;
  logic        des_out_valid, des_out_dec;

  ipsec_crypto_top #(.EXTENDED(1'b1)) dut (.*);

  // ---------------- scoreboards and mechanism counters ----------------
  block_t     aexp_q [$];
  logic [3:0] astr_q [$];
  int         anr_q [$];
  longint     aacc_q [$];
  dblock_t    dexp_q [$];
  longint     dacc_q [$];
  longint     cyc = 0;
  int n_aes_enc = 0, n_aes_dec = 0, n_kl [3] = '{0, 0, 0}, n_kx_overlap = 0, n_same_stream_b2b = 0;
  int n_des_enc = 0, n_des_dec = 0, n_dkw_overlap = 0, n_both_busy = 0;
  int n_aes_two = 0, n_aes_stall = 0, n_des_multi = 0, n_des_stall = 0;
  logic [3:0] last_acc_stream = 4'hf;
  logic       last_acc_valid = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (aes_out_valid) begin
      block_t e; logic [3:0] s; int nr; longint a;
      e = aexp_q.pop_front(); s = astr_q.pop_front(); nr = anr_q.pop_front(); a = aacc_q.pop_front();
      checks += 3;
      if (aes_out_data !== e) begin failures++; $display("FAIL aes %h exp %h", aes_out_data, e); end
      if (aes_out_stream !== s) begin failures++; $display("FAIL aes stream"); end
      if (cyc - a != longint'(2 * (nr + 1))) begin failures++; $display("FAIL aes latency %0d", cyc - a); end
      if (aes_out_dec) n_aes_dec++; else n_aes_enc++;
    end
    if (aes_out_valid && aes_in_valid && aes_in_ready && aes_in_stream == aes_out_stream && !aes_in_dec && !aes_out_dec)
      n_same_stream_b2b++;
    if (des_out_valid) begin
      dblock_t e; longint a;
      e = dexp_q.pop_front(); a = dacc_q.pop_front();
      checks += 2;
      if (des_out_data !== e) begin failures++; $display("FAIL des %h exp %h", des_out_data, e); end
      if (cyc - a != 48) begin failures++; $display("FAIL des latency %0d", cyc - a); end
      if (des_out_dec) n_des_dec++; else n_des_enc++;
    end
    if (aes_kx_busy && !aes_in_ready) n_kx_overlap++;
    if (des_kw_en && !des_in_ready) n_dkw_overlap++;
    if (!aes_in_ready && !des_in_ready) n_both_busy++;
    if (dut.u_aes.g_ext.u_ed.slot[0].run && dut.u_aes.g_ext.u_ed.slot[1].run) n_aes_two++;
    if (aes_stall) n_aes_stall++;
    if ($countones(dut.g_tdes_ext.u_tdes.sv) > 1) n_des_multi++;
    if (des_stall) n_des_stall++;
  end

  // ---------------- AES stimulus ----------------
  task automatic aes_expand(int ki, logic [3:0] set);
    @(negedge clk);
    aes_kx_start = 1; aes_kx_keylen = keylen_e'(ki); aes_kx_set = set;
    @(negedge clk);
    aes_kx_start = 0;
    for (int w = 0; w < 2 + ki; w++) begin
      aes_kx_key = KEY[ki][255-64*w -: 64]; aes_kx_key_valid = 1;
      while (!aes_kx_key_ready) @(negedge clk);
      @(negedge clk);
    end
    aes_kx_key_valid = 0;
    while (aes_kx_busy) @(negedge clk);
  endtask

  task automatic aes_iv(logic [3:0] s);
    @(negedge clk);
    aes_iv_we = 1; aes_iv_stream = s; aes_iv_data = IV;
    while (!aes_iv_ready) begin aes_iv_we = 0; @(negedge clk); aes_iv_we = 1; end
    @(negedge clk);
    aes_iv_we = 0;
  endtask

  task automatic aes_send(block_t d, logic [3:0] s, logic [3:0] set, int ki, logic dec, block_t e);
    @(negedge clk);
    aes_in_valid = 1; aes_in_data = d; aes_in_stream = s; aes_in_keyset = set;
    aes_in_keylen = keylen_e'(ki); aes_in_dec = dec;
    #1;
    while (!aes_in_ready) @(negedge clk);
    @(posedge clk);
    aexp_q.push_back(e); astr_q.push_back(s); anr_q.push_back(10 + 2 * ki); aacc_q.push_back(cyc);
    n_kl[ki]++;
    #1 aes_in_valid = 0;
  endtask

  // ---------------- Triple DES stimulus ----------------
  task automatic des_key(logic [3:0] b, logic [1:0] i, dblock_t k);
    @(negedge clk);
    des_kw_en = 1; des_kw_bank = b; des_kw_idx = i; des_kw_key = k;
    @(negedge clk);
    des_kw_en = 0;
  endtask

  task automatic des_send(dblock_t d, logic [3:0] b, logic dec, logic first, dblock_t iv, dblock_t e);
    @(negedge clk);
    des_in_valid = 1; des_in_data = d; des_in_bank = b; des_in_stream = b; des_in_dec = dec; des_in_first = first; des_in_iv = iv;
    #1;
    while (!des_in_ready) @(negedge clk);
    @(posedge clk);
    dexp_q.push_back(e); dacc_q.push_back(cyc);
    #1 des_in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin : aes_side
        for (int k = 0; k < 3; k++) aes_expand(k, 4'(k));
        for (int k = 0; k < 3; k++) begin aes_iv(4'(2 * k)); aes_iv(4'(2 * k + 9)); end
        aes_iv(4'd3);
        fork
          for (int b = 0; b < 4; b++)
            for (int k = 0; k < 3; k++) begin
              aes_send(PT[b], 4'(2 * k), 4'(k), k, 1'b0, CT[k][b]);
              aes_send(CT[k][b], 4'(2 * k + 9), 4'(k), k, 1'b1, PT[b]);
            end
          begin
            repeat (20) @(posedge clk);
            aes_expand(2, 4'd3);
          end
        join
        for (int b = 0; b < 4; b++) aes_send(PT[b], 4'd3, 4'd3, 2, 1'b0, CT[2][b]);
      end
      begin : des_side
        for (int s = 0; s < 2; s++)
          for (int i = 0; i < 3; i++) des_key(4'(2 * s), 2'(i), DKEYS[s][i]);
        fork
          for (int s = 0; s < 2; s++) begin
            for (int b = 0; b < 4; b++) des_send(DPT[b], 4'(2 * s), 1'b0, b == 0, DIVS[s], DCT[s][b]);
            for (int b = 0; b < 4; b++) des_send(DCT[s][b], 4'(2 * s), 1'b1, b == 0, DIVS[s], DPT[b]);
          end
          begin
            repeat (100) @(posedge clk);
            for (int i = 0; i < 3; i++) des_key(4'd1, 2'(i), DKEYS[1][i]);
          end
        join
        des_send(DPT[0], 4'd1, 1'b0, 1'b1, DIVS[1], DCT[1][0]);
      end
    join
    repeat (60) @(posedge clk);
    checks += 16;
    if (n_aes_two == 0)   begin failures++; $display("FAIL never two AES blocks in flight"); end
    if (n_aes_stall == 0) begin failures++; $display("FAIL no AES hold-off"); end
    if (n_des_multi == 0) begin failures++; $display("FAIL never several 3DES blocks in the ring"); end
    if (n_des_stall == 0) begin failures++; $display("FAIL no 3DES hold-off"); end
    if (aexp_q.size() != 0 || dexp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    if (n_aes_enc + n_aes_dec != 28) begin failures++; $display("FAIL aes outputs %0d", n_aes_enc + n_aes_dec); end
    if (n_des_enc + n_des_dec != 17) begin failures++; $display("FAIL des outputs %0d", n_des_enc + n_des_dec); end
    if (n_aes_enc == 0) begin failures++; $display("FAIL no AES encryption"); end
    if (n_aes_dec == 0) begin failures++; $display("FAIL no AES decryption"); end
    for (int k = 0; k < 3; k++) if (n_kl[k] == 0) begin failures++; $display("FAIL AES key length %0d unused", k); end
    if (n_kx_overlap == 0) begin failures++; $display("FAIL key expansion never overlapped"); end
    if (n_same_stream_b2b == 0) begin failures++; $display("FAIL no back-to-back blocks of one stream"); end
    if (n_des_enc == 0 || n_des_dec == 0) begin failures++; $display("FAIL 3DES enc/dec"); end
    if (n_dkw_overlap == 0) begin failures++; $display("FAIL 3DES key write never overlapped"); end
    if (n_both_busy == 0) begin failures++; $display("FAIL engines never busy together"); end
    $display("mechanisms: aes_enc=%0d aes_dec=%0d kl128=%0d kl192=%0d kl256=%0d kx_overlap=%0d same_stream_b2b=%0d",
             n_aes_enc, n_aes_dec, n_kl[0], n_kl[1], n_kl[2], n_kx_overlap, n_same_stream_b2b);
    $display("mechanisms: des_enc=%0d des_dec=%0d des_key_write_overlap=%0d both_busy=%0d",
             n_des_enc, n_des_dec, n_dkw_overlap, n_both_busy);
    $display("mechanisms: aes_two_in_flight=%0d aes_stall=%0d des_multi_in_ring=%0d des_stall=%0d",
             n_aes_two, n_aes_stall, n_des_multi, n_des_stall);
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
