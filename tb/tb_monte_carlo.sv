// tb_monte_carlo: reduced CBC Monte Carlo test of the double-algorithm engine.
//
// The Monte Carlo test chains encryptions so that every result depends on all
// earlier ones: block j is encrypted in CBC mode with plaintext C(j-2) (the
// IV for j = 1, P for j = 0), and after every INNER blocks the key is changed
// and the chain continues. The full test runs 4,000,000 encryptions with a
// key change every 10,000; here each chain has OUTER = 3 key periods of
// INNER = 40 blocks, for AES with 128-, 192- and 256-bit keys (three
// chains on streams 0, 1, 2, run concurrently and sharing the AES ports) and
// for Triple DES at the same time, on the top module at its default
// parameters. New key: AES key XOR the last ciphertext bits (the last one or
// two blocks, as many bits as the key); Triple DES: each of the three keys
// XOR the last ciphertext. The last ciphertext of every key period is
// compared with the value of an independent software implementation, and the
// latency of every block is checked (Nr+1 clocks for AES, 48 for Triple DES).
// A new AES key is expanded into a fresh key set while the chain waits (and
// the other chains keep running, which is counted); a new Triple DES key
// triple is written into the other bank.
module tb_monte_carlo;
  import aes_pkg::*;
  import des_pkg::*;

  localparam int OUTER = 3, INNER = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [255:0] AK [3] = '{
    256'h2b7e151628aed2a6abf7158809cf4f3c_00000000000000000000000000000000,
    256'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b_0000000000000000,
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4};
  block_t  IV = 128'h000102030405060708090a0b0c0d0e0f;
  block_t  P  = 128'h6bc1bee22e409f96e93d7e117393172a;
  block_t  AEXP [3][OUTER] = '{
    '{128'hdc10a2c761b2c78d0d09f05bdca60885, 128'haef6c73ed36d0e66a5eed0777c10c850, 128'h18ed246a5758320a2b230907825166e3},
    '{128'h1f6cc3b5fd6772417116828dfe1948d9, 128'h9a749f936c15a988e8fe8b7846f93b4c, 128'h23fd868a0093cfdab71f0ae173af5a65},
    '{128'h9bc1ffb81d0d7ec44e1e768f5fefbf57, 128'h9a207726778d16c008256e5a69f6e7d4, 128'ha6e33f4ced3033a5d6f4c948064ac470}};
  dblock_t DK [3] = '{64'h0123456789abcdef, 64'h23456789abcdef01, 64'h456789abcdef0123};
  dblock_t DIV = 64'h1234567890abcdef;
  dblock_t DP  = 64'h4e6f772069732074;
  dblock_t DEXP [OUTER] = '{64'h06605dbff80ed535, 64'h84727d7f20e2ddfa, 64'h06857a1b709a31e2};

  // ---------------- DUT ----------------
  logic        aes_kx_start = 0, aes_kx_key_valid = 0, aes_kx_key_ready, aes_kx_busy, aes_kx_done;
  keylen_e     aes_kx_keylen = KEY128, aes_in_keylen = KEY128;
  logic [3:0]  aes_kx_set = 0, aes_iv_stream = 0, aes_in_stream = 0, aes_in_keyset = 0, aes_out_stream;
  logic [63:0] aes_kx_key = 0;
  logic        aes_iv_we = 0, aes_iv_ready, aes_in_valid = 0, aes_in_ready, aes_in_dec = 0;
  block_t      aes_iv_data = 0, aes_in_data = 0, aes_out_data;
  logic        aes_out_valid, aes_out_dec, aes_stall;
  logic        des_kw_en = 0;
  logic [3:0]  des_kw_bank = 0, des_in_bank = 0, des_in_stream = 0, des_out_stream;
  logic [1:0]  des_kw_idx = 0;
  logic [63:0] des_kw_key = 0;
  logic        des_in_valid = 0, des_in_ready, des_in_dec = 0, des_in_first = 0;
  dblock_t     des_in_data = 0, des_in_iv = 0, des_out_data;
  logic        des_out_valid, des_out_dec, des_stall;

  ipsec_crypto_top dut (.*);

  int n_aes = 0, n_des = 0, n_aes_kchg = 0, n_des_kchg = 0, n_kx_overlap = 0;
  semaphore sem_in = new(1), sem_kx = new(1);   // the three AES chains share the ports

  always @(posedge clk) if (rst_n && aes_kx_busy && !aes_in_ready) n_kx_overlap++;

  // ---------------- AES helpers ----------------
  task automatic aes_expand(logic [255:0] key, int ki, logic [3:0] set);
    sem_kx.get(1);
    @(negedge clk);
    aes_kx_start = 1; aes_kx_keylen = keylen_e'(ki); aes_kx_set = set;
    @(negedge clk);
    aes_kx_start = 0;
    for (int w = 0; w < 2 + ki; w++) begin
      aes_kx_key = key[255-64*w -: 64]; aes_kx_key_valid = 1;
      while (!aes_kx_key_ready) @(negedge clk);
      @(negedge clk);
    end
    aes_kx_key_valid = 0;
    while (aes_kx_busy) @(negedge clk);
    sem_kx.put(1);
  endtask

  task automatic aes_iv(logic [3:0] s, block_t v);
    @(negedge clk);
    aes_iv_we = 1; aes_iv_stream = s; aes_iv_data = v;
    while (!aes_iv_ready) begin aes_iv_we = 0; @(negedge clk); aes_iv_we = 1; end
    @(negedge clk);
    aes_iv_we = 0;
  endtask

  // one CBC encryption: send, wait for the result, check the latency
  task automatic aes_block(block_t d, logic [3:0] s, logic [3:0] set, int ki, output block_t c);
    longint t0;
    sem_in.get(1);
    @(negedge clk);
    aes_in_valid = 1; aes_in_data = d; aes_in_stream = s; aes_in_keyset = set;
    aes_in_keylen = keylen_e'(ki); aes_in_dec = 0;
    #1;
    while (!aes_in_ready) @(negedge clk);
    @(posedge clk);
    t0 = cyc;
    #1 aes_in_valid = 0;
    sem_in.put(1);
    do @(posedge clk); while (!(aes_out_valid && aes_out_stream == s));
    c = aes_out_data;
    checks++;
    if (cyc - t0 != longint'(num_rounds(keylen_e'(ki)) + 1)) begin
      failures++; $display("FAIL aes latency %0d", cyc - t0);
    end
    n_aes++;
  endtask

  // ---------------- Triple DES helpers ----------------
  task automatic des_key(logic [3:0] b, logic [1:0] i, dblock_t k);
    @(negedge clk);
    des_kw_en = 1; des_kw_bank = b; des_kw_idx = i; des_kw_key = k;
    @(negedge clk);
    des_kw_en = 0;
  endtask

  task automatic des_block(dblock_t d, logic [3:0] b, logic first, output dblock_t c);
    longint t0;
    @(negedge clk);
    des_in_valid = 1; des_in_data = d; des_in_bank = b; des_in_dec = 0;
    des_in_first = first; des_in_iv = DIV;
    #1;
    while (!des_in_ready) @(negedge clk);
    @(posedge clk);
    t0 = cyc;
    #1 des_in_valid = 0;
    do @(posedge clk); while (!des_out_valid);
    c = des_out_data;
    checks++;
    if (cyc - t0 != 48) begin failures++; $display("FAIL des latency %0d", cyc - t0); end
    n_des++;
  endtask

  // one Monte Carlo chain of the AES key length ki on stream ki
  task automatic aes_chain(int ki);
    logic [255:0] key;
    block_t       pt, c, c1, c2;
    key = AK[ki];
    pt = P; c1 = IV; c2 = IV;
    for (int o = 0; o < OUTER; o++) begin
      aes_expand(key, ki, 4'(2 * ki + (o % 2)));
      for (int j = 0; j < INNER; j++) begin
        aes_block(pt, 4'(ki), 4'(2 * ki + (o % 2)), ki, c);
        pt = (o == 0 && j == 0) ? IV : c1;
        c2 = c1; c1 = c;
      end
      checks++;
      if (c1 !== AEXP[ki][o]) begin
        failures++; $display("FAIL aes key %0d period %0d: %h exp %h", 128 + 64 * ki, o, c1, AEXP[ki][o]);
      end
      // key change: XOR with the last ciphertext bits
      case (ki)
        0: key = key ^ {c1, 128'h0};
        1: key = key ^ {c2[63:0], c1, 64'h0};
        default: key = key ^ {c2, c1};
      endcase
      n_aes_kchg++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin : aes_side
        for (int ki = 0; ki < 3; ki++) aes_iv(4'(ki), IV);
        for (int ki = 0; ki < 3; ki++)
          fork
            automatic int kk = ki;
            aes_chain(kk);
          join_none
        wait fork;
      end
      begin : des_side
        dblock_t k [3];
        dblock_t pt, c, c1;
        for (int i = 0; i < 3; i++) k[i] = DK[i];
        pt = DP; c1 = DIV;
        for (int o = 0; o < OUTER; o++) begin
          for (int i = 0; i < 3; i++) des_key(4'(o % 2), 2'(i), k[i]);
          for (int j = 0; j < INNER; j++) begin
            des_block(pt, 4'(o % 2), o == 0 && j == 0, c);
            pt = (o == 0 && j == 0) ? DIV : c1;
            c1 = c;
          end
          checks++;
          if (c1 !== DEXP[o]) begin failures++; $display("FAIL des period %0d: %h exp %h", o, c1, DEXP[o]); end
          for (int i = 0; i < 3; i++) k[i] = k[i] ^ c1;
          n_des_kchg++;
        end
      end
    join
    checks += 3;
    if (n_kx_overlap == 0) begin failures++; $display("FAIL key expansion never overlapped a chain"); end
    if (n_aes != 3 * OUTER * INNER) begin failures++; $display("FAIL aes blocks %0d", n_aes); end
    if (n_des != OUTER * INNER)     begin failures++; $display("FAIL des blocks %0d", n_des); end
    $display("monte carlo: aes blocks=%0d key changes=%0d, 3des blocks=%0d key changes=%0d",
             n_aes, n_aes_kchg, n_des, n_des_kchg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
