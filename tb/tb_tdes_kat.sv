// tb_tdes_kat: Triple DES known answer tests on the top module.
//
// Runs the variable-plaintext and variable-key known answer tests of the
// Triple DES validation procedure through the Triple DES engine of the top
// module at its default parameters. Each test vector is a one-block CBC
// message with IV 0 (in_first with in_iv = 0), so the engine's result equals
// the single-block Triple DES value. Variable plaintext: all three keys
// 0101010101010101, plaintext with one bit set (64 vectors), encrypted and
// then the ciphertexts decrypted back. Variable key: the same single-bit key
// (with odd parity bits) as K1 = K2 = K3, plaintext 0 (56 vectors); each key
// is written into the bank not in use while the previous block is still
// being processed (banks 1 and 2 alternate). Expected ciphertexts come from an
// independent software implementation. Every result and the 48-clock latency
// are checked, and the results must follow each other with no idle clock
// between blocks (one block per 48 clocks).
module tb_tdes_kat;
  import aes_pkg::*;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam dblock_t VP_CT [64] = '{
    64'h95f8a5e5dd31d900, 64'hdd7f121ca5015619, 64'h2e8653104f3834ea, 64'h4bd388ff6cd81d4f,
    64'h20b9e767b2fb1456, 64'h55579380d77138ef, 64'h6cc5defaaf04512f, 64'h0d9f279ba5d87260,
    64'hd9031b0271bd5a0a, 64'h424250b37c3dd951, 64'hb8061b7ecd9a21e5, 64'hf15d0f286b65bd28,
    64'hadd0cc8d6e5deba1, 64'he6d5f82752ad63d1, 64'hecbfe3bd3f591a5e, 64'hf356834379d165cd,
    64'h2b9f982f20037fa9, 64'h889de068a16f0be6, 64'he19e275d846a1298, 64'h329a8ed523d71aec,
    64'he7fce22557d23c97, 64'h12a9f5817ff2d65d, 64'ha484c3ad38dc9c19, 64'hfbe00a8a1ef8ad72,
    64'h750d079407521363, 64'h64feed9c724c2faf, 64'hf02b263b328e2b60, 64'h9d64555a9a10b852,
    64'hd106ff0bed5255d7, 64'he1652c6b138c64a5, 64'he428581186ec8f46, 64'haeb5f5ede22d1a36,
    64'he943d7568aec0c5c, 64'hdf98c8276f54b04b, 64'hb160e4680f6c696f, 64'hfa0752b07d9c4ab8,
    64'hca3a2b036dbc8502, 64'h5e0905517bb59bcf, 64'h814eeb3b91d90726, 64'h4d49db1532919c9f,
    64'h25eb5fc3f8cf0621, 64'hab6a20c0620d1c6f, 64'h79e90dbc98f92cca, 64'h866ecedd8072bb0e,
    64'h8b54536f2f3e64a8, 64'hea51d3975595b86b, 64'hcaffc6ac4542de31, 64'h8dd45a2ddf90796c,
    64'h1029d55e880ec2d0, 64'h5d86cb23639dbea9, 64'h1d1ca853ae7c0c5f, 64'hce332329248f3228,
    64'h8405d1abe24fb942, 64'he643d78090ca4207, 64'h48221b9937748a23, 64'hdd7c0bbd61fafd54,
    64'h2fbc291a570db5c4, 64'he07c30d7e4e26e12, 64'h0953e2258e8e90a1, 64'h5b711bc4ceebf2ee,
    64'hcc083f1e6d9e85f6, 64'hd2fd8867d50d2dfe, 64'h06e7ea22ce92708f, 64'h166b40b44aba4bd6};
  localparam dblock_t VK_KEY [56] = '{
    64'h8001010101010101, 64'h4001010101010101, 64'h2001010101010101, 64'h1001010101010101,
    64'h0801010101010101, 64'h0401010101010101, 64'h0201010101010101, 64'h0180010101010101,
    64'h0140010101010101, 64'h0120010101010101, 64'h0110010101010101, 64'h0108010101010101,
    64'h0104010101010101, 64'h0102010101010101, 64'h0101800101010101, 64'h0101400101010101,
    64'h0101200101010101, 64'h0101100101010101, 64'h0101080101010101, 64'h0101040101010101,
    64'h0101020101010101, 64'h0101018001010101, 64'h0101014001010101, 64'h0101012001010101,
    64'h0101011001010101, 64'h0101010801010101, 64'h0101010401010101, 64'h0101010201010101,
    64'h0101010180010101, 64'h0101010140010101, 64'h0101010120010101, 64'h0101010110010101,
    64'h0101010108010101, 64'h0101010104010101, 64'h0101010102010101, 64'h0101010101800101,
    64'h0101010101400101, 64'h0101010101200101, 64'h0101010101100101, 64'h0101010101080101,
    64'h0101010101040101, 64'h0101010101020101, 64'h0101010101018001, 64'h0101010101014001,
    64'h0101010101012001, 64'h0101010101011001, 64'h0101010101010801, 64'h0101010101010401,
    64'h0101010101010201, 64'h0101010101010180, 64'h0101010101010140, 64'h0101010101010120,
    64'h0101010101010110, 64'h0101010101010108, 64'h0101010101010104, 64'h0101010101010102};
  localparam dblock_t VK_CT [56] = '{
    64'h95a8d72813daa94d, 64'h0eec1487dd8c26d5, 64'h7ad16ffb79c45926, 64'hd3746294ca6a6cf3,
    64'h809f5f873c1fd761, 64'hc02faffec989d1fc, 64'h4615aa1d33e72f10, 64'h2055123350c00858,
    64'hdf3b99d6577397c8, 64'h31fe17369b5288c9, 64'hdfdd3cc64dae1642, 64'h178c83ce2b399d94,
    64'h50f636324a9b7f80, 64'ha8468ee3bc18f06d, 64'ha2dc9e92fd3cde92, 64'hcac09f797d031287,
    64'h90ba680b22aeb525, 64'hce7a24f350e280b6, 64'h882bff0aa01a0b87, 64'h25610288924511c2,
    64'hc71516c29c75d170, 64'h5199c29a52c9f059, 64'hc22f0a294a71f29f, 64'hee371483714c02ea,
    64'ha81fbd448f9e522f, 64'h4f644c92e192dfed, 64'h1afa9a66a6df92ae, 64'hb3c1cc715cb879d8,
    64'h19d032e64ab0bd8b, 64'h3cfaa7a7dc8720dc, 64'hb7265f7f447ac6f3, 64'h9db73b3c0d163f54,
    64'h8181b65babf4a975, 64'h93c9b64042eaa240, 64'h5570530829705592, 64'h8638809e878787a0,
    64'h41b9a79af79ac208, 64'h7a9be42f2009a892, 64'h29038d56ba6d2745, 64'h5495c6abf1e5df51,
    64'hae13dbd561488933, 64'h024d1ffa8904e389, 64'hd1399712f99bf02e, 64'h14c1d7c1cffec79e,
    64'h1de5279dae3bed6f, 64'he941a33f85501303, 64'hda99dbbc9a03f379, 64'hb7fc92f91d8e92e9,
    64'hae8e5caa3ca04e85, 64'h9cc62df43b6eed74, 64'hd863dbb5c59a91a0, 64'ha1ab2190545b91d7,
    64'h0875041e64c570f7, 64'h5a594528bebef1cc, 64'hfcdb3291de21f0c0, 64'h869efd7f9f265a09};

  // ---------------- DUT (AES side idle) ----------------
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

  dblock_t exp_q [$];
  longint  acc_q [$];
  longint  last_out = -1;
  int      n_out = 0, n_gap = 0, n_kw_busy = 0;

  always @(posedge clk) if (rst_n) begin
    if (des_kw_en && !des_in_ready) n_kw_busy++;
    if (des_out_valid) begin
      dblock_t e; longint a;
      e = exp_q.pop_front(); a = acc_q.pop_front();
      checks += 2;
      if (des_out_data !== e) begin failures++; $display("FAIL out %h exp %h (result %0d)", des_out_data, e, n_out); end
      if (cyc - a != 48) begin failures++; $display("FAIL latency %0d", cyc - a); end
      if (last_out >= 0 && cyc - last_out != 48) n_gap++;
      last_out = cyc;
      n_out++;
    end
  end

  task automatic key3(logic [3:0] b, dblock_t k);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      des_kw_en = 1; des_kw_bank = b; des_kw_idx = 2'(i); des_kw_key = k;
    end
    @(negedge clk);
    des_kw_en = 0;
  endtask

  task automatic send(dblock_t d, logic [3:0] b, logic dec, dblock_t e);
    @(negedge clk);
    des_in_valid = 1; des_in_data = d; des_in_bank = b; des_in_dec = dec;
    des_in_first = 1; des_in_iv = 64'h0;
    #1;
    while (!des_in_ready) @(negedge clk);
    @(posedge clk);
    exp_q.push_back(e); acc_q.push_back(cyc);
    #1 des_in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    key3(4'd0, 64'h0101010101010101);
    // variable plaintext
    for (int i = 0; i < 64; i++) send(64'h1 << (63 - i), 4'd0, 1'b0, VP_CT[i]);
    for (int i = 0; i < 64; i++) send(VP_CT[i], 4'd0, 1'b1, 64'h1 << (63 - i));
    // variable key: write the next key into the idle bank while a block runs
    key3(4'd1, VK_KEY[0]);
    for (int i = 0; i < 56; i++) begin
      send(64'h0, 4'(1 + (i % 2)), 1'b0, VK_CT[i]);
      if (i < 55) key3(4'(1 + ((i + 1) % 2)), VK_KEY[i + 1]);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
    checks += 3;
    if (n_out != 184)   begin failures++; $display("FAIL outputs %0d", n_out); end
    if (n_gap != 0)     begin failures++; $display("FAIL %0d gaps between results", n_gap); end
    if (n_kw_busy == 0) begin failures++; $display("FAIL no key write during processing"); end
    $display("kat: results=%0d key_writes_while_busy=%0d", n_out, n_kw_busy);
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
