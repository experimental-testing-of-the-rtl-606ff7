// tb_tdes_pipe: self-checking test of the unrolled, pipelined Triple DES.
//
// Expected values come from an independent software implementation of Triple
// DES (EDE, CBC): 16 streams of three blocks each, with four key triples in
// banks 0, 5, 9 and 15 (stream s uses triple s mod 4) and one IV per stream.
// Phase 1 encrypts the blocks round-robin over the streams (block 0 of every
// stream, then block 1, ...), which fills all 16 ring slots, makes the
// hold-off of a second encryption of the same stream and the blocking of the
// input by fed-back blocks happen, and lets a key be written into bank 3
// while the ring is busy. Phase 2 decrypts the ciphertexts: stream 3's three
// blocks back to back (decryptions of one stream overlap in the ring), then
// the others round-robin. Phase 3 offers two encryptions of one stream back
// to back: the second is held off until the first leaves. Every result, its stream and direction, the
// 48-clock latency, the 16-block occupancy and the phase 1 duration (48
// blocks in 16 slots: 15 + 3 x 48 clocks from the first entry to the last
// result) are checked.
module tb_tdes_pipe;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dblock_t KEYS [4][3] = '{'{64'ha54dca182530bb1d, 64'h6d132cded6237b2e, 64'hd91e3f721fcb1971},
    '{64'h174494d6493c9d5c, 64'h3460be31201e69fe, 64'hdaa0eee8b9997f5c},
    '{64'h7c2999fdafe59325, 64'h3cd654af4dfad714, 64'h27a0aeb3fee9232f},
    '{64'h8af2211f9ee491c5, 64'hb10becb5563bfc1e, 64'h6f93427ecbc8fe29}};
  dblock_t IVS [16] = '{64'h55e5cd8e46dc8ed4, 64'hb7c2764d2a5a4d76, 64'h7706f85d8690024a, 64'hd6bda3401be9c8cb, 64'hccc935f6cd1f6122, 64'h6ae15338ae1a3400, 64'h4d33ba0d246ac04c, 64'h81b1baf23e3bf9ee, 64'hf5f79f2b4934af87, 64'hf5520b69b94b0d98, 64'h2e85bb55b672a872, 64'h637acd7466fcb60e, 64'h0e8ff18463b0e4b2, 64'hba29703474f064ac, 64'h68f700f5b02b3dc6, 64'h66f45bdeaa2ccaed};
  dblock_t PT [16][3] = '{'{64'hcd2b5157410e4dee, 64'h4af2b34f430a0734, 64'h47de636c0e806c95},
    '{64'h7ba684d6431fb5ea, 64'hd7424d09e15d024c, 64'h5848f23d1fa6f736},
    '{64'h1d7f618d1532e70e, 64'h20e2a6668de7f47e, 64'h8467e546d53ec8e2},
    '{64'ha1257bdb256c9b3e, 64'h4fbb498146ef7030, 64'hcbf9537252dccead},
    '{64'hd764b6a32fbb09ad, 64'heae109c4a9972039, 64'h75352b878b145c8a},
    '{64'h42d884cf4cfda72d, 64'h8e1d5dd92589082d, 64'h852a7122873ee805},
    '{64'hadd58942167a3852, 64'h86195c679f9c6994, 64'he45b8ab109801207},
    '{64'h0961f37de436ddfd, 64'hc99d6e75af6547cf, 64'hb11b42072482dc53},
    '{64'h1c2bc3907c9617eb, 64'h5e5089e40186baa8, 64'ha57d119e6fb65d00},
    '{64'habc32af38e667f02, 64'h2e872d49cc15c90b, 64'h999b772b4fc7a6fd},
    '{64'h4c914a16db470875, 64'h2b0f1544b835c0e7, 64'h19097dfa8701e923},
    '{64'h2f21f28126877869, 64'h76ebfcc327f59317, 64'h65274ba9829b4406},
    '{64'hf61ff889326ffa94, 64'h92edeeee3c669f2b, 64'hf20894ea27e689c6},
    '{64'h6b6b262e4886b843, 64'h8f39ba76fef8c90c, 64'h5101fbe6cf9a48d5},
    '{64'hb0c0a13da900a6ad, 64'hcb3d64069481be21, 64'hc9c727b8db8c188f},
    '{64'h341a924c7f88dfa1, 64'h61bfdb0ecc682919, 64'hd2e64692f8194157}};
  dblock_t CT [16][3] = '{'{64'h33d156f32409e81b, 64'h3a40eca396b795e2, 64'hdc971fceeac8999d},
    '{64'h3c026d7fe0331c55, 64'h78748f84d296bf16, 64'h94d717bbd6fb2729},
    '{64'h40dbdbb33e760caa, 64'hdda8c629d1019636, 64'h957b4269153c4f5e},
    '{64'h5e2accffab38abd0, 64'hcaeef4775b1fb3f1, 64'hc1d94963e9234763},
    '{64'h879a5f418a29501c, 64'hfd256c3d59b8501d, 64'hf90575eb0ba5e5a7},
    '{64'h41edf65fc7fc47ab, 64'h2b46917666d6512d, 64'h3a3f7624e0fda715},
    '{64'h98f41cc32938fb50, 64'h9be19f742f8523f9, 64'h1a7cea90c1b2a910},
    '{64'heec01d06c83b737d, 64'h87ee0bc02d39c4ab, 64'h98e46ff03aad8631},
    '{64'h41ffae7bb648fccb, 64'hd513da2528c78195, 64'hd12a689bb085e33c},
    '{64'h829825227d6ba776, 64'h6bf48f11bc0b6520, 64'h57b7f18a3348fb8a},
    '{64'ha023af3ab1aefe2b, 64'h4768711243786fd1, 64'hc1eb168a7819ace7},
    '{64'h011020bb29cb5078, 64'h7bb663cb965f0a65, 64'h9d890d3d04889450},
    '{64'h95afa1254adf2064, 64'hcfe9d3a41ab204a1, 64'hf005abcd6656d9f9},
    '{64'h038fd8e45a333391, 64'h134dc87757b67393, 64'h07161b5c6e6f3603},
    '{64'hb88b70f8549459a7, 64'h3cc0f87cf9ff1c71, 64'h8fca0a77538de29f},
    '{64'hc1adaa381c17b6ca, 64'hb19bb080b266a542, 64'h89dd140f6a2ab7fb}};
  int BANK_OF [4] = '{0, 5, 9, 15};

  logic       kw_en = 0;
  logic [3:0] kw_bank = 0, in_bank = 0, in_stream = 0, out_stream;
  logic [1:0] kw_idx = 0;
  dblock_t    kw_key = 0, in_data = 0, in_iv = 0, out_data;
  logic       in_valid = 0, in_ready, in_dec = 0, in_first = 0, out_valid, out_dec, stall;

  tdes_pipe dut (.*);

  dblock_t    exp_q [$];
  logic [4:0] tag_q [$];
  longint     acc_t [$];
  longint     cyc = 0, t_first = 0, t_last = 0;
  int         n_out = 0, n_enc = 0, n_dec = 0, n_stall = 0, n_fbblock = 0, n_kw_busy = 0;
  int         n_dec_overlap = 0, max_ring = 0, outstanding [16];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      int occ;
      occ = $countones(dut.sv);
      if (occ > max_ring) max_ring = occ;
      if (stall) n_stall++;
      if (in_valid && !in_ready && !stall) n_fbblock++;
      if (kw_en && occ > 0) n_kw_busy++;
    end
    if (rst_n && out_valid) begin
      dblock_t e; logic [4:0] tg; longint a;
      checks += 3;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output at %0d", cyc);
      end else begin
        e = exp_q.pop_front(); tg = tag_q.pop_front(); a = acc_t.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL data %h exp %h (stream %0d)", out_data, e, tg[3:0]); end
        if ({out_dec, out_stream} !== tg) begin failures++; $display("FAIL tag %b exp %b", {out_dec, out_stream}, tg); end
        if (cyc - a != 48) begin failures++; $display("FAIL latency %0d", cyc - a); end
        outstanding[tg[3:0]]--;
      end
      n_out++;
      if (out_dec) n_dec++; else n_enc++;
      t_last = cyc;
    end
  end

  task automatic send(dblock_t d, logic [3:0] s, logic dec, logic first, dblock_t iv, dblock_t e);
    @(negedge clk);
    in_valid = 1; in_data = d; in_stream = s; in_bank = 4'(BANK_OF[s % 4]);
    in_dec = dec; in_first = first; in_iv = iv;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    if (dec && outstanding[s] > 0) n_dec_overlap++;
    outstanding[s]++;
    exp_q.push_back(e); tag_q.push_back({dec, s}); acc_t.push_back(cyc);
    #1 in_valid = 0;
  endtask

  task automatic write_key(logic [3:0] b, logic [1:0] i, dblock_t k);
    @(negedge clk);
    kw_en = 1; kw_bank = b; kw_idx = i; kw_key = k;
    @(negedge clk);
    kw_en = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < 16; s++) outstanding[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 3; i++) write_key(4'(BANK_OF[k]), 2'(i), KEYS[k][i]);

    // phase 1: encryption, round-robin over 16 streams
    fork
      begin
        for (int b = 0; b < 3; b++)
          for (int s = 0; s < 16; s++) begin
            send(PT[s][b], 4'(s), 1'b0, b == 0, IVS[s], CT[s][b]);
            if (b == 0 && s == 0) t_first = acc_t[$];
          end
      end
      begin
        repeat (30) @(posedge clk);
        write_key(4'd3, 2'd0, 64'h0123456789abcdef);
      end
    join
    drain();
    checks++;
    if (t_last - t_first != 15 + 3 * 48) begin
      failures++; $display("FAIL phase 1 took %0d clocks", t_last - t_first);
    end

    // phase 2: decryption
    for (int b = 0; b < 3; b++) send(CT[3][b], 4'd3, 1'b1, b == 0, IVS[3], PT[3][b]);
    for (int b = 0; b < 3; b++)
      for (int s = 0; s < 16; s++)
        if (s != 3) send(CT[s][b], 4'(s), 1'b1, b == 0, IVS[s], PT[s][b]);
    drain();

    // phase 3: two encryptions of one stream back to back; the second waits
    // until the first leaves and takes its ciphertext as chaining value
    send(PT[0][0], 4'd0, 1'b0, 1'b1, IVS[0], CT[0][0]);
    send(PT[0][1], 4'd0, 1'b0, 1'b0, IVS[0], CT[0][1]);
    drain();

    $display("outputs=%0d enc=%0d dec=%0d max_ring=%0d stall=%0d fb_block=%0d kw_busy=%0d dec_overlap=%0d",
             n_out, n_enc, n_dec, max_ring, n_stall, n_fbblock, n_kw_busy, n_dec_overlap);
    checks += 6;
    if (n_out != 98)        begin failures++; $display("FAIL outputs %0d", n_out); end
    if (max_ring != 16)     begin failures++; $display("FAIL max ring occupancy %0d", max_ring); end
    if (n_stall == 0)       begin failures++; $display("FAIL no same-stream hold-off"); end
    if (n_fbblock == 0)     begin failures++; $display("FAIL input never blocked by feedback"); end
    if (n_kw_busy == 0)     begin failures++; $display("FAIL no key write while busy"); end
    if (n_dec_overlap == 0) begin failures++; $display("FAIL no overlapping same-stream decryption"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
