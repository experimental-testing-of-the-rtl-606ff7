// tb_des_round: runs a complete single DES through the iterated round with
// externally supplied round keys (the 16 round keys of key 133457799BBCDFF1)
// and checks FP(out) = 85E813540F0AB405 for plaintext 0123456789ABCDEF after
// 16 rounds (15 with swap, the last without). Then it runs the same key twice
// in a row, encryption keys forward then backward, without reloading: the
// second pass must return the plaintext, which exercises the no-swap
// transition between two DES operations used by Triple DES. Finally it
// encrypts eight random blocks under eight random keys and compares with
// ciphertexts from an independent software DES; for these the round keys are
// derived in the testbench with the package's PC-1/PC-2 and rotations, and a
// clock with adv low is inserted in the middle to check that the registers
// hold.
module tb_des_round;
  import des_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  rkey_t K [16] = '{48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
                    48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
                    48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
                    48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5};
  dblock_t VK [8] = '{64'he7eee7615ef35f30, 64'h07201e12617b0fed, 64'hea8ed02a82a17593, 64'h08006d6b1af0c0cb, 64'h07d13c447e33051e, 64'hc43bcad76c008a9b, 64'he28404a897c52526, 64'hf745c55d4e9f747f};
  dblock_t VP [8] = '{64'he49b482e15cae750, 64'ha7e1647796ff022b, 64'h0f2337cd3794c522, 64'hd625658aac2c9faa, 64'heef95a60e56143d6, 64'h0a6b5fc933154a6d, 64'h2e6a7c07bcbee841, 64'h615164c6f728d718};
  dblock_t VC [8] = '{64'h14bdc5f1c815c3f7, 64'hf07ae916e6886952, 64'h99773a837dd2cf73, 64'he9db22fb7632ddc9, 64'h9ee5956f7f2dc88e, 64'ha34092e84fc88ebc, 64'h1550e8f2f9b4ae24, 64'hc1363251126ed01c};
  logic        load = 0, adv = 0, swap = 1;
  logic [31:0] in_l = 0, in_r = 0, out_l, out_r;
  rkey_t       rkey = 0;
  des_round dut (.*);

  initial begin
    dblock_t x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    x = ip(64'h0123456789abcdef);
    load = 1; in_l = x[63:32]; in_r = x[31:0];
    @(negedge clk);
    load = 0;
    for (int n = 0; n < 32; n++) begin
      rkey = (n < 16) ? K[n] : K[31 - n];
      swap = (n % 16) != 15;
      adv  = 1;
      #1;
      if (n == 15) begin
        checks++;
        if (fp({out_l, out_r}) !== 64'h85e813540f0ab405) begin failures++; $display("FAIL enc %h", fp({out_l, out_r})); end
      end
      if (n == 31) begin
        checks++;
        if (fp({out_l, out_r}) !== 64'h0123456789abcdef) begin failures++; $display("FAIL dec %h", fp({out_l, out_r})); end
      end
      @(negedge clk);
    end
    adv = 0;

    for (int v = 0; v < 8; v++) begin
      key56_t cd;
      rkey_t  rk [16];
      cd = pc1(VK[v]);
      for (int n = 0; n < 16; n++) begin
        cd = rotl_cd(cd, SHIFTS_T[n] == 8'd2);
        rk[n] = pc2(cd);
      end
      x = ip(VP[v]);
      load = 1; in_l = x[63:32]; in_r = x[31:0];
      @(negedge clk);
      load = 0;
      for (int n = 0; n < 16; n++) begin
        rkey = rk[n];
        swap = (n != 15);
        adv  = 1;
        #1;
        if (n == 15) begin
          checks++;
          if (fp({out_l, out_r}) !== VC[v]) begin failures++; $display("FAIL vector %0d: %h exp %h", v, fp({out_l, out_r}), VC[v]); end
        end
        @(negedge clk);
        if (n == 7) begin
          adv = 0; rkey = 48'h0;
          @(negedge clk);
        end
      end
      adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
