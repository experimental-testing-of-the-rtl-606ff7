// tb_des_key_sched: checks the on-the-fly DES key schedule. The key
// 133457799BBCDFF1 is written into bank 2 (and other keys elsewhere); the
// encryption path must produce round keys K1..K16 of the DES worked example in
// consecutive clocks, and the decryption path K16..K1. A key written into
// another bank while the schedule runs must not disturb it.
module tb_des_key_sched;
  import des_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  rkey_t K [16] = '{48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
                    48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
                    48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
                    48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5};
  logic        kw_en = 0, ld = 0, adv = 0, dec = 0;
  logic [1:0]  kw_bank = 0, kw_idx = 0, rd_bank = 0, rd_idx = 0;
  logic [63:0] kw_key = 0;
  logic [4:0]  rnd = 1;
  rkey_t       rkey;
  des_key_sched dut (.*);

  task automatic wk(logic [1:0] b, logic [1:0] i, logic [63:0] k);
    @(negedge clk);
    kw_en = 1; kw_bank = b; kw_idx = i; kw_key = k;
    @(negedge clk);
    kw_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wk(2'd2, 2'd1, 64'h133457799bbcdff1);
    wk(2'd2, 2'd0, 64'h0123456789abcdef);
    wk(2'd1, 2'd1, 64'hfedcba9876543210);
    for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      rd_bank = 2'd2; rd_idx = 2'd1; dec = d[0]; ld = 1;
      @(negedge clk);
      ld = 0;
      for (int n = 1; n <= 16; n++) begin
        rkey_t e;
        e = d ? K[16 - n] : K[n - 1];
        checks++;
        if (rkey !== e) begin failures++; $display("FAIL d=%0d round %0d %h exp %h", d, n, rkey, e); end
        // write into another bank in the middle of the schedule
        kw_en = (n == 8); kw_bank = 2'd3; kw_idx = 2'd1; kw_key = 64'h0;
        rd_bank = 2'(n);                     // bank select only matters at ld
        adv = 1; rnd = 5'(n + 1);
        @(negedge clk);
      end
      adv = 0; kw_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
