// tb_aes_key_sched: checks the 3-in-1 key scheduler for all three key
// lengths. The written round keys are captured into a model memory and
// compared with the FIPS-197 expansion examples (round keys 1 and Nr for
// AES-128 in full, the last four words for AES-192 and AES-256, plus words
// from the middle of each expansion). The number of clocks from the start
// pulse to the done pulse must be 2*(Nr+1) when key words arrive without
// gaps; one run inserts wait states in the key input.
module tb_aes_key_sched;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, kin_valid = 0, kin_ready, busy, done;
  keylen_e     keylen = KEY128;
  logic [3:0]  set = 0;
  logic [63:0] kin = 0;
  logic        rk_we, rk_half;
  logic [3:0]  rk_set, rk_round;
  logic [63:0] rk_wdata;
  logic [63:0] mem [16][16][2];

  aes_key_sched dut (.*);

  always @(posedge clk) if (rk_we) mem[rk_set][rk_round][rk_half] <= rk_wdata;

  logic [255:0] KEY [3] = '{
    {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0},
    {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0},
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4};

  function automatic logic [31:0] word(int s, int i);
    return mem[s][i / 4][(i % 4) / 2][63 - 32 * (i % 2) -: 32];
  endfunction

  task automatic check_w(int s, int i, logic [31:0] e);
    checks++;
    if (word(s, i) !== e) begin failures++; $display("FAIL set %0d w%0d = %h exp %h", s, i, word(s, i), e); end
  endtask

  task automatic run(int k, int s, bit gaps);
    int nw, cyc;
    nw = 2 + k;
    @(negedge clk);
    start = 1; keylen = keylen_e'(k); set = 4'(s);
    @(negedge clk);
    start = 0;
    cyc = 1;
    fork
      for (int w = 0; w < nw; w++) begin
        if (gaps) begin kin_valid = 0; @(negedge clk); end
        kin = KEY[k][255-64*w -: 64]; kin_valid = 1;
        while (!kin_ready) @(negedge clk);
        @(negedge clk);
      end
      while (!done) begin @(negedge clk); cyc++; end
    join
    kin_valid = 0;
    if (!gaps) begin
      checks++;
      if (cyc != 2 * (11 + 2 * k)) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 3, 0); run(1, 7, 0); run(2, 12, 0); run(0, 5, 1);
    for (int s = 3; s <= 5; s += 2) begin
      check_w(s, 4, 32'ha0fafe17); check_w(s, 5, 32'h88542cb1); check_w(s, 6, 32'h23a33939); check_w(s, 7, 32'h2a6c7605);
      check_w(s, 40, 32'hd014f9a8); check_w(s, 41, 32'hc9ee2589); check_w(s, 42, 32'he13f0cc8); check_w(s, 43, 32'hb6630ca6);
      check_w(s, 0, 32'h2b7e1516); check_w(s, 3, 32'h09cf4f3c);
    end
    check_w(7, 6, 32'hfe0c91f7); check_w(7, 7, 32'h2402f5a5);
    check_w(7, 48, 32'he98ba06f); check_w(7, 49, 32'h448c773c); check_w(7, 50, 32'h8ecc7204); check_w(7, 51, 32'h01002202);
    check_w(12, 8, 32'h9ba35411); check_w(12, 9, 32'h8e6925af); check_w(12, 12, 32'ha8b09c1a);
    check_w(12, 56, 32'hfe4890d1); check_w(12, 57, 32'he6188d0b); check_w(12, 58, 32'h046df344); check_w(12, 59, 32'h706c631e);
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
