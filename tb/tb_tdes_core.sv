// tb_tdes_core: self-checking test of the iterative Triple DES unit, CBC mode.
//
// Expected ciphertexts come from an independent software implementation of
// Triple DES (EDE, CBC). Two key triples are written into banks 0 and 2 (a
// third is written into bank 3 while blocks are processed). For each triple,
// four blocks are encrypted back to back (the first with the IV), then the
// four ciphertexts are decrypted back to back. Every result and the 48-clock
// latency from acceptance to result are checked.
module tb_tdes_core;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dblock_t PT [4] = '{64'h4e6f772069732074, 64'h6865207469672074, 64'h68652074696d6520, 64'h666f7220616c6c20};
  dblock_t CT [2][4] = '{
    '{64'hf3c0ff026c023089, 64'hb2ef2b3c857983a3, 64'hc693f92916e901fc, 64'h963aff62ce34d0db},
    '{64'h7940af13a65b6d44, 64'hcdbbd3fecac3d628, 64'h927eff195e52ea92, 64'h46e181b9fbe78f65}};
  dblock_t KEYS [2][3] = '{
    '{64'h0123456789abcdef, 64'h23456789abcdef01, 64'h456789abcdef0123},
    '{64'h133457799bbcdff1, 64'h0e329232ea6d0d73, 64'h7ca110454a1a6e57}};
  dblock_t IVS [2] = '{64'h1234567890abcdef, 64'h0};

  logic       kw_en = 0;
  logic [1:0] kw_bank = 0, kw_idx = 0, in_bank = 0;
  dblock_t    kw_key = 0, in_data = 0, in_iv = 0, out_data;
  logic       in_valid = 0, in_ready, in_dec = 0, in_first = 0, out_valid, out_dec;

  tdes_core dut (.*);

  dblock_t exp_q [$];
  longint  acc_t [$];
  longint  cyc = 0;
  int      n_out = 0, n_enc = 0, n_dec = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      dblock_t e; longint a;
      e = exp_q.pop_front(); a = acc_t.pop_front();
      checks += 2;
      if (out_data !== e) begin failures++; $display("FAIL data %h exp %h", out_data, e); end
      if (cyc - a != 48) begin failures++; $display("FAIL latency %0d", cyc - a); end
      n_out++;
      if (out_dec) n_dec++; else n_enc++;
    end
  end

  task automatic write_key(input logic [1:0] b, input logic [1:0] i, input dblock_t k);
    @(negedge clk);
    kw_en = 1; kw_bank = b; kw_idx = i; kw_key = k;
    @(negedge clk);
    kw_en = 0;
  endtask

  task automatic send(input dblock_t d, input logic [1:0] b, input logic dec, input logic first,
                      input dblock_t iv, input dblock_t e);
    @(negedge clk);
    in_valid = 1; in_data = d; in_bank = b; in_dec = dec; in_first = first; in_iv = iv;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    exp_q.push_back(e); acc_t.push_back(cyc);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 3; i++) write_key(2'(2 * s), 2'(i), KEYS[s][i]);
    fork
      for (int s = 0; s < 2; s++) begin
        for (int b = 0; b < 4; b++) send(PT[b], 2'(2 * s), 1'b0, b == 0, IVS[s], CT[s][b]);
        for (int b = 0; b < 4; b++) send(CT[s][b], 2'(2 * s), 1'b1, b == 0, IVS[s], PT[b]);
      end
      begin
        repeat (30) @(posedge clk);
        for (int i = 0; i < 3; i++) write_key(2'd3, 2'(i), KEYS[0][i]);
      end
    join
    // the key written into bank 3 during processing
    send(PT[0], 2'd3, 1'b0, 1'b1, IVS[0], CT[0][0]);
    repeat (60) @(posedge clk);
    checks += 2;
    if (n_out != 17) begin failures++; $display("FAIL outputs %0d", n_out); end
    if (n_enc == 0 || n_dec == 0) begin failures++; $display("FAIL enc/dec not both exercised"); end
    $display("blocks enc=%0d dec=%0d", n_enc, n_dec);
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
