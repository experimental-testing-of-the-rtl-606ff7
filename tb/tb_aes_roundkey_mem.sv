// tb_aes_roundkey_mem: checks the round key banks. All 16 sets x 16 rounds
// are written as 64-bit halves in random order of sets, then read back with
// one-clock latency; a read of one set while another set is written returns
// the stored key; and the read register holds when rd_en is low.
module tb_aes_roundkey_mem;
  import aes_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 0, whalf = 0, rd_en = 0;
  logic [3:0]  wset = 0, wround = 0, rset = 0, rround = 0;
  logic [63:0] wdata = 0;
  block_t      rkey;
  block_t      model [16][16];

  aes_roundkey_mem dut (.*);

  initial begin
    for (int s = 0; s < 16; s++)
      for (int r = 0; r < 16; r++) model[s][r] = {$urandom, $urandom, $urandom, $urandom};
    for (int s = 0; s < 16; s++)
      for (int r = 0; r < 16; r++)
        for (int h = 0; h < 2; h++) begin
          @(negedge clk);
          we = 1; wset = 4'(15 - s); wround = 4'(r); whalf = h[0];
          wdata = h ? model[15-s][r][63:0] : model[15-s][r][127:64];
        end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++) begin
      logic [3:0] s, r;
      s = 4'($urandom); r = 4'($urandom);
      rd_en = 1; rset = s; rround = r;
      // concurrent write into a different set
      we = 1; wset = s + 4'd1; wround = 4'($urandom); whalf = 1'($urandom);
      wdata = {$urandom, $urandom};
      if (whalf) model[wset][wround][63:0] = wdata; else model[wset][wround][127:64] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rkey !== model[s][r]) begin failures++; $display("FAIL %0d/%0d %h exp %h", s, r, rkey, model[s][r]); end
      rd_en = 0; rset = ~s;
      @(negedge clk);
      checks++;
      if (rkey !== model[s][r]) begin failures++; $display("FAIL hold"); end
    end
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
