// tb_aes_cbc_buffer: checks the 16 x 128 chaining-value buffer: reset value
// of the read register, write then read of every location against a model
// array, one-clock read latency, hold when rd_en is low, and the write-through
// of a write and read to the same location in the same clock.
module tb_aes_cbc_buffer;
  import aes_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we = 0, rd_en = 0;
  logic [3:0] waddr = 0, raddr = 0;
  block_t     wdata = 0, rdata;
  block_t     model [16];
  int         n_wt = 0;

  aes_cbc_buffer dut (.*);

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom, $urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] a;
      block_t     e;
      a = 4'($urandom);
      rd_en = 1; raddr = a;
      we = 1'($urandom_range(0, 1)); waddr = $urandom_range(0, 3) == 0 ? a : 4'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      e = (we && waddr == a) ? wdata : model[a];
      if (we && waddr == a) n_wt++;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read %0d %h exp %h", a, rdata, e); end
      // hold
      rd_en = 0; we = 0; raddr = ~a;
      @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL hold"); end
    end
    checks++;
    if (n_wt == 0) begin failures++; $display("FAIL write-through never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
