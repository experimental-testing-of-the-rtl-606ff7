// tb_des_f: checks the DES round function F(R, K) against values computed
// with an independent software DES model (random R and K), and against the
// first round of the classic DES worked example (key 133457799BBCDFF1,
// plaintext 0123456789ABCDEF: R0 = F0AAF0AA, K1 = 1B02EFFC7072,
// F = 234AA9BB), then against 64 more random (R, K) pairs from the same
// software model.
module tb_des_f;
  import des_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] r, f;
  rkey_t k;
  des_f dut (.*);

  logic [31:0] R [7] = '{32'h52e6b438, 32'h6513270e, 32'h128b2f33, 32'h1818e811, 32'h0ed90475, 32'h36f675cc, 32'hf0aaf0aa};
  rkey_t       K [7] = '{48'h269ef2a74de4, 48'h0c5ca6a3a450, 48'h892fd23f0824, 48'h95315d9dc9f8,
                         48'h81e7e8e25d94, 48'h1600099950d8, 48'h1b02effc7072};
  logic [31:0] F [7] = '{32'h60c2fecb, 32'hed4a1c9b, 32'h21feb651, 32'ha279118f, 32'h3d2c7158, 32'h0bb88baa, 32'h234aa9bb};

  logic [31:0] RR [64] = '{
    32'h9f767c45, 32'h4164d839, 32'hbde5c099, 32'h5bc8fbbc, 32'hcb91ce37, 32'hb0c11fde,
    32'hf1446bea, 32'hd76d4330, 32'hbd69fe29, 32'ha6eb8c9e, 32'hec1d7da0, 32'h87b0b125,
    32'h076ce2ef, 32'hd7210dff, 32'h77330bdb, 32'hc6a53877, 32'hf17fd374, 32'h3fc1ea36,
    32'ha6233255, 32'h0d464138, 32'he6a16a3b, 32'h2827688d, 32'h1cfb10f6, 32'h5f2dd97f,
    32'h7814e8a2, 32'hde527100, 32'h3f1f65a8, 32'h617959ce, 32'h8b33e968, 32'h1a1afe87,
    32'h92edcf45, 32'h3fd42359, 32'h035b7399, 32'hbb2edb20, 32'h377b9aa2, 32'h687c966c,
    32'h478c281d, 32'h2e9c82b1, 32'hea959c21, 32'hde11cc9d, 32'hc4069545, 32'h63b229f1,
    32'h28dbd25e, 32'hc30d8b76, 32'hcc11d357, 32'h126a1e48, 32'h238642ea, 32'h9e30691c,
    32'h9e115e4b, 32'h71e0c07e, 32'h206f5c66, 32'h21da8978, 32'h00745130, 32'hf8eb18b9,
    32'hdf1461aa, 32'h015c33b2, 32'h359eeefb, 32'hc60a3cab, 32'h3729c619, 32'hf5cae3bf,
    32'hfb7ff337, 32'h2a759159, 32'hdf561d80, 32'h2a9eba0c};
  rkey_t KR [64] = '{
    48'h504b4a0fe75d, 48'h32eaf6236bf2, 48'he0498a0a8c96, 48'ha02fad864c44, 48'h2e81346c6e2b, 48'hf7f3f0e3cd97,
    48'h3266b0cde917, 48'hf710f770c226, 48'h621ae4cc4132, 48'h05854c7d6df0, 48'h6a375c76f18a, 48'hef902a7c1880,
    48'h4389254cb864, 48'h54f410acff00, 48'hd1414d25deb3, 48'h960d9a656aaf, 48'h989200ddb74d, 48'hb52aad8d194a,
    48'h10e6568068b9, 48'h5af84f596727, 48'h4e5ad18a669a, 48'hb2487b121dc5, 48'h2f4d50d7d13f, 48'h78f87b3120df,
    48'h2d16b4653252, 48'h41950e979cf3, 48'hf063f9a01fe8, 48'hf30005da8467, 48'h5b8ebff29101, 48'h677fd84a1d3a,
    48'h8c8f04a012e8, 48'h6b38c9a937a6, 48'h60595dbe4409, 48'hd75b9419cf4d, 48'h73ec0252f615, 48'hb52f0bf64ef7,
    48'h9fab2e50bd4e, 48'hf453f486ab73, 48'h1e78324f3e81, 48'h3effc177f113, 48'hd1caedfde416, 48'h7653f129c8c6,
    48'h833258296818, 48'he4885ad3ba32, 48'h403a8652dbd0, 48'h767dc68deb5d, 48'h96fa1ba95a54, 48'hc7eebf9703c0,
    48'h5e07cc170c31, 48'h4bbddc14ed57, 48'h6ed70960afe9, 48'hfa74f21ff5eb, 48'h355f1757905e, 48'h834c573ac59a,
    48'h5cd59c5f319e, 48'h25f0eb07c30d, 48'h469257079670, 48'hb3deec983704, 48'h17928b8e8f4e, 48'haf9b4ffcbf42,
    48'h4e615119cdcc, 48'hcc7c2d6f2efc, 48'ha0761404ab1e, 48'hb89c261c374b};
  logic [31:0] FR [64] = '{
    32'h7f3362ac, 32'h1cf8fb79, 32'hb81b74e2, 32'h4594edf1, 32'h08a9f5c8, 32'hfba9212e,
    32'h85ae3688, 32'h89345651, 32'ha35be3c7, 32'h03c3ec6d, 32'h2332ed11, 32'hc0773f51,
    32'h76828a57, 32'h096aea96, 32'hcbb049a7, 32'h8b052ebf, 32'h735c5272, 32'ha7019f59,
    32'hbcb1cb0f, 32'h6da26e56, 32'he8499303, 32'ha6bbb319, 32'h05092fad, 32'h775a6742,
    32'h0ccef177, 32'hd36e27e0, 32'h8c2e5824, 32'h95f9aa67, 32'h8b46c0c4, 32'hab8f775d,
    32'hb6840e51, 32'hd143eb08, 32'h972d6ebb, 32'h194b5c12, 32'hacac70ab, 32'hbd05e925,
    32'h7c677157, 32'h182c84b6, 32'h948e0608, 32'h28d0380f, 32'h4cc00bca, 32'h6448a13f,
    32'h659d01f0, 32'h90b2b7df, 32'h1b0acd09, 32'h12ee4d3d, 32'h4c989fe6, 32'h93334dce,
    32'h85b1df5d, 32'h1b5b1050, 32'h2b9610f4, 32'hf9a673b8, 32'h1ce4f0c3, 32'h86b030f5,
    32'he3f22a1e, 32'hd3fcf320, 32'h91f4e7ed, 32'hf118fbac, 32'hf5e9ac6c, 32'h41a3d178,
    32'h941d7fcd, 32'ha6c18c04, 32'h95b63602, 32'h01f06d7e};


  initial begin
    for (int i = 0; i < 64; i++) begin
      r = RR[i]; k = KR[i];
      #1;
      checks++;
      if (f !== FR[i]) begin failures++; $display("FAIL F(%h,%h) = %h exp %h", r, k, f, FR[i]); end
    end
    for (int i = 0; i < 7; i++) begin
      r = R[i]; k = K[i];
      #1;
      checks++;
      if (f !== F[i]) begin failures++; $display("FAIL F(%h,%h) = %h exp %h", r, k, f, F[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
