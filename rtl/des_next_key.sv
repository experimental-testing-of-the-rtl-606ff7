// des_next_key: next-key module of the unrolled Triple DES pipeline, stage N.
//
// Takes the 56-bit key state I(N-1) of the previous stage (C || D halves after
// PC-1), rotates both halves by m positions to the left (encryption, 'e') or
// to the right (decryption, 'd'), registers the selected result as I(N) and
// drives the round key K(N) = PC-2(I(N)) for round N.
//
// The amount m is fixed per stage by the DES key schedule, so the rotators
// are constant wiring:
//   encryption : I(N) = I(N-1) <<< s(N)                (round N uses C_N D_N)
//   decryption : I(1) = I(0) (m = 0), I(N) = I(N-1) >>> s(18-N) for N >= 2
//                (round N uses C_(17-N) D_(17-N); C_16 D_16 = C_0 D_0)
// where s(1..16) = 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1.
//
// Interface and timing: 'ld' loads the register at the clock edge; k_out is
// combinational from the register. No reset (the stage's valid bit in the
// pipeline qualifies it).
//
// From the document: the structure of the module (rotate left/right by m,
// e/d multiplexer, register, PC-2) and that m is 0, 1 or 2 depending on the
// round. This design's own choice: the exact m per stage, worked out from the
// DES schedule as above.
module des_next_key
  import des_pkg::*;
#(
  parameter int unsigned N = 1          // stage (round) number, 1..16
) (
  input  logic   clk,
  input  logic   ld,
  input  logic   dec,                  // 1: decryption direction (>>> m)
  input  key56_t i_prev,
  output key56_t i_out,
  output rkey_t  k_out
);

  localparam bit TWO_E = (SHIFTS_T[N-1] == 8'd2);
  localparam bit ZERO_D = (N == 1);
  localparam bit TWO_D = (N >= 2) && (SHIFTS_T[(N >= 2) ? (17 - N) : 0] == 8'd2);

  key56_t rot_e, rot_d;

  assign rot_e = rotl_cd(i_prev, TWO_E);
  assign rot_d = ZERO_D ? i_prev : rotr_cd(i_prev, TWO_D);

  always_ff @(posedge clk) begin
    if (ld) i_out <= dec ? rot_d : rot_e;
  end

  assign k_out = pc2(i_out);

endmodule
