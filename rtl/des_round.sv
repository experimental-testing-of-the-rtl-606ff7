// des_round: one iterated DES round with its data registers (L, R).
//
// The two 32-bit registers are loaded either with a new block (multiplexers
// mux1/mux2, `load`) or with the result of the round (`adv`). Each clock the
// round computes L' = L ^ F(R, K) combinationally; the outputs are
// out_l = L ^ F(R, K) and out_r = R, i.e. the state without the final swap.
// The feedback multiplexers mux3/mux4 choose what is written back:
//   swap = 1 : L <= R,          R <= L ^ F(R, K)   (ordinary round)
//   swap = 0 : L <= L ^ F(R,K), R <= R             (last round of one DES)
// Without the swap, the state after the 16th round of one DES is exactly the
// input of the next DES in Triple DES (the final and initial permutations
// between the two cancel), so 48 rounds run back to back. The input halves
// are expected after the initial permutation and the output is taken before
// the final permutation; both are applied by the caller.
module des_round
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,     // mux1/mux2: take the new block
  input  logic        adv,      // take the round result
  input  logic        swap,     // mux3/mux4 selection
  input  logic [31:0] in_l,
  input  logic [31:0] in_r,
  input  rkey_t       rkey,
  output logic [31:0] out_l,
  output logic [31:0] out_r
);

  logic [31:0] l_q, r_q, f;

  des_f u_f (.r(r_q), .k(rkey), .f(f));

  assign out_l = l_q ^ f;
  assign out_r = r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0;
      r_q <= '0;
    end else if (load) begin
      l_q <= in_l;
      r_q <= in_r;
    end else if (adv) begin
      l_q <= swap ? out_r : out_l;
      r_q <= swap ? out_l : out_r;
    end
  end

endmodule
