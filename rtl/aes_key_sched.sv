// aes_key_sched: 3-in-1 Rijndael key scheduling unit (128/192/256-bit keys).
//
// Produces two 32-bit key words (w_i, w_i+1) per clock for any key length and
// writes them as one 64-bit half of a round key into the round key memory.
// The main key enters 64 bits per clock (Nk/2 clocks); those words are passed
// to the memory unchanged and shifted into a four-stage chain of word-pair
// registers holding w_i-2..w_i-8. Multiplexers pick w_i-Nk and w_i-Nk+1 from
// the chain (stage Nk/2). The new words follow
//   i mod Nk = 0          : w_i = w_i-Nk ^ Sub(Rot(w_i-1)) ^ Rcon[i/Nk]
//   Nk = 8, i mod Nk = 4  : w_i = w_i-Nk ^ Sub(w_i-1)
//   otherwise             : w_i = w_i-Nk ^ w_i-1
//   always                : w_i+1 = w_i-Nk+1 ^ w_i
// Sub() is done by two dual-port S-box ROMs whose output register is loaded
// with Sub(Rot?(w_i+1)) in the same clock that w_i+1 is produced, so it is
// ready for the next pair. A full schedule takes 2*(Nr+1) clocks after the
// start pulse plus any wait for key input: 22, 26 or 30 clocks.
//
// Interface: pulse `start` with `keylen` and `set`; then present the main
// key, most significant 64 bits first, with `kin_valid` (`kin_ready` is high
// in the loading phase). `busy` is high until the last write; `done` pulses
// with the last write. Round key r of the set is w_4r..w_4r+3, stored as two
// 64-bit halves.
module aes_key_sched
  import aes_pkg::*;
#(
  parameter int unsigned NUM_SETS = 16,
  parameter int unsigned SW       = $clog2(NUM_SETS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  keylen_e       keylen,
  input  logic [SW-1:0] set,
  input  logic [63:0]   kin,
  input  logic          kin_valid,
  output logic          kin_ready,
  output logic          busy,
  output logic          done,
  // round key memory write port
  output logic          rk_we,
  output logic [SW-1:0] rk_set,
  output logic [3:0]    rk_round,
  output logic          rk_half,
  output logic [63:0]   rk_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EXPAND} state_e;

  state_e      state;
  keylen_e     kl_q;
  logic [2:0]  nk2;          // Nk/2 : 2, 3 or 4
  logic [4:0]  npairs;       // 2*(Nr+1)
  logic [4:0]  pair;         // index of the pair being produced (i/2)
  logic [2:0]  mod2;         // (i mod Nk)/2
  byte_t       rcon;
  word_t       st_l [4];     // chain: st_l[k] = w_i-2k-2, st_r[k] = w_i-2k-1
  word_t       st_r [4];
  word_t       sub_q;        // registered Sub(Rot?(w_i-1))
  word_t       w0, w1;       // words of this clock
  word_t       w_nk, w_nk1;
  word_t       sub_in;
  logic        step;         // a pair is produced this clock
  logic        last;
  logic [2:0]  mod2_nxt;

  always_comb begin
    case (kl_q)
      KEY128:  begin nk2 = 3'd2; npairs = 5'd22; end
      KEY192:  begin nk2 = 3'd3; npairs = 5'd26; end
      default: begin nk2 = 3'd4; npairs = 5'd30; end
    endcase
  end

  // w_i-Nk and w_i-Nk+1 from stage Nk/2 of the chain
  always_comb begin
    w_nk  = st_l[nk2-1];
    w_nk1 = st_r[nk2-1];
  end

  always_comb begin
    w0 = kin[63:32];
    w1 = kin[31:0];
    if (state == S_EXPAND) begin
      if (mod2 == 3'd0)
        w0 = w_nk ^ sub_q ^ {rcon, 24'h0};
      else if (nk2 == 3'd4 && mod2 == 3'd2)
        w0 = w_nk ^ sub_q;
      else
        w0 = w_nk ^ st_r[0];
      w1 = w_nk1 ^ w0;
    end
  end

  assign kin_ready = (state == S_LOAD);
  assign step      = (state == S_EXPAND) || (state == S_LOAD && kin_valid);
  assign last      = (pair == npairs - 5'd1);
  assign mod2_nxt  = (mod2 == nk2 - 3'd1) ? 3'd0 : mod2 + 3'd1;
  assign busy      = (state != S_IDLE);

  // S-box input for the next pair: rotate when the next i is a multiple of Nk
  assign sub_in = (mod2_nxt == 3'd0) ? rot_word(w1) : w1;

  aes_sbox_bram u_sub_a (
    .clk(clk), .en(step),
    .addr_a({1'b0, sub_in[31:24]}), .addr_b({1'b0, sub_in[23:16]}),
    .dout_a(sub_q[31:24]),          .dout_b(sub_q[23:16])
  );
  aes_sbox_bram u_sub_b (
    .clk(clk), .en(step),
    .addr_a({1'b0, sub_in[15:8]}),  .addr_b({1'b0, sub_in[7:0]}),
    .dout_a(sub_q[15:8]),           .dout_b(sub_q[7:0])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      kl_q   <= KEY128;
      rk_set <= '0;
      pair   <= '0;
      mod2   <= '0;
      rcon   <= 8'h01;
      for (int k = 0; k < 4; k++) begin
        st_l[k] <= '0;
        st_r[k] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          kl_q   <= keylen;
          rk_set <= set;
          pair   <= '0;
          mod2   <= '0;
          rcon   <= 8'h01;
        end
        default: if (step) begin
          pair <= pair + 5'd1;
          mod2 <= mod2_nxt;
          if (state == S_EXPAND && mod2 == 3'd0) rcon <= xtime(rcon);
          st_l[0] <= w0;
          st_r[0] <= w1;
          for (int k = 1; k < 4; k++) begin
            st_l[k] <= st_l[k-1];
            st_r[k] <= st_r[k-1];
          end
          if (last)                                   state <= S_IDLE;
          else if (state == S_LOAD && mod2_nxt == 3'd0) state <= S_EXPAND;
        end
      endcase
    end
  end

  assign rk_we    = step;
  assign rk_round = pair[4:1];
  assign rk_half  = pair[0];
  assign rk_wdata = {w0, w1};
  assign done     = step && last;

endmodule
