// main_loop -- HAS-160 step datapath (Main_Loop).
//
// Two rows of chaining registers, as in the reference datapath: the working
// row A..E (with the rotated S1_A and the Boolean term Fj beside it) and the
// result row A_p..E_p. One step takes three clocks, the chain of four 32-bit
// additions being split across them:
//   PH_ROT : A..E <= A_p..E_p;  S1_A <= A_p <<< S1(step);
//            Fj <= f_round(B_p,C_p,D_p) + K(round)
//   PH_ADD1: SUM_L <= E + S1_A;  SUM_R <= Fj + x_in
//   PH_ADD2: A_p <= SUM_L + SUM_R; B_p <= A; C_p <= B <<< S2(round);
//            D_p <= C; E_p <= D
// init loads the result row from setup_data (the chain kept in x_sum), so the
// first PH_ROT starts the block from it. A phase acts only when step_en is
// high; state (round, step) and x_in must be held for the three phases of a
// step. end_state_data is the result row A_p..E_p: after the 80th step it is
// the block's End_State_Data.
//
// The step equation, the rotation amounts, the two register rows with the
// copy back on the third clock and the two adders in the second clock and one
// in the third follow the reference design. Adding K together with f in the
// first clock is this design's choice (the reference counts four additions
// but draws three adders); there is no reset because init always precedes
// use.
module main_loop
  import has160_pkg::*;
(
  input  logic   clk,
  input  logic   init,
  input  logic   step_en,
  input  phase_t ph,
  input  state_t state,
  input  word_t  x_in,
  input  chain_t setup_data,
  output chain_t end_state_data
);

  chain_t v;      // A..E
  chain_t vp;     // A_p..E_p
  word_t  s1_a, fj, sum_l, sum_r;

  always_ff @(posedge clk) begin
    if (init) begin
      vp <= setup_data;
    end else if (step_en) begin
      unique case (ph)
        PH_ROT: begin
          v    <= vp;
          s1_a <= rotl(vp.a, s1_amt(state.step));
          fj   <= f_bool(state.round, vp.b, vp.c, vp.d) + k_const(state.round);
        end
        PH_ADD1: begin
          sum_l <= v.e + s1_a;
          sum_r <= fj + x_in;
        end
        PH_ADD2: begin
          vp.a <= sum_l + sum_r;
          vp.b <= v.a;
          vp.c <= rotl(v.b, s2_amt(state.round));
          vp.d <= v.c;
          vp.e <= v.d;
        end
        default: ;
      endcase
    end
  end

  assign end_state_data = vp;

endmodule
