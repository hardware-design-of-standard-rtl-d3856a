// x_gen -- message word store and per-round word generator (X_Gen).
//
// Twenty 32-bit registers X0..X19. Message words arrive one per clock with
// in_en; a 4-bit counter picks the register X[count] they are written to, so a
// block is X0 first, X15 last, and the counter wraps back to 0 for the next
// block. At the start of each round the controller pulses gen_en four times
// (gen_idx 0..3); each pulse writes X[16+gen_idx] with the XOR of four message
// words chosen by four multiplexers from X0..X15 (X16 = words of steps 1-4,
// X17 of steps 6-9, X18 of steps 11-14, X19 of steps 16-19 of that round).
// out_data is a combinational multiplexer that shows X[l(j)] for the round and
// step given on state.
//
// Timing: writes take effect at the next rising edge; out_data follows state
// in the same cycle. rst (synchronous, active high) clears only the counter.
//
// The counter/decoder/register/mux/XOR structure follows the reference block
// diagram; one generated word per clock and the 32-bit input bus are this
// design's choices.
module x_gen
  import has160_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_en,
  input  word_t       in_data,
  output logic [3:0]  count,
  input  logic        gen_en,
  input  logic [1:0]  gen_idx,
  input  state_t      state,
  output word_t       out_data
);

  word_t x [20];
  word_t gen_word;

  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (in_en) count <= count + 4'd1;
  end

  // Four source multiplexers feeding one XOR.
  always_comb begin
    gen_word = '0;
    for (int n = 0; n < 4; n++)
      gen_word ^= x[gen_src(state.round, gen_idx, 2'(n))];
  end

  always_ff @(posedge clk) begin
    if (in_en)  x[5'(count)]            <= in_data;
    if (gen_en) x[5'd16 + 5'(gen_idx)] <= gen_word;
  end

  assign out_data = x[msg_index(state.round, state.step)];

  // Loading and generation never overlap: the controller separates them.
  always_ff @(posedge clk) if (!rst) assert (!(in_en && gen_en))
    else $error("x_gen: in_en and gen_en in the same cycle");

endmodule
