// has160_top -- HAS-160 hash core.
//
// Computes the 160-bit HAS-160 digest of a message given as padded 512-bit
// blocks. The four blocks are wired as in the reference system diagram:
// control feeds message words to x_gen and sequences everything; x_gen
// supplies the word of each step to main_loop; main_loop runs the 80 steps of
// a block starting from the chain held in x_sum, and x_sum adds the result
// back into the chain and hands the final value to control for output.
//
// Interface (all synchronous to clk, rst synchronous active high):
//   in_ready    core accepts words
//   in_en       in_data holds a message word (only while in_ready)
//   in_data     32-bit word, bytes in little-endian order (byte 0 in [7:0])
//   in_last     with the 16th word of a block: this is the final block
//   hash_out    digest words H0..H4 on five consecutive clocks
//   hash_valid  hash_out valid
// Timing: 16 load clocks (at full rate) plus 258 processing clocks per block;
// 5 output clocks after the last block. The host does the padding.
module has160_top
  import has160_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_en,
  input  word_t in_data,
  input  logic  in_last,
  output logic  in_ready,
  output word_t hash_out,
  output logic  hash_valid
);

  logic       xg_in_en, gen_en, ml_init, step_en, xs_init, xs_acc, end_state;
  logic [3:0] xg_count;
  logic [1:0] gen_idx;
  state_t     state;
  phase_t     ph;
  word_t      x_word;
  chain_t     end_state_data, setup_data, has_value;

  control u_control (
    .clk, .rst,
    .in_en, .in_last, .in_ready, .hash_out, .hash_valid,
    .xg_in_en, .xg_count, .gen_en, .gen_idx, .state,
    .ml_init, .step_en, .ph,
    .xs_init, .xs_acc, .end_state, .has_value
  );

  x_gen u_x_gen (
    .clk, .rst,
    .in_en   (xg_in_en),
    .in_data,
    .count   (xg_count),
    .gen_en, .gen_idx, .state,
    .out_data(x_word)
  );

  main_loop u_main_loop (
    .clk,
    .init(ml_init),
    .step_en, .ph, .state,
    .x_in(x_word),
    .setup_data, .end_state_data
  );

  x_sum u_x_sum (
    .clk, .rst,
    .init(xs_init),
    .acc (xs_acc),
    .end_state, .end_state_data, .setup_data, .has_value
  );

endmodule
