// x_sum -- chain variable register H0..H4 (X_Sum).
//
// rst or init loads the HAS-160 initial constants (Reset_Data); acc adds
// End_State_Data (A..E after the 80 steps) word by word, modulo 2^32, into
// H0..H4 -- the final addition of a block. The chain is offered to main_loop
// as setup_data while end_state is low and to the controller as has_value
// while end_state is high; the output not selected is zero.
//
// Timing: all updates at the rising edge; outputs are the registers.
// Structure (adder, Reset_Data mux on rst, H0..H4 register, demultiplexer on
// End_State) follows the reference; the separate init input, used to restart
// the chain for every new message without a global reset, is this design's.
module x_sum
  import has160_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   init,
  input  logic   acc,
  input  logic   end_state,
  input  chain_t end_state_data,
  output chain_t setup_data,
  output chain_t has_value
);

  chain_t h;

  always_ff @(posedge clk) begin
    if (rst || init) begin
      h <= H_INIT;
    end else if (acc) begin
      h.a <= h.a + end_state_data.a;
      h.b <= h.b + end_state_data.b;
      h.c <= h.c + end_state_data.c;
      h.d <= h.d + end_state_data.d;
      h.e <= h.e + end_state_data.e;
    end
  end

  assign has_value  = end_state ? h  : '0;
  assign setup_data = end_state ? '0 : h;

endmodule
