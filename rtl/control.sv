// control -- sequencer and host interface of the HAS-160 core (Control Block).
//
// Host side: while in_ready is high the host writes the padded message as
// 32-bit little-endian words, one per clock with in_en (idle cycles allowed),
// 16 words per 512-bit block; in_last, sampled with the 16th word, marks the
// final block. The first word of a message also restarts the chain in x_sum.
// After the last block the hash appears on hash_out as five consecutive words
// H0, H1, H2, H3, H4 with hash_valid high, and in_ready returns.
//
// Per block, once the 16th word is in, the sequence is
//   INIT  1 clock            main_loop loads the chain from x_sum
//   per round (4 rounds):
//     GEN   4 clocks         x_gen writes X16, X17, X18, X19
//     STEP  20 x 3 clocks    three-phase steps, state = {round, step}
//   FINAL 1 clock            x_sum adds A..E into H0..H4
// i.e. 258 clocks per block (BLOCK_CLKS); then in_ready rises again, or the
// five-clock output follows for the last block.
//
// The reference gives this block's duties and the 2.345 us / 110 MHz block
// time; the state machine, the handshake, the in_last convention and the
// output order are this design's choices. Reset is synchronous, active high.
module control
  import has160_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // host
  input  logic        in_en,
  input  logic        in_last,
  output logic        in_ready,
  output word_t       hash_out,
  output logic        hash_valid,
  // x_gen
  output logic        xg_in_en,
  input  logic [3:0]  xg_count,
  output logic        gen_en,
  output logic [1:0]  gen_idx,
  output state_t      state,
  // main_loop
  output logic        ml_init,
  output logic        step_en,
  output phase_t      ph,
  // x_sum
  output logic        xs_init,
  output logic        xs_acc,
  output logic        end_state,
  input  chain_t      has_value
);

  typedef enum logic [2:0] {S_LOAD, S_INIT, S_GEN, S_STEP, S_FINAL, S_OUT} fsm_t;

  fsm_t       st;
  logic [1:0] rnd;
  logic [4:0] stp;
  logic [1:0] gidx;
  logic [2:0] oidx;
  logic       last;
  logic       new_msg;

  assign in_ready  = (st == S_LOAD);
  assign xg_in_en  = in_en && in_ready;
  assign xs_init   = xg_in_en && new_msg;
  assign ml_init   = (st == S_INIT);
  assign gen_en    = (st == S_GEN);
  assign gen_idx   = gidx;
  assign step_en   = (st == S_STEP);
  assign state     = '{round: rnd, step: stp};
  assign xs_acc    = (st == S_FINAL);
  assign end_state = (st == S_OUT);
  assign hash_valid = (st == S_OUT);

  always_comb begin
    unique case (oidx)
      3'd0:    hash_out = has_value.a;
      3'd1:    hash_out = has_value.b;
      3'd2:    hash_out = has_value.c;
      3'd3:    hash_out = has_value.d;
      default: hash_out = has_value.e;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= S_LOAD;
      rnd     <= '0;
      stp     <= '0;
      gidx    <= '0;
      oidx    <= '0;
      ph      <= PH_ROT;
      last    <= 1'b0;
      new_msg <= 1'b1;
    end else begin
      unique case (st)
        S_LOAD: if (xg_in_en) begin
          new_msg <= 1'b0;
          if (xg_count == 4'd15) begin
            last <= in_last;
            st   <= S_INIT;
          end
        end
        S_INIT: begin
          rnd  <= '0;
          gidx <= '0;
          st   <= S_GEN;
        end
        S_GEN: begin
          gidx <= gidx + 2'd1;
          if (gidx == 2'd3) begin
            stp <= '0;
            ph  <= PH_ROT;
            st  <= S_STEP;
          end
        end
        S_STEP: begin
          unique case (ph)
            PH_ROT:  ph <= PH_ADD1;
            PH_ADD1: ph <= PH_ADD2;
            default: begin
              ph <= PH_ROT;
              if (stp == 5'd19) begin
                if (rnd == 2'd3) begin
                  st <= S_FINAL;
                end else begin
                  rnd  <= rnd + 2'd1;
                  gidx <= '0;
                  st   <= S_GEN;
                end
              end else begin
                stp <= stp + 5'd1;
              end
            end
          endcase
        end
        S_FINAL: begin
          oidx <= '0;
          st   <= last ? S_OUT : S_LOAD;
        end
        default: begin  // S_OUT
          oidx <= oidx + 3'd1;
          if (oidx == 3'd4) begin
            st      <= S_LOAD;
            new_msg <= 1'b1;
          end
        end
      endcase
    end
  end

  // Host rule: words are offered only while the core is ready.
  always_ff @(posedge clk) if (!rst) assert (!(in_en && !in_ready))
    else $error("control: in_en while in_ready is low");

endmodule
