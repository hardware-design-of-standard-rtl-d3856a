// has160_pkg -- types, constants and step functions shared by the HAS-160 core.
//
// HAS-160 compresses a 512-bit block (16 little-endian 32-bit words X[0..15])
// into a 160-bit chain H0..H4 through 4 rounds of 20 steps. Each round first
// derives four extra words X[16..19], each the XOR of four message words, and
// each step j uses the word X[l(j)], a left rotation of A by S1(j), a rotation
// of B by S2(round), a Boolean function f(B,C,D) and a round constant K.
//
// The step-to-word map l(j), the S1 and S2 amounts and the initial chain come
// from the standard as the design's reference describes it. The Boolean
// functions and the round constants are not spelled out there and are taken
// from the HAS-160 standard (they reproduce its published digests).
package has160_pkg;

  localparam int unsigned W             = 32;   // word width
  localparam int unsigned ROUNDS        = 4;
  localparam int unsigned STEPS_PER_RND = 20;
  localparam int unsigned CLKS_PER_STEP = 3;
  // Clocks to process one block once its 16 words are loaded:
  // 1 (load A..E) + 4 x (4 word generations + 20 x 3 step clocks) + 1 (final add)
  localparam int unsigned BLOCK_CLKS    = 1 + ROUNDS * (4 + STEPS_PER_RND * CLKS_PER_STEP) + 1;

  typedef logic [W-1:0] word_t;

  // Chaining variables A..E (also used for H0..H4), A / H0 in the top bits.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } chain_t;

  // "State" of the reference block diagrams: current round and step in it.
  typedef struct packed {
    logic [1:0] round;   // 0..3
    logic [4:0] step;    // 0..19
  } state_t;

  // Phase of the three-clock step operation.
  typedef enum logic [1:0] {
    PH_ROT  = 2'd0,   // A..E = A_p..E_p, S1_A = A_p <<< S1, Fj = f(B_p,C_p,D_p) + K
    PH_ADD1 = 2'd1,   // E + S1_A, Fj + X[l(j)]
    PH_ADD2 = 2'd2    // A_p = sum of both, B_p = A, C_p = B <<< S2, D_p = C, E_p = D
  } phase_t;

  localparam chain_t H_INIT = '{a: 32'h67452301, b: 32'hefcdab89, c: 32'h98badcfe,
                                d: 32'h10325476, e: 32'hc3d2e1f0};

  // l(j): index of the message word used at each step of each round.
  function automatic logic [4:0] msg_index(input logic [1:0] round, input logic [4:0] step);
    logic [4:0] r1 [20] = '{18, 0, 1, 2, 3,19, 4, 5, 6, 7,16, 8, 9,10,11,17,12,13,14,15};
    logic [4:0] r2 [20] = '{18, 3, 6, 9,12,19,15, 2, 5, 8,16,11,14, 1, 4,17, 7,10,13, 0};
    logic [4:0] r3 [20] = '{18,12, 5,14, 7,19, 0, 9, 2,11,16, 4,13, 6,15,17, 8, 1,10, 3};
    logic [4:0] r4 [20] = '{18, 7, 2,13, 8,19, 3,14, 9, 4,16,15,10, 5, 0,17,11, 6, 1,12};
    logic [4:0] s;
    s = (step < 5'd20) ? step : 5'd0;
    case (round)
      2'd0:    return r1[s];
      2'd1:    return r2[s];
      2'd2:    return r3[s];
      default: return r4[s];
    endcase
  endfunction

  // Source word n (0..3) of X[16+k]: the word used at step 5k+1+n of the
  // round. X[16] is the XOR of the words of steps 1-4, X[17] of steps 6-9,
  // X[18] of steps 11-14 and X[19] of steps 16-19.
  function automatic logic [4:0] gen_src(input logic [1:0] round, input logic [1:0] k,
                                         input logic [1:0] n);
    return msg_index(round, 5'(5 * k + 1 + n));
  endfunction

  // Left rotation amount of A, indexed by step within the round.
  function automatic logic [4:0] s1_amt(input logic [4:0] step);
    logic [4:0] t [20] = '{5,11,7,15,6,13,8,14,7,12,9,11,8,15,6,12,9,14,5,13};
    return (step < 5'd20) ? t[step] : 5'd0;
  endfunction

  // Left rotation amount of B, per round.
  function automatic logic [4:0] s2_amt(input logic [1:0] round);
    case (round)
      2'd0:    return 5'd10;
      2'd1:    return 5'd17;
      2'd2:    return 5'd25;
      default: return 5'd30;
    endcase
  endfunction

  function automatic word_t k_const(input logic [1:0] round);
    case (round)
      2'd0:    return 32'h00000000;
      2'd1:    return 32'h5a827999;
      2'd2:    return 32'h6ed9eba1;
      default: return 32'h8f1bbcdc;
    endcase
  endfunction

  function automatic word_t f_bool(input logic [1:0] round, input word_t x, input word_t y,
                                   input word_t z);
    case (round)
      2'd0:    return (x & y) | (~x & z);
      2'd2:    return y ^ (x | ~z);
      default: return x ^ y ^ z;
    endcase
  endfunction

  function automatic word_t rotl(input word_t x, input logic [4:0] n);
    return (x << n) | (x >> (6'(W) - 6'(n)));
  endfunction

endpackage
