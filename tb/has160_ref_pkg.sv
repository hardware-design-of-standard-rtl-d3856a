// has160_ref_pkg -- behavioural HAS-160 reference used by the testbenches.
//
// A plain, untimed software-style model written independently of the RTL: the
// extra words X16..X19 come from explicit per-round source lists of the
// standard rather than from the step table, and the compression function is a
// straight loop. It reproduces the published digests of "", "a" and "abc".
package has160_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        words16_t [16];
  typedef w32_t        words20_t [20];
  typedef w32_t        chain5_t  [5];   // A..E or H0..H4

  localparam int L_TAB [4][20] = '{
    '{18, 0, 1, 2, 3,19, 4, 5, 6, 7,16, 8, 9,10,11,17,12,13,14,15},
    '{18, 3, 6, 9,12,19,15, 2, 5, 8,16,11,14, 1, 4,17, 7,10,13, 0},
    '{18,12, 5,14, 7,19, 0, 9, 2,11,16, 4,13, 6,15,17, 8, 1,10, 3},
    '{18, 7, 2,13, 8,19, 3,14, 9, 4,16,15,10, 5, 0,17,11, 6, 1,12}};

  // Source words of X16, X17, X18, X19 for each round.
  localparam int GEN_TAB [4][4][4] = '{
    '{'{ 0, 1, 2, 3}, '{ 4, 5, 6, 7}, '{ 8, 9,10,11}, '{12,13,14,15}},
    '{'{ 3, 6, 9,12}, '{15, 2, 5, 8}, '{11,14, 1, 4}, '{ 7,10,13, 0}},
    '{'{12, 5,14, 7}, '{ 0, 9, 2,11}, '{ 4,13, 6,15}, '{ 8, 1,10, 3}},
    '{'{ 7, 2,13, 8}, '{ 3,14, 9, 4}, '{15,10, 5, 0}, '{11, 6, 1,12}}};

  localparam int   S1_TAB [20] = '{5,11,7,15,6,13,8,14,7,12,9,11,8,15,6,12,9,14,5,13};
  localparam int   S2_TAB [4]  = '{10, 17, 25, 30};
  localparam w32_t K_TAB  [4]  = '{32'h0, 32'h5a827999, 32'h6ed9eba1, 32'h8f1bbcdc};
  localparam w32_t IV     [5]  = '{32'h67452301, 32'hefcdab89, 32'h98badcfe,
                                   32'h10325476, 32'hc3d2e1f0};

  function automatic w32_t rol(w32_t x, int n);
    if (n == 0) return x;
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32_t fr(int r, w32_t x, w32_t y, w32_t z);
    if (r == 0) return (x & y) | ((~x) & z);
    if (r == 2) return y ^ (x | (~z));
    return x ^ y ^ z;
  endfunction

  // X16..X19 of round r written into x[16..19].
  function automatic void expand(int r, ref words20_t x);
    for (int k = 0; k < 4; k++)
      x[16+k] = x[GEN_TAB[r][k][0]] ^ x[GEN_TAB[r][k][1]] ^
                x[GEN_TAB[r][k][2]] ^ x[GEN_TAB[r][k][3]];
  endfunction

  // One step on v = {A,B,C,D,E} with message word xw.
  function automatic void step(int r, int s, w32_t xw, ref chain5_t v);
    w32_t t;
    t = rol(v[0], S1_TAB[s]) + fr(r, v[1], v[2], v[3]) + v[4] + xw + K_TAB[r];
    v[4] = v[3];
    v[3] = v[2];
    v[2] = rol(v[1], S2_TAB[r]);
    v[1] = v[0];
    v[0] = t;
  endfunction

  // Compression of one block: h updated in place.
  function automatic void compress(ref chain5_t h, input words16_t m);
    words20_t x;
    chain5_t  v;
    for (int i = 0; i < 16; i++) x[i] = m[i];
    for (int i = 16; i < 20; i++) x[i] = '0;
    v = h;
    for (int r = 0; r < 4; r++) begin
      expand(r, x);
      for (int s = 0; s < 20; s++) step(r, s, x[L_TAB[r][s]], v);
    end
    for (int i = 0; i < 5; i++) h[i] = h[i] + v[i];
  endfunction

  // Word i (0..4) of a digest written as the usual 40-hex-digit byte string.
  function automatic w32_t digest_word(logic [159:0] d, int i);
    w32_t be;
    be = d[159 - 32*i -: 32];
    return {be[7:0], be[15:8], be[23:16], be[31:24]};
  endfunction

endpackage
