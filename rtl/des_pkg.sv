// DES (FIPS 46-3) constants and the combinational pieces of the cipher,
// used by the iterative DES core (des_core).
//
// The tables are the standard's: initial and final permutation (IP_T,
// FP_T), expansion (E_T), the P permutation (P_T), the two key-schedule
// selections (PC1_T, PC2_T), the eight S-boxes (SBOX_T, indexed by
// row*16 + column, where the row is the outer two bits of the 6-bit input and
// the column the inner four) and the key-schedule rotations (SHIFT_T). Each
// table lists, for every output bit in order, the input bit it takes, in the
// standard's numbering where bit 1 is the most significant bit; the
// functions below apply them as out[W-1-i] = in[Win - T[i]]. des_f is the
// cipher function f(R, K) of one round. All functions are combinational.
// Nothing here is specific to this design.
package des_pkg;

  localparam byte unsigned IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10,  2, 60, 52, 44, 36, 28, 20, 12,  4,
    62, 54, 46, 38, 30, 22, 14,  6, 64, 56, 48, 40, 32, 24, 16,  8,
    57, 49, 41, 33, 25, 17,  9,  1, 59, 51, 43, 35, 27, 19, 11,  3,
    61, 53, 45, 37, 29, 21, 13,  5, 63, 55, 47, 39, 31, 23, 15,  7
  };

  localparam byte unsigned FP_T [64] = '{
    40,  8, 48, 16, 56, 24, 64, 32, 39,  7, 47, 15, 55, 23, 63, 31,
    38,  6, 46, 14, 54, 22, 62, 30, 37,  5, 45, 13, 53, 21, 61, 29,
    36,  4, 44, 12, 52, 20, 60, 28, 35,  3, 43, 11, 51, 19, 59, 27,
    34,  2, 42, 10, 50, 18, 58, 26, 33,  1, 41,  9, 49, 17, 57, 25
  };

  localparam byte unsigned E_T [48] = '{
    32,  1,  2,  3,  4,  5,  4,  5,  6,  7,  8,  9,  8,  9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32,  1
  };

  localparam byte unsigned P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,  1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9, 19, 13, 30,  6, 22, 11,  4, 25
  };

  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,  1, 58, 50, 42, 34, 26, 18, 10,  2,
    59, 51, 43, 35, 27, 19, 11,  3, 60, 52, 44, 36, 63, 55, 47, 39,
    31, 23, 15,  7, 62, 54, 46, 38, 30, 22, 14,  6, 61, 53, 45, 37,
    29, 21, 13,  5, 28, 20, 12,  4
  };

  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,  3, 28, 15,  6, 21, 10, 23, 19, 12,  4,
    26,  8, 16,  7, 27, 20, 13,  2, 41, 52, 31, 37, 47, 55, 30, 40,
    51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };

  localparam logic [3:0] SBOX_T [8][64] = '{
    '{4'hE, 4'h4, 4'hD, 4'h1, 4'h2, 4'hF, 4'hB, 4'h8, 4'h3, 4'hA, 4'h6, 4'hC, 4'h5, 4'h9, 4'h0, 4'h7,
      4'h0, 4'hF, 4'h7, 4'h4, 4'hE, 4'h2, 4'hD, 4'h1, 4'hA, 4'h6, 4'hC, 4'hB, 4'h9, 4'h5, 4'h3, 4'h8,
      4'h4, 4'h1, 4'hE, 4'h8, 4'hD, 4'h6, 4'h2, 4'hB, 4'hF, 4'hC, 4'h9, 4'h7, 4'h3, 4'hA, 4'h5, 4'h0,
      4'hF, 4'hC, 4'h8, 4'h2, 4'h4, 4'h9, 4'h1, 4'h7, 4'h5, 4'hB, 4'h3, 4'hE, 4'hA, 4'h0, 4'h6, 4'hD},
    '{4'hF, 4'h1, 4'h8, 4'hE, 4'h6, 4'hB, 4'h3, 4'h4, 4'h9, 4'h7, 4'h2, 4'hD, 4'hC, 4'h0, 4'h5, 4'hA,
      4'h3, 4'hD, 4'h4, 4'h7, 4'hF, 4'h2, 4'h8, 4'hE, 4'hC, 4'h0, 4'h1, 4'hA, 4'h6, 4'h9, 4'hB, 4'h5,
      4'h0, 4'hE, 4'h7, 4'hB, 4'hA, 4'h4, 4'hD, 4'h1, 4'h5, 4'h8, 4'hC, 4'h6, 4'h9, 4'h3, 4'h2, 4'hF,
      4'hD, 4'h8, 4'hA, 4'h1, 4'h3, 4'hF, 4'h4, 4'h2, 4'hB, 4'h6, 4'h7, 4'hC, 4'h0, 4'h5, 4'hE, 4'h9},
    '{4'hA, 4'h0, 4'h9, 4'hE, 4'h6, 4'h3, 4'hF, 4'h5, 4'h1, 4'hD, 4'hC, 4'h7, 4'hB, 4'h4, 4'h2, 4'h8,
      4'hD, 4'h7, 4'h0, 4'h9, 4'h3, 4'h4, 4'h6, 4'hA, 4'h2, 4'h8, 4'h5, 4'hE, 4'hC, 4'hB, 4'hF, 4'h1,
      4'hD, 4'h6, 4'h4, 4'h9, 4'h8, 4'hF, 4'h3, 4'h0, 4'hB, 4'h1, 4'h2, 4'hC, 4'h5, 4'hA, 4'hE, 4'h7,
      4'h1, 4'hA, 4'hD, 4'h0, 4'h6, 4'h9, 4'h8, 4'h7, 4'h4, 4'hF, 4'hE, 4'h3, 4'hB, 4'h5, 4'h2, 4'hC},
    '{4'h7, 4'hD, 4'hE, 4'h3, 4'h0, 4'h6, 4'h9, 4'hA, 4'h1, 4'h2, 4'h8, 4'h5, 4'hB, 4'hC, 4'h4, 4'hF,
      4'hD, 4'h8, 4'hB, 4'h5, 4'h6, 4'hF, 4'h0, 4'h3, 4'h4, 4'h7, 4'h2, 4'hC, 4'h1, 4'hA, 4'hE, 4'h9,
      4'hA, 4'h6, 4'h9, 4'h0, 4'hC, 4'hB, 4'h7, 4'hD, 4'hF, 4'h1, 4'h3, 4'hE, 4'h5, 4'h2, 4'h8, 4'h4,
      4'h3, 4'hF, 4'h0, 4'h6, 4'hA, 4'h1, 4'hD, 4'h8, 4'h9, 4'h4, 4'h5, 4'hB, 4'hC, 4'h7, 4'h2, 4'hE},
    '{4'h2, 4'hC, 4'h4, 4'h1, 4'h7, 4'hA, 4'hB, 4'h6, 4'h8, 4'h5, 4'h3, 4'hF, 4'hD, 4'h0, 4'hE, 4'h9,
      4'hE, 4'hB, 4'h2, 4'hC, 4'h4, 4'h7, 4'hD, 4'h1, 4'h5, 4'h0, 4'hF, 4'hA, 4'h3, 4'h9, 4'h8, 4'h6,
      4'h4, 4'h2, 4'h1, 4'hB, 4'hA, 4'hD, 4'h7, 4'h8, 4'hF, 4'h9, 4'hC, 4'h5, 4'h6, 4'h3, 4'h0, 4'hE,
      4'hB, 4'h8, 4'hC, 4'h7, 4'h1, 4'hE, 4'h2, 4'hD, 4'h6, 4'hF, 4'h0, 4'h9, 4'hA, 4'h4, 4'h5, 4'h3},
    '{4'hC, 4'h1, 4'hA, 4'hF, 4'h9, 4'h2, 4'h6, 4'h8, 4'h0, 4'hD, 4'h3, 4'h4, 4'hE, 4'h7, 4'h5, 4'hB,
      4'hA, 4'hF, 4'h4, 4'h2, 4'h7, 4'hC, 4'h9, 4'h5, 4'h6, 4'h1, 4'hD, 4'hE, 4'h0, 4'hB, 4'h3, 4'h8,
      4'h9, 4'hE, 4'hF, 4'h5, 4'h2, 4'h8, 4'hC, 4'h3, 4'h7, 4'h0, 4'h4, 4'hA, 4'h1, 4'hD, 4'hB, 4'h6,
      4'h4, 4'h3, 4'h2, 4'hC, 4'h9, 4'h5, 4'hF, 4'hA, 4'hB, 4'hE, 4'h1, 4'h7, 4'h6, 4'h0, 4'h8, 4'hD},
    '{4'h4, 4'hB, 4'h2, 4'hE, 4'hF, 4'h0, 4'h8, 4'hD, 4'h3, 4'hC, 4'h9, 4'h7, 4'h5, 4'hA, 4'h6, 4'h1,
      4'hD, 4'h0, 4'hB, 4'h7, 4'h4, 4'h9, 4'h1, 4'hA, 4'hE, 4'h3, 4'h5, 4'hC, 4'h2, 4'hF, 4'h8, 4'h6,
      4'h1, 4'h4, 4'hB, 4'hD, 4'hC, 4'h3, 4'h7, 4'hE, 4'hA, 4'hF, 4'h6, 4'h8, 4'h0, 4'h5, 4'h9, 4'h2,
      4'h6, 4'hB, 4'hD, 4'h8, 4'h1, 4'h4, 4'hA, 4'h7, 4'h9, 4'h5, 4'h0, 4'hF, 4'hE, 4'h2, 4'h3, 4'hC},
    '{4'hD, 4'h2, 4'h8, 4'h4, 4'h6, 4'hF, 4'hB, 4'h1, 4'hA, 4'h9, 4'h3, 4'hE, 4'h5, 4'h0, 4'hC, 4'h7,
      4'h1, 4'hF, 4'hD, 4'h8, 4'hA, 4'h3, 4'h7, 4'h4, 4'hC, 4'h5, 4'h6, 4'hB, 4'h0, 4'hE, 4'h9, 4'h2,
      4'h7, 4'hB, 4'h4, 4'h1, 4'h9, 4'hC, 4'hE, 4'h2, 4'h0, 4'h6, 4'hA, 4'hD, 4'hF, 4'h3, 4'h5, 4'h8,
      4'h2, 4'h1, 4'hE, 4'h7, 4'h4, 4'hA, 4'h8, 4'hD, 4'hF, 4'hC, 4'h9, 4'h0, 4'h3, 4'h5, 4'h6, 4'hB}
  };

  // Rotation of C and D before each round of the encryption key schedule
  localparam logic [1:0] SHIFT_T [16] = '{2'd1, 2'd1, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2,
                                          2'd1, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd1};

  function automatic logic [63:0] des_ip(logic [63:0] x);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[63-i] = x[64-int'(IP_T[i])];
    return r;
  endfunction

  function automatic logic [63:0] des_fp(logic [63:0] x);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[63-i] = x[64-int'(FP_T[i])];
    return r;
  endfunction

  function automatic logic [55:0] des_pc1(logic [63:0] k);
    logic [55:0] r;
    for (int i = 0; i < 56; i++) r[55-i] = k[64-int'(PC1_T[i])];
    return r;
  endfunction

  function automatic logic [47:0] des_pc2(logic [55:0] cd);
    logic [47:0] r;
    for (int i = 0; i < 48; i++) r[47-i] = cd[56-int'(PC2_T[i])];
    return r;
  endfunction

  // Cipher function f(R, K)
  function automatic logic [31:0] des_f(logic [31:0] r, logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    logic [31:0] p;
    logic [5:0]  b;
    for (int i = 0; i < 48; i++) e[47-i] = r[32-int'(E_T[i])];
    e = e ^ k;
    for (int i = 0; i < 8; i++) begin
      b = e[47-6*i -: 6];
      s[31-4*i -: 4] = SBOX_T[i][{b[5], b[0], b[4:1]}];
    end
    for (int i = 0; i < 32; i++) p[31-i] = s[32-int'(P_T[i])];
    return p;
  endfunction

  function automatic logic [27:0] rol28(logic [27:0] v, logic [1:0] n);
    return (n == 2'd2) ? {v[25:0], v[27:26]} : (n == 2'd1) ? {v[26:0], v[27]} : v;
  endfunction

  function automatic logic [27:0] ror28(logic [27:0] v, logic [1:0] n);
    return (n == 2'd2) ? {v[1:0], v[27:2]} : (n == 2'd1) ? {v[0], v[27:1]} : v;
  endfunction

endpackage
