// ddp64_pkg: types, constants and fixed wirings shared by the DDP-64 cipher RTL.
//
// Bit numbering follows the cipher's vector notation: bit x_1 of a vector is
// index 0 (the least significant bit), so the "low half" X_l of a word is
// X[n/2-1:0]. A 64-bit block is (L, R) with L = block[31:0]; a 128-bit key is
// (K1, K2, K3, K4) with K1 = key[31:0].
//
// The rotation X^<<<k is defined by the cipher as y_i = x_{i+k}; in index terms
// output bit i takes input bit (i+k) mod n, which the rot* functions implement.
//
// The round-key schedule (Table of Q(1..4)_j and switching bit e'_j for both
// modes) is the cipher's own; the round_key_t layout is this design's choice.
package ddp64_pkg;

  localparam int unsigned ROUNDS = 10;

  // One round key: four 32-bit round subkeys and the switching bit e'.
  typedef struct packed {
    logic        esw;   // e'_j, selects Pi(0) or Pi(1)
    logic [31:0] q1;    // forms V  (controls P32/96)
    logic [31:0] q2;    // F-box subkey
    logic [31:0] q3;    // forms V' (controls P^-1 32/96)
    logic [31:0] q4;    // F-box subkey
  } round_key_t;

  localparam int unsigned RK_W = $bits(round_key_t);

  // Index (1..4) of the e-dependent subkey O_i used as Q(k)_j, round j = 1..10.
  typedef int unsigned sched_row_t [ROUNDS];
  localparam sched_row_t Q1_SEL = '{3, 2, 1, 4, 3, 3, 4, 1, 2, 3};
  localparam sched_row_t Q2_SEL = '{4, 3, 2, 1, 2, 2, 1, 2, 3, 4};
  localparam sched_row_t Q3_SEL = '{1, 4, 3, 2, 1, 1, 2, 3, 4, 1};
  localparam sched_row_t Q4_SEL = '{2, 1, 4, 3, 4, 4, 3, 4, 1, 2};
  // e'_j for encryption (e=0) and decryption (e=1); bit j-1 is round j.
  localparam logic [ROUNDS-1:0] ESW_ENC = 10'b10_1110_1101; // 1 0 1 1 0 1 1 1 0 1
  localparam logic [ROUNDS-1:0] ESW_DEC = 10'b01_0010_0010; // 0 1 0 0 0 1 0 0 1 0

  // F-box constant C = (c1..c8) = (1,0,1,0,1,0,1,0), c1 at bit 0.
  localparam logic [7:0] F_CONST = 8'b0101_0101;

  // Rotation X^<<<k of a 32-bit / 16-bit word: y[i] = x[(i+k) mod n].
  function automatic logic [31:0] rot32(input logic [31:0] x, input int unsigned k);
    return (x >> k) | (x << (32 - k));
  endfunction

  function automatic logic [15:0] rot16(input logic [15:0] x, input int unsigned k);
    return (x >> k) | (x << (16 - k));
  endfunction

  // Central involution of P32/96: bit 8b+4h+k <-> bit 8k+4h+b (b,k in 0..3),
  // the closed form of (1)(2,9)(3,17)(4,25)(5)(6,13)...(24,31)(28)(32).
  function automatic logic [31:0] mid_involution(input logic [31:0] x);
    logic [31:0] y;
    for (int b = 0; b < 4; b++)
      for (int h = 0; h < 2; h++)
        for (int k = 0; k < 4; k++)
          y[8*k + 4*h + b] = x[8*b + 4*h + k];
    return y;
  endfunction

  // Involution I of the right branch: each 16-bit half rotated by 8.
  function automatic logic [31:0] invol_i(input logic [31:0] x);
    return {rot16(x[31:16], 8), rot16(x[15:0], 8)};
  endfunction

  // Extension box E: 32-bit U -> 96-bit V = (U_l, U_l<<<6, U_l<<<12,
  // U_h, U_h<<<6, U_h<<<12), V1 in bits 15:0.
  function automatic logic [95:0] ext_e(input logic [31:0] u);
    return {rot16(u[31:16], 12), rot16(u[31:16], 6), u[31:16],
            rot16(u[15:0], 12),  rot16(u[15:0], 6),  u[15:0]};
  endfunction

  // Extension box E': 32-bit Z' -> 80-bit W = (W1..W5), W1 in bits 15:0.
  function automatic logic [79:0] ext_e_prime(input logic [31:0] z);
    return {rot16(z[31:16], 5), z[31:16],
            rot16(z[15:0], 10), rot16(z[15:0], 5), z[15:0]};
  endfunction

endpackage
