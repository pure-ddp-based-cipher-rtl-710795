// crypt_round: one DDP-64 round, procedure Crypt^(e) (the data
// transformation round core).
//
// Left branch: L' = (Pi^(e')(L))^<<<16. Right branch:
//   R1 = R xor F(Z = L xor Q4, Z' = L xor Q2)
//   R2 = P32/96(R1) controlled by V  = E(L  xor Q1)
//   R3 = I(R2), each 16-bit half rotated by 8
//   R4 = P^-1 32/96(R3) controlled by V' = E(L' xor Q3)
//   R' = R4 xor F(Z = L' xor Q2, Z' = L' xor Q4)
// The extension box E maps U to (U_l, U_l<<<6, U_l<<<12, U_h, U_h<<<6,
// U_h<<<12). The elements (P32/96, P^-1 32/96, two F-boxes, I, Pi^(e'),
// <<<16, use of Q1/Q3 for V/V' and of Q2/Q4 for the F-boxes) are the
// cipher's. Where each element taps the left branch, which subkey feeds which
// F-box input, and the rotation amounts of E are this design's reading; they
// are chosen so that the same round run with the decryption schedule
// (Q1<->Q3, Q2<->Q4, e' from the decryption row) inverts it. The swap of
// the subblocks between rounds is done by the caller. Purely combinational.
module crypt_round
  import ddp64_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  round_key_t  rk,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);
  logic [31:0] l_pi, fa, fb, r1, r2, r3, r4;
  logic [95:0] v, v_p;

  pi_switch u_pi (.x(l_in), .esw(rk.esw), .y(l_pi));
  assign l_out = rot32(l_pi, 16);

  assign v   = ext_e(l_in ^ rk.q1);
  assign v_p = ext_e(l_out ^ rk.q3);

  f_box u_fa (.z(l_in ^ rk.q4),  .zc(l_in ^ rk.q2),  .y(fa));
  f_box u_fb (.z(l_out ^ rk.q2), .zc(l_out ^ rk.q4), .y(fb));

  assign r1 = r_in ^ fa;
  cp_box_32_96 #(.INVERSE(1'b0)) u_p    (.x(r1), .v(v),   .y(r2));
  assign r3 = invol_i(r2);
  cp_box_32_96 #(.INVERSE(1'b1)) u_pinv (.x(r3), .v(v_p), .y(r4));
  assign r_out = r4 ^ fb;
endmodule
