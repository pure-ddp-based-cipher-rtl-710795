// f_box: the non-linear DDP operation F of DDP-64.
//
// The control input Z' is spread by the extension box E' into
// W = (W1..W5): W1 = Z'_l, W2 = Z'_l<<<5, W3 = Z'_l<<<10, W4 = Z'_h,
// W5 = Z'_h<<<5. The data input Z is permuted by P32/48 under (W1,W2,W3)
// giving D; the 40-bit word (D, C) with the constant C = (1,0,1,0,1,0,1,0) is
// rearranged by the fixed permutation Pi' into H = (H1..H5). H5 (bits
// d1,d8,d10,d15,d19,d22,d28,d29) is dropped from the data path, so eight bits
// of Z are replaced by bits of C, and feeds the box Ext, W6 = (H5, H5).
// (H1..H4) then passes P^-1 32/48 whose first, second and third layers are
// driven by W4, W5 and W6. All of this is the cipher's; keeping Z and Z' as
// separate ports is this design's choice. Purely combinational; the longest
// path runs through P32/48, Pi', Ext and the last layer of P^-1 32/48.
module f_box
  import ddp64_pkg::*;
(
  input  logic [31:0] z,    // data input Z
  input  logic [31:0] zc,   // control input Z'
  output logic [31:0] y
);
  // Pi': source index (0-based) of each of the 40 output bits; bits 32..39
  // of the source word are the constant C. Derived from the cycle list
  // (1,33)(2,9)(3,17)(4,25)(5)(6,13)(7,21)(8,34,29,40)(10,35)(11,18)(12,26)
  // (14)(15,36,22,38)(16,30)(19,37)(20,27)(23)(24,31)(28,39)(32), where a
  // cycle (a,b,...) moves bit a to position b.
  typedef int unsigned pi_tab_t [40];
  localparam pi_tab_t PI_PRIME_SRC = '{
    32,  8, 16, 24,  4, 12, 20, 39,  1, 34,
    17, 25,  5, 13, 37, 29,  2, 10, 36, 26,
     6, 35, 22, 30,  3, 11, 19, 38, 33, 15,
    23, 31,  0,  7,  9, 14, 18, 21, 27, 28
  };

  logic [79:0] w;
  logic [31:0] d;
  logic [39:0] dc, h;
  logic [15:0] w6;

  assign w = ext_e_prime(zc);

  cp_box_32_48 #(.INVERSE(1'b0)) u_p (
    .x (z),
    .v (w[47:0]),             // (W1, W2, W3)
    .y (d)
  );

  assign dc = {F_CONST, d};

  always_comb begin
    for (int i = 0; i < 40; i++)
      h[i] = dc[PI_PRIME_SRC[i]];
  end

  assign w6 = {h[39:32], h[39:32]};   // Ext

  // The inverse box meets its v[47:32] first: W4, then W5, then W6.
  cp_box_32_48 #(.INVERSE(1'b1)) u_pinv (
    .x (h[31:0]),
    .v ({w[63:48], w[79:64], w6}),
    .y (y)
  );
endmodule
