// cp_box_32_96: the six-layer controlled-permutation box P32/96 (INVERSE = 0)
// or its inverse P^-1 32/96 (INVERSE = 1), which carry the data-dependent
// permutations of the right data subblock in every DDP-64 round.
//
// The box is four parallel P8/12 boxes (one per byte), the fixed central
// involution (bit 8b+4h+k <-> bit 8k+4h+b, i.e. bit k of each nibble of byte
// b goes to byte k), and four parallel P^-1 8/12 boxes. The 96-bit control
// vector is (V1..V6) with V1 = v[15:0]; V_j drives active layer j, bit 4b+s
// of V_j driving switch s of byte box b. The inverse box has the same wiring
// but takes V_j on layer 7-j, so P^-1(V) undoes P(V) for every V. The
// structure and the central involution are the cipher's; the numbering of
// switches inside a layer is this design's reading. Purely combinational.
module cp_box_32_96
  import ddp64_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [31:0] x,
  input  logic [95:0] v,
  output logic [31:0] y
);
  logic [15:0] c [6];   // control of the k-th layer the data meets
  logic [31:0] a, b;

  always_comb begin
    for (int k = 0; k < 6; k++)
      c[k] = INVERSE ? v[16*(5-k) +: 16] : v[16*k +: 16];
  end

  for (genvar bx = 0; bx < 4; bx++) begin : g_first
    cp_box_8_12 #(.INVERSE(1'b0)) u_box (
      .x (x[8*bx +: 8]),
      .v ({c[2][4*bx +: 4], c[1][4*bx +: 4], c[0][4*bx +: 4]}),
      .y (a[8*bx +: 8])
    );
  end

  assign b = mid_involution(a);

  for (genvar bx = 0; bx < 4; bx++) begin : g_second
    // the mirror box meets v[11:8] first
    cp_box_8_12 #(.INVERSE(1'b1)) u_box (
      .x (b[8*bx +: 8]),
      .v ({c[3][4*bx +: 4], c[4][4*bx +: 4], c[5][4*bx +: 4]}),
      .y (y[8*bx +: 8])
    );
  end
endmodule
