// cp_box_32_48: the three-layer controlled-permutation box P32/48 (INVERSE = 0)
// or its inverse P^-1 32/48 (INVERSE = 1), the two CP boxes of the F-box.
//
// Four P8/12 boxes (or four P^-1 8/12 boxes) side by side, one per byte, so a
// bit never leaves its byte. Control vector (V1,V2,V3), V1 = v[15:0]; bit
// 4b+s of V_j drives switch s of layer j in byte box b. The inverse box takes
// V_j on its layer 4-j, so P^-1(V) undoes P(V). That the box is byte-local
// follows from the cipher's description of the F-box; the switch numbering
// is this design's reading. Purely combinational.
module cp_box_32_48 #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [31:0] x,
  input  logic [47:0] v,
  output logic [31:0] y
);
  for (genvar bx = 0; bx < 4; bx++) begin : g_box
    cp_box_8_12 #(.INVERSE(INVERSE)) u_box (
      .x (x[8*bx +: 8]),
      .v ({v[32 + 4*bx +: 4], v[16 + 4*bx +: 4], v[4*bx +: 4]}),
      .y (y[8*bx +: 8])
    );
  end
endmodule
