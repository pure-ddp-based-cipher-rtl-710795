// cp_box_8_12: the three-layer controlled-permutation box P8/12 (INVERSE = 0)
// or its inverse P^-1 8/12 (INVERSE = 1).
//
// P8/12 applies layer 1 (pairs 1 apart) under V1 = v[3:0], layer 2 (pairs 2
// apart) under V2 = v[7:4] and layer 3 (pairs 4 apart) under V3 = v[11:8];
// every input bit can reach every output bit. P^-1 8/12 is the mirror image:
// layers in reverse order, V_j driving the (4-j)-th layer, so for the same v
// the two boxes undo each other, as the cipher's definition of inverse CP
// boxes requires. The butterfly wiring is this design's reading of the box.
// Purely combinational.
module cp_box_8_12 #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0]  x,
  input  logic [11:0] v,
  output logic [7:0]  y
);
  logic [7:0] s1, s2;

  if (!INVERSE) begin : g_fwd
    cp_layer #(.N(8), .STRIDE(1)) u_l1 (.x(x),  .v(v[3:0]),  .y(s1));
    cp_layer #(.N(8), .STRIDE(2)) u_l2 (.x(s1), .v(v[7:4]),  .y(s2));
    cp_layer #(.N(8), .STRIDE(4)) u_l3 (.x(s2), .v(v[11:8]), .y(y));
  end else begin : g_inv
    cp_layer #(.N(8), .STRIDE(4)) u_l1 (.x(x),  .v(v[11:8]), .y(s1));
    cp_layer #(.N(8), .STRIDE(2)) u_l2 (.x(s1), .v(v[7:4]),  .y(s2));
    cp_layer #(.N(8), .STRIDE(1)) u_l3 (.x(s2), .v(v[3:0]),  .y(y));
  end
endmodule
