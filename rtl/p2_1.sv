// p2_1: elementary controlled switch P2/1, the building block of every
// controlled-permutation (CP) box of DDP-64.
//
// With control v = 0 the two bits pass straight (y1 = x1, y2 = x2); with
// v = 1 they are exchanged (y1 = x2, y2 = x1). x[0] is x1. Purely
// combinational. The function is exactly the cipher's; the port packing is
// this design's choice.
module p2_1 (
  input  logic [1:0] x,
  input  logic       v,
  output logic [1:0] y
);
  always_comb begin
    y = v ? {x[0], x[1]} : x;
  end
endmodule
