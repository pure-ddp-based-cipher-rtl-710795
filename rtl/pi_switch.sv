// pi_switch: the switchable fixed permutation Pi^(e') of the left branch.
//
// For e' = 0 every byte is permuted by Pi(0) = (1,4,7,2,5,8,3,6), i.e. bit i
// of a byte moves to position (i+3) mod 8; for e' = 1 the inverse Pi(1) moves
// it to (i+5) mod 8. Both permutations act inside bytes, so they commute with
// the rotation by 16 that follows them in the round, which decryption relies
// on. The permutations are the cipher's; building the switch as a 2:1
// selection of the two wirings is this design's choice. Combinational.
module pi_switch (
  input  logic [31:0] x,
  input  logic        esw,
  output logic [31:0] y
);
  logic [31:0] p0, p1;   // Pi(0)(x) and Pi(1)(x)

  for (genvar bt = 0; bt < 4; bt++) begin : g_byte
    for (genvar i = 0; i < 8; i++) begin : g_bit
      assign p0[8*bt + (i + 3) % 8] = x[8*bt + i];
      assign p1[8*bt + (i + 5) % 8] = x[8*bt + i];
    end
  end

  assign y = esw ? p1 : p0;
endmodule
