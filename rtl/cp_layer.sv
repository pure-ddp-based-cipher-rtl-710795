// cp_layer: one active layer L_n of a layered controlled-permutation box.
//
// N/2 P2/1 switches act in parallel. Switch s pairs bit p and bit p+STRIDE,
// where p is the s-th index (counting upward) whose STRIDE bit is clear; the
// lower bit is the switch's x1. Control bit v[s] drives switch s. A layer is
// its own inverse. Stacking layers with STRIDE = 1, 2, 4 gives the butterfly
// topology used here for the P8/12 boxes; the cipher only states that layers
// are separated by fixed wirings, so this choice of wiring is this design's.
// Purely combinational.
module cp_layer #(
  parameter int unsigned N      = 8,
  parameter int unsigned STRIDE = 1
) (
  input  logic [N-1:0]   x,
  input  logic [N/2-1:0] v,
  output logic [N-1:0]   y
);
  for (genvar s = 0; s < N/2; s++) begin : g_sw
    // lower index of the pair handled by switch s
    localparam int unsigned P = (s / STRIDE) * 2 * STRIDE + (s % STRIDE);
    p2_1 u_sw (
      .x ({x[P + STRIDE], x[P]}),
      .v (v[s]),
      .y ({y[P + STRIDE], y[P]})
    );
  end
endmodule
