// rfw_scc1: subcalibration circuit 1. Adds the rounding constant (half an
// output LSB) into MUL1. In CM1 the two compensation halves K_m1 and K_m2
// must add that constant only once, and only when both report that all
// weight n-2 terms are zero: scc1 = K_m1 & K_m2. In CM2 MUL1 is an
// independent multiplier and scc1 = K_m1. This is the truth table of the
// design (a 2:1 mux selected by t2 between the AND and K_m1).
// Combinational.
module rfw_scc1 (
  input  logic km1,   // NOR of MUL1's weight n-2 terms
  input  logic km2,   // NOR of MUL2's weight n-2 terms
  input  logic t2,    // 1 in CM2
  output logic scc1
);
  always_comb scc1 = t2 ? km1 : (km1 & km2);
endmodule
