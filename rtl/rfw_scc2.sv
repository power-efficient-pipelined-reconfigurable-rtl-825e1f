// rfw_scc2: subcalibration circuit 2. Adds the rounding constant into MUL2
// only in CM2, where MUL2 is an independent fixed-width multiplier:
// scc2 = t2 & K_m2. In CM1 it is 0, because SCC1 then adds the constant
// once for the whole n x n product. Truth table as given for the design.
// Combinational.
module rfw_scc2 (
  input  logic km2,   // NOR of MUL2's weight n-2 terms
  input  logic t2,    // 1 in CM2
  output logic scc2
);
  always_comb scc2 = t2 & km2;
endmodule
