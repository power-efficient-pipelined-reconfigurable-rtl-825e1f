// rfw_add2: ADD2 of the third stage with its zero-input gate. Adds the
// ADD1 result (weight n upward) to the stage-2 product word and keeps the
// n bits of weight n..2n-1, which is the CM1 product P[2n-1:n]. When en is 0
// (modes CM2..CM4) the product word is forced to zero by AND gates, so with
// ADD1's inputs held by their gated register the adder sees no transitions.
// Combinational.
module rfw_add2 #(
  parameter int unsigned N  = 8,
  parameter int unsigned WA = 6    // width of the ADD1 result, n/2 + 2
) (
  input  logic          en,    // t3: CM1
  input  logic [N-1:0]  p,     // stage-2 product word
  input  logic [WA-1:0] a,     // ADD1 result
  output logic [N-1:0]  s
);
  always_comb s = (p & {N{en}}) + N'(a);
endmodule
