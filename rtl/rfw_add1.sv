// rfw_add1: ADD1 of the third stage. Adds the MUL1 and MUL2 outputs (both
// of weight n-1 upward) and keeps the carry-out and the sum bits from
// weight n upward, dropping the least significant sum bit: for n = 8,
// A[5:0] + B[5:0] = {carry, C[5:0]} and the output is {carry, C[5:1]}.
// This is as the design describes; the carry-propagate structure is left
// to synthesis. Combinational.
module rfw_add1 #(
  parameter int unsigned W = 6   // n/2 + 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s        // weights n .. n+W-1
);
  logic [W:0] full;
  always_comb begin
    full = {1'b0, a} + {1'b0, b};
    s    = full[W:1];
  end
endmodule
