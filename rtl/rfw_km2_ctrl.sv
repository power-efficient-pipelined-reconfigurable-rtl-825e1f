// rfw_km2_ctrl: the control unit (CU) and latch (L) on the K_m2 wire from
// MUL2 to MUL1.
//   CU: while MUL2's input register is gated its K_m2 output is stale, so
//       CU presents K_m2 = 1, the value MUL2 has when one of its operand
//       halves is zero (the only CM1 case in which it is gated).
//   L:  a level-sensitive latch, transparent while MUL1's input register is
//       enabled; while MUL1 is gated it holds, so MUL1's inputs stay still.
// km2_cu (CU output) also feeds the substitute value of a gated MUL1.
// The latch is intended: it is the design's L block (a latch warning for
// km2_l is expected). The function is the design's; the circuits are the
// simplest that do it. Combinational apart from the latch.
module rfw_km2_ctrl (
  input  logic km2,      // K_m2 from MUL2
  input  logic g_m2,     // MUL2 enabled in this stage-2 cycle
  input  logic g_m1,     // MUL1 enabled in this stage-2 cycle
  output logic km2_cu,   // CU output
  output logic km2_l     // latched value seen by MUL1
);
  always_comb km2_cu = g_m2 ? km2 : 1'b1;

  always_latch begin
    if (g_m1) km2_l = km2_cu;
  end
endmodule
