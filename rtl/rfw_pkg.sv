// rfw_pkg: types and constants shared by the reconfigurable fixed-width
// Baugh-Wooley multiplier.
//
// The multiplier has four configuration modes, selected by a 2-bit OP code:
//   CM1  one  n x n     fixed-width product   (n-bit result)
//   CM2  two  n/2 x n/2 fixed-width products  (two n/2-bit results)
//   CM3  one  n/2 x n/2 full-precision product (n-bit result)
//   CM4  two  n/4 x n/4 full-precision products (two n/2-bit results)
// The OP encoding (00..11 for CM1..CM4) and the one-hot control word t[3:0]
// follow the decoder truth table of the design. The idle-value functions
// give what MUL1/MUL2/MUL3 would output when one of their operands is zero;
// the pipeline substitutes them while a block's input register is gated.
package rfw_pkg;

  typedef enum logic [1:0] {
    CM1 = 2'b00,  // n x n fixed width
    CM2 = 2'b01,  // two n/2 x n/2 fixed width
    CM3 = 2'b10,  // n/2 x n/2 full precision
    CM4 = 2'b11   // two n/4 x n/4 full precision
  } cm_e;

  // Decoded control word. t3: CM1 (ADD1/ADD2 path used), t2: CM2
  // (CP0..CP2 of MUL1/MUL2), t1: CM3 (CP3 of MUL3), t0: CM4 (CP4 of MUL3).
  typedef struct packed {
    logic t3;
    logic t2;
    logic t1;
    logic t0;
  } ctl_t;

  // Clock enables of the three gated input registers (1 = register loads).
  typedef struct packed {
    logic m3;
    logic m2;
    logic m1;
  } gate_t;

  // MUL1 output (weights n-1 .. n+n/2) when X[n-1:n/2] or Y[n/2-1:0] is zero:
  // the complemented terms of the x_{n-1} column and the constant 2^n give
  // 2^(n/2) + 1, plus one more when x_{n/2-1}y_{n/2-1} or K_m2 is set.
  function automatic int unsigned mul1_idle(int unsigned n, logic v);
    return (32'd1 << (n / 2)) + 32'd1 + 32'(v);
  endfunction

  // MUL2 output (weights n-1 .. n+n/2) when X[n/2-1:0] or Y[n-1:n/2] is zero:
  // only the n/2 complemented terms of row y_{n-1} are left.
  function automatic int unsigned mul2_idle(int unsigned n);
    return (32'd1 << (n / 2)) - 32'd1;
  endfunction

  // MUL3 output (weights n .. 2n-1) when X[n-1:n/2] or Y[n-1:n/2] is zero in
  // CM1: 2^n - 2^(n/2), i.e. n/2 ones over n/2 zeros.
  function automatic longint unsigned mul3_idle(int unsigned n);
    return (64'd1 << n) - (64'd1 << (n / 2));
  endfunction

endpackage
