// rfw_mul1: MUL1, the upper-right block of the fixed-width Baugh-Wooley
// partial-product array (rows y_0..y_{n/2-1}, columns x_{n/2-1}..x_{n-1}).
//
// What it sums (weights are i+j for term x_i*y_j):
//   * every term of weight >= n-1; the terms of the x_{n-1} column are
//     complemented (NAND), the terms of row y_{n/2-1} are XORed with t2, so
//     in CM2 the row y_{n/2-1} flips polarity and x_{n-1}y_{n/2-1} becomes
//     plain: the block then holds the Baugh-Wooley array of X1*Y0 with
//     X1 = X[n-1:n/2], Y0 = Y[n/2-1:0];
//   * the constant 1 at weight n and CP0 = t2 at weight 3n/2-1;
//   * at weight n-1: the OR of its own weight n-2 terms (x_{n/2-1}y_{n/2-1}
//     is forced to 0 in CM2), and the SCC1 bit. K_m1 is the NOR of those
//     terms; SCC1 = K_m1 & K_m2 in CM1 and K_m1 in CM2.
// Output m1[k] has weight n-1+k (for n = 8: M1[12:7]). In CM2, m1[n/2:1] is
// the n/2-bit fixed-width product X1*Y0.
//
// The term polarities, the constants, CP0 and SCC1 follow the design's
// array diagrams for n = 8, generalised to any n divisible by 4. As in the
// design, each row y_j is one carry-save row of half/full adders (sum
// passed to the next row at the same weight, carry one weight up); the
// constants and compensation bits enter as one more carry-save row, and a
// carry-propagate row forms the output. Purely combinational.
module rfw_mul1 #(
  parameter int unsigned N = 8
) (
  input  logic [N/2:0]   x_hi,  // X[N-1:N/2-1]
  input  logic [N/2-1:0] y_lo,  // Y[N/2-1:0]
  input  logic           t2,    // CM2 select (CP0 = t2)
  input  logic           km2,   // K_m2 from MUL2 (through CU and latch)
  output logic [N/2+1:0] m1,    // weights N-1 .. N+N/2
  output logic           km1    // NOR of this block's weight N-2 terms
);
  localparam int unsigned M = N / 2;

  logic [2*N:0] row;    // partial products of one row, by weight
  logic [2*N:0] cs_s;   // carry-save sum vector
  logic [2*N:0] cs_c;   // carry-save carry vector
  logic [2*N:0] acc;
  logic         or_c;   // OR of the weight N-2 terms
  logic         scc1;

  rfw_scc1 u_scc1 (.km1(km1), .km2(km2), .t2(t2), .scc1(scc1));

  // One carry-save row of adders: adds row r to the sum/carry pair (s, c)
  // bit by bit; each bit is a full adder whose sum stays at its weight and
  // whose carry moves one weight up (a half adder where an input is 0).
  function automatic logic [2*(2*N+1)-1:0] csa(logic [2*N:0] s, logic [2*N:0] c,
                                               logic [2*N:0] r);
    return {s ^ c ^ r, ((s & c) | (s & r) | (c & r)) << 1};
  endfunction

  // Weight N-2 terms: not summed, only ORed for the compensation.
  // x_{M-1}y_{M-1} is removed in CM2 (it is not part of X1*Y0).
  always_comb begin
    or_c = 1'b0;
    for (int unsigned j = 0; j < M; j++)
      or_c = or_c | (x_hi[N-2-j-(M-1)] & y_lo[j] & ~(t2 && j == M - 1));
    km1 = ~or_c;
  end

  always_comb begin
    cs_s = '0;
    cs_c = '0;
    // i is the X bit index, j the Y bit index; x_hi[i-(M-1)] = X[i].
    for (int unsigned j = 0; j < M; j++) begin
      row = '0;
      for (int unsigned i = M - 1; i < N; i++) begin
        logic b;
        b = x_hi[i-(M-1)] & y_lo[j];
        if (i + j >= N - 1) begin
          if (i == N - 1 && j != M - 1) b = ~b;             // NAND
          else if (i == N - 1)          b = ~b ^ t2;        // x_{n-1}y_{M-1}
          else if (j == M - 1)          b = b ^ t2;         // row y_{M-1}
          row[i+j] = b;
        end
      end
      {cs_s, cs_c} = csa(cs_s, cs_c, row);
    end
    // constants and compensation: one more carry-save row. At weight N-1
    // OR and SCC1 are never both 1 (SCC1 needs K_m1 = 1).
    row = '0;
    row[N]       = 1'b1;                              // Baugh-Wooley constant
    row[3*M - 1] = t2;                                // CP0
    row[N - 1]   = or_c | scc1;                       // compensation, SCC1
    {cs_s, cs_c} = csa(cs_s, cs_c, row);
    acc = cs_s + cs_c;                                // carry-propagate row
    m1  = acc[N+M:N-1];
  end

endmodule
