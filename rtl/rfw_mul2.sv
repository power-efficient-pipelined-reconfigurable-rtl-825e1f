// rfw_mul2: MUL2, the lower-right block of the fixed-width Baugh-Wooley
// partial-product array (rows y_{n/2}..y_{n-1}, columns x_0..x_{n/2-1}).
//
// What it sums (weights are i+j for term x_i*y_j):
//   * every term of weight >= n-1; the row y_{n-1} is complemented (NAND),
//     the column x_{n/2-1} is XORed with t2, so in CM2 that column flips
//     polarity and x_{n/2-1}y_{n-1} becomes plain: the block then holds the
//     Baugh-Wooley array of X0*Y1 with X0 = X[n/2-1:0], Y1 = Y[n-1:n/2];
//   * CP1 = t2 at weight n and CP2 = t2 at weight 3n/2-1 (the two
//     Baugh-Wooley constants of the n/2 x n/2 product);
//   * at weight n-1: the OR of its weight n-2 terms and the SCC2 bit.
//     K_m2, the NOR of those terms, goes to MUL1.
// Output m2[k] has weight n-1+k (for n = 8: M2[12:7]). In CM2, m2[n/2:1] is
// the n/2-bit fixed-width product X0*Y1.
//
// Term polarities, CP1/CP2 and SCC2 follow the design's array diagrams for
// n = 8, generalised to any n divisible by 4. Each row y_j is a carry-save
// row of adders; constants and compensation enter as one more carry-save
// row before the carry-propagate row. Purely combinational.
module rfw_mul2 #(
  parameter int unsigned N = 8
) (
  input  logic [N/2-1:0] x_lo,  // X[N/2-1:0]
  input  logic [N/2-1:0] y_hi,  // Y[N-1:N/2]
  input  logic           t2,    // CM2 select (CP1 = CP2 = t2)
  output logic [N/2+1:0] m2,    // weights N-1 .. N+N/2
  output logic           km2    // NOR of this block's weight N-2 terms
);
  localparam int unsigned M = N / 2;

  logic [2*N:0] row, cs_s, cs_c, acc;
  logic         or_c;
  logic         scc2;

  rfw_scc2 u_scc2 (.km2(km2), .t2(t2), .scc2(scc2));

  // One carry-save row of adders: adds row r to the sum/carry pair (s, c)
  // bit by bit; each bit is a full adder whose sum stays at its weight and
  // whose carry moves one weight up (a half adder where an input is 0).
  function automatic logic [2*(2*N+1)-1:0] csa(logic [2*N:0] s, logic [2*N:0] c,
                                               logic [2*N:0] r);
    return {s ^ c ^ r, ((s & c) | (s & r) | (c & r)) << 1};
  endfunction

  // Weight N-2 terms: not summed, only ORed for the compensation.
  always_comb begin
    or_c = 1'b0;
    for (int unsigned j = M; j <= N - 2; j++)
      or_c = or_c | (x_lo[N-2-j] & y_hi[j-M]);
    km2 = ~or_c;
  end

  always_comb begin
    cs_s = '0;
    cs_c = '0;
    // y_hi[j-M] = Y[j], x_lo[i] = X[i]
    for (int unsigned j = M; j < N; j++) begin
      row = '0;
      for (int unsigned i = 0; i < M; i++) begin
        logic b;
        b = x_lo[i] & y_hi[j-M];
        if (i + j >= N - 1) begin
          if (j == N - 1 && i != M - 1) b = ~b;             // NAND
          else if (j == N - 1)          b = ~b ^ t2;        // x_{M-1}y_{n-1}
          else if (i == M - 1)          b = b ^ t2;         // column x_{M-1}
          row[i+j] = b;
        end
      end
      {cs_s, cs_c} = csa(cs_s, cs_c, row);
    end
    // constants and compensation (OR and SCC2 are never both 1)
    row = '0;
    row[N]       = t2;                                // CP1
    row[3*M - 1] = t2;                                // CP2
    row[N - 1]   = or_c | scc2;                       // compensation, SCC2
    {cs_s, cs_c} = csa(cs_s, cs_c, row);
    acc = cs_s + cs_c;                                // carry-propagate row
    m2  = acc[N+M:N-1];
  end

endmodule
