// rfw_mul3: MUL3, the upper half block of the Baugh-Wooley array
// (rows y_{n/2}..y_{n-1}, columns x_{n/2}..x_{n-1}), i.e. X1*Y1 with
// X1 = X[n-1:n/2], Y1 = Y[n-1:n/2]. All its terms have weight >= n.
//
// Configurations (t1 = CP3, t0 = CP4):
//   CM1 (t1=0,t0=0): its part of the n x n array: terms with exactly one of
//       x_{n-1}, y_{n-1} complemented, constant 1 at weight 2n-1.
//   CM3 (t1=1):      the same array plus CP3 at weight 3n/2 is the full
//       Baugh-Wooley array of the n/2 x n/2 product X1*Y1 (n-bit result).
//   CM4 (t0=1):      two n/4 x n/4 Baugh-Wooley arrays, X[n/2+n/4-1:n/2] *
//       Y[n/2+n/4-1:n/2] in the low half and X[n-1:n-n/4]*Y[n-1:n-n/4] in
//       the high half: cross terms are 0, each quarter complements its own
//       sign row and column, the low product gets constants at weights
//       n+n/4 and n+n/2-1, the high one CP4 at weight 3n/2+n/4 and the 1 at
//       weight 2n-1.
// In CM4 the carry from weight 3n/2-1 into weight 3n/2 is cut, so the low
// product cannot disturb the high one. With the constants of the design's
// CM4 table alone, the low Baugh-Wooley sum carries 1 into the high product
// whenever the low product is >= 0; the cut is this design's own addition.
// Output m3[k] has weight n+k (for n = 8: M3[15:8]). Combinational. Each
// row y_j is a carry-save row of adders, the constants enter as one more
// row, and a carry-propagate row forms the output; in CM4 the carry into
// weight 3n/2 is masked in every row and in the final row.
module rfw_mul3 #(
  parameter int unsigned N = 8
) (
  input  logic [N/2-1:0] x_hi,  // X[N-1:N/2]
  input  logic [N/2-1:0] y_hi,  // Y[N-1:N/2]
  input  logic           t1,    // CM3 (CP3)
  input  logic           t0,    // CM4 (CP4)
  output logic [N-1:0]   m3     // weights N .. 2N-1
);
  localparam int unsigned M = N / 2;
  localparam int unsigned Q = N / 4;

  logic [2*N:0] row, cs_s, cs_c;
  logic [2*N:0] kill;   // carry mask: weight N+M cleared in CM4
  logic [N+M:0] lo;     // final row, weights below N+M (plus carry out)
  logic [2*N:0] hi;     // final row, weights N+M and up
  logic         lo_c;   // carry from the low part into weight N+M

  // One carry-save row of adders, with the carries leaving weight N+M-1
  // removed when kill[N+M] is 0.
  function automatic logic [2*(2*N+1)-1:0] csa(logic [2*N:0] s, logic [2*N:0] c,
                                               logic [2*N:0] r, logic [2*N:0] k);
    return {s ^ c ^ r, (((s & c) | (s & r) | (c & r)) << 1) & k};
  endfunction

  always_comb begin
    kill = '1;
    kill[N+M] = ~t0;
    cs_s = '0;
    cs_c = '0;
    // local indices: a_k = X[M+k], b_j = Y[M+j], weight N+k+j
    for (int unsigned j = 0; j < M; j++) begin
      row = '0;
      for (int unsigned k = 0; k < M; k++) begin
        logic b;
        logic inv;
        b = x_hi[k] & y_hi[j];
        if (t0) begin
          if (k < Q && j < Q)        inv = (k == Q - 1) ^ (j == Q - 1);
          else if (k >= Q && j >= Q) inv = (k == M - 1) ^ (j == M - 1);
          else begin
            inv = 1'b0;
            b   = 1'b0;                      // cross term configured to 0
          end
        end else begin
          inv = (k == M - 1) ^ (j == M - 1);
        end
        row[N+k+j] = b ^ inv;
      end
      {cs_s, cs_c} = csa(cs_s, cs_c, row, kill);
    end
    // constants: Baugh-Wooley 1, CP3, CP4 and the low CM4 product's two
    row = '0;
    row[2*N - 1]     = 1'b1;
    row[N + M]       = t1;                   // CP3
    row[N + M + Q]   = t0;                   // CP4
    row[N + Q]       = t0;
    row[N + 2*Q - 1] = t0;
    {cs_s, cs_c} = csa(cs_s, cs_c, row, kill);
    // carry-propagate row, split at weight N+M so CM4 can cut the carry
    lo = {1'b0, cs_s[N+M-1:0]} + {1'b0, cs_c[N+M-1:0]};
    lo_c = lo[N+M] & ~t0;
    hi = {cs_s[2*N:N+M], (N+M)'(0)} + {cs_c[2*N:N+M], (N+M)'(0)}
       + ((2*N+1)'(lo_c) << (N + M));
    m3 = {hi[2*N-1:N+M], lo[N+M-1:N]};
  end

endmodule
