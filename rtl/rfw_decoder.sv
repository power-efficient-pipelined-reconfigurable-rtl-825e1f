// rfw_decoder: first pipeline stage. Turns the 2-bit OP code into the
// one-hot control word t[3:0] (OP 00 -> t3 (CM1), 01 -> t2 (CM2),
// 10 -> t1 (CM3), 11 -> t0 (CM4)) and computes the clock enables of the
// three gated input registers of MUL1, MUL2 and MUL3:
//   CM1: each block loads unless one of its operand halves is zero
//        MUL1 off if X[n-1:n/2] == 0 or Y[n/2-1:0] == 0
//        MUL2 off if X[n/2-1:0] == 0 or Y[n-1:n/2] == 0
//        MUL3 off if X[n-1:n/2] == 0 or Y[n-1:n/2] == 0
//   CM2: MUL1 and MUL2 load, MUL3 off
//   CM3, CM4: MUL3 loads, MUL1 and MUL2 off
// The truth table and the gating rules are the design's; placing the zero
// detection in the decoder and the enable polarity (1 = load) are this
// design's choices. Combinational.
module rfw_decoder
  import rfw_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  cm_e          op,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output ctl_t         t,
  output gate_t        g
);
  localparam int unsigned M = N / 2;

  logic xh_nz, xl_nz, yh_nz, yl_nz;

  always_comb begin
    xh_nz = |x[N-1:M];
    xl_nz = |x[M-1:0];
    yh_nz = |y[N-1:M];
    yl_nz = |y[M-1:0];
    t = '{t3: op == CM1, t2: op == CM2, t1: op == CM3, t0: op == CM4};
    unique case (op)
      CM1:     g = '{m3: xh_nz & yh_nz, m2: xl_nz & yh_nz, m1: xh_nz & yl_nz};
      CM2:     g = '{m3: 1'b0, m2: 1'b1, m1: 1'b1};
      default: g = '{m3: 1'b1, m2: 1'b0, m1: 1'b0};
    endcase
  end

endmodule
