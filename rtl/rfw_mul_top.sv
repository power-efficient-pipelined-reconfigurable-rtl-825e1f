// rfw_mul_top: power-efficient pipelined reconfigurable fixed-width
// Baugh-Wooley multiplier.
//
// One fixed-width n x n array (n+1 kept columns plus the adaptive
// compensation column, the design's w = 1, Q = 0 prototype) is cut into
// three blocks, MUL1, MUL2 and MUL3, that are reconfigured by the decoded OP
// code into four modes:
//   op = CM1 (00): p = n-bit fixed-width product of X*Y (signed)
//   op = CM2 (01): p = {X[n/2-1:0]*Y[n-1:n/2], X[n-1:n/2]*Y[n/2-1:0]}, two
//                  n/2-bit fixed-width signed products (upper half: MUL2,
//                  lower half: MUL1)
//   op = CM3 (10): p = X[n-1:n/2]*Y[n-1:n/2], n-bit full-precision product
//   op = CM4 (11): p = {X[n-1:3n/4]*Y[n-1:3n/4], X[3n/4-1:n/2]*Y[3n/4-1:n/2]},
//                  two n/2-bit full-precision products
//
// Pipeline (four register bands, three stages; one result per clock):
//   band 0  registers op, x, y
//   stage 1 decoder: t[3:0] and the enables g_M1..g_M3 of the gated input
//           registers (band 1); x_{n/2-1} & y_{n/2-1} is registered too
//   stage 2 MUL1, MUL2, MUL3; a gated block's output is replaced by its
//           known value for a zero operand; a mux picks MUL3 or
//           {MUL2, MUL1} by t2 (band 2); MUL1/MUL2 outputs go to ADD1 through
//           a register gated by t3
//   stage 3 ADD1 and ADD2 (zero input unless CM1), final mux by t3 (band 3)
// Latency: a result appears on p after the 4th rising clock edge that
// counts the edge capturing the operands. No valid/ready signals: a new
// operation may enter every cycle and the mode may change every cycle.
//
// Structure, gating rules and substitute constants follow the design; the
// generalisation to any n divisible by 4 (n >= 8), the reset (asynchronous,
// active low, all registers to zero) and the carry cut in MUL3 for CM4 are
// this design's choices.
module rfw_mul_top
  import rfw_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cm_e          op,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p      // P[2n-1:n] in CM1, see above for other modes
);
  localparam int unsigned M  = N / 2;
  localparam int unsigned WA = M + 2;

  if (N % 4 != 0 || N < 8) begin : g_bad_n
    $error("rfw_mul_top: N must be a multiple of 4 and at least 8");
  end

  // ---------------- band 0 ----------------
  cm_e          op_r0;
  logic [N-1:0] x_r0, y_r0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_r0 <= CM1;
      x_r0  <= '0;
      y_r0  <= '0;
    end else begin
      op_r0 <= op;
      x_r0  <= x;
      y_r0  <= y;
    end
  end

  // ---------------- stage 1 ----------------
  ctl_t  t_s1;
  gate_t g_s1;

  rfw_decoder #(.N(N)) u_dec (.op(op_r0), .x(x_r0), .y(y_r0), .t(t_s1), .g(g_s1));

  // band 1: control register, x3&y3 register, three gated input registers
  ctl_t  t_s2;
  gate_t g_s2;
  logic  xy_s2;     // x_{n/2-1} & y_{n/2-1}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_s2  <= '0;
      g_s2  <= '0;
      xy_s2 <= 1'b0;
    end else begin
      t_s2  <= t_s1;
      g_s2  <= g_s1;
      xy_s2 <= x_r0[M-1] & y_r0[M-1];
    end
  end

  logic [M:0]   m1_x;      // X[n-1:n/2-1]
  logic [M-1:0] m1_y;      // Y[n/2-1:0]
  logic [M-1:0] m2_x;      // X[n/2-1:0]
  logic [M-1:0] m2_y;      // Y[n-1:n/2]
  logic [M-1:0] m3_x;      // X[n-1:n/2]
  logic [M-1:0] m3_y;      // Y[n-1:n/2]

  rfw_gated_reg #(.W(2*M+1)) u_greg1 (.clk(clk), .rst_n(rst_n), .en(g_s1.m1),
    .d({x_r0[N-1:M-1], y_r0[M-1:0]}), .q({m1_x, m1_y}));
  rfw_gated_reg #(.W(2*M)) u_greg2 (.clk(clk), .rst_n(rst_n), .en(g_s1.m2),
    .d({x_r0[M-1:0], y_r0[N-1:M]}), .q({m2_x, m2_y}));
  rfw_gated_reg #(.W(2*M)) u_greg3 (.clk(clk), .rst_n(rst_n), .en(g_s1.m3),
    .d({x_r0[N-1:M], y_r0[N-1:M]}), .q({m3_x, m3_y}));

  // ---------------- stage 2 ----------------
  logic [M+1:0] m1_out, m2_out, m1_sel, m2_sel;
  logic [N-1:0] m3_out, m3_sel;
  logic         km1, km2_raw, km2_cu, km2_l;

  rfw_mul2 #(.N(N)) u_mul2 (.x_lo(m2_x), .y_hi(m2_y), .t2(t_s2.t2),
    .m2(m2_out), .km2(km2_raw));

  rfw_km2_ctrl u_km2 (.km2(km2_raw), .g_m2(g_s2.m2), .g_m1(g_s2.m1),
    .km2_cu(km2_cu), .km2_l(km2_l));

  rfw_mul1 #(.N(N)) u_mul1 (.x_hi(m1_x), .y_lo(m1_y), .t2(t_s2.t2),
    .km2(km2_l), .m1(m1_out), .km1(km1));

  rfw_mul3 #(.N(N)) u_mul3 (.x_hi(m3_x), .y_hi(m3_y), .t1(t_s2.t1),
    .t0(t_s2.t0), .m3(m3_out));

  // substitute values of gated blocks (valid for the CM1 zero cases)
  always_comb begin
    m1_sel = g_s2.m1 ? m1_out : (M+2)'(mul1_idle(N, xy_s2 | km2_cu));
    m2_sel = g_s2.m2 ? m2_out : (M+2)'(mul2_idle(N));
    m3_sel = g_s2.m3 ? m3_out : N'(mul3_idle(N));
  end

  logic [N-1:0] word_s2;
  always_comb word_s2 = t_s2.t2 ? {m2_sel[M:1], m1_sel[M:1]} : m3_sel;

  // band 2
  logic [N-1:0]  word_s3;
  logic          t3_s3;
  logic [WA-1:0] a1_m1, a1_m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_s3 <= '0;
      t3_s3   <= 1'b0;
    end else begin
      word_s3 <= word_s2;
      t3_s3   <= t_s2.t3;
    end
  end

  rfw_gated_reg #(.W(2*WA)) u_greg_add (.clk(clk), .rst_n(rst_n), .en(t_s2.t3),
    .d({m1_sel, m2_sel}), .q({a1_m1, a1_m2}));

  // ---------------- stage 3 ----------------
  logic [WA-1:0] add1_s;
  logic [N-1:0]  add2_s;

  rfw_add1 #(.W(WA)) u_add1 (.a(a1_m1), .b(a1_m2), .s(add1_s));
  rfw_add2 #(.N(N), .WA(WA)) u_add2 (.en(t3_s3), .p(word_s3), .a(add1_s), .s(add2_s));

  // band 3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= t3_s3 ? add2_s : word_s3;
  end

endmodule
