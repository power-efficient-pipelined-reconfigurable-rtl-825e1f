// tb_rfw_mul_chk: stimulus and checker for rfw_mul_top, shared by the
// end-to-end testbenches. It makes clock and reset, applies one operation
// per cycle (random mode, random operands with each operand half forced to
// zero a quarter of the time, runs of one mode and mode changes), and
// compares p, cycle by cycle, with the reference result of the operation
// captured three clock edges earlier (four register bands):
//   CM1  n-bit fixed-width product with the adaptive compensation
//   CM2  {fixed-width X[n/2-1:0]*Y[n-1:n/2], fixed-width X[n-1:n/2]*Y[n/2-1:0]}
//   CM3  exact X[n-1:n/2]*Y[n-1:n/2]
//   CM4  {exact X[n-1:3n/4]*Y[n-1:3n/4], exact X[3n/4-1:n/2]*Y[3n/4-1:n/2]}
// It also counts how often each mechanism of the design happened (each
// mode, mode changes, each gated block in CM1, the CU override, the latch
// holding, SCC1 adding the rounding constant, the zero input of ADD2, a
// gated MUL1 substituted with the x*y|K_m2 bit set) and counts a failure
// for any that never happened. done rises when all vectors are checked.
module tb_rfw_mul_chk
  import rfw_pkg::*;
  import rfw_ref_pkg::*;
#(
  parameter int N    = 8,
  parameter int NVEC = 1000,
  parameter bit PHASED = 0     // 1: NVEC/4 uniform random vectors per mode,
                               //    CM1 to CM4 in turn, no mechanism census
) (
  output logic         clk,
  output logic         rst_n,
  output cm_e          op,
  output logic [N-1:0] x,
  output logic [N-1:0] y,
  input  logic [N-1:0] p,
  input  gate_t        g_s1,     // enables computed in stage 1
  input  ctl_t         t_s1,
  input  gate_t        g_s2,     // enables seen by stage 2
  input  logic         scc1,     // SCC1 output inside MUL1
  input  logic         t3_s2,    // ADD1 register enable
  input  logic         sub1_v,   // x*y | K_m2 used for a gated MUL1
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam int M = N / 2;
  localparam int Q = N / 4;

  typedef enum int {
    EV_CM1, EV_CM2, EV_CM3, EV_CM4, EV_SWITCH, EV_GATE1, EV_GATE2, EV_GATE3,
    EV_CU, EV_LATCH_HOLD, EV_SCC1, EV_ZERO_IN, EV_SUB1_V, EV_COUNT
  } ev_e;
  int ev [EV_COUNT];

  logic [N-1:0] exp_q [$];
  // CM1 error of the fixed-width result against the exact product, in
  // output LSBs (2^n): exact value queued per operation, NaN-free sentinel
  // 1e30 for the other modes
  real          true_q [$];
  real          err_sum, err_max;
  int           err_cnt;
  // per mode: cycles in which the MUL1, MUL2, MUL3 input registers loaded
  int loads [4][3];
  int ops   [4];

  function automatic longint unsigned field(longint unsigned v, int lo, int w);
    return (v >> lo) & ((64'd1 << w) - 1);
  endfunction

  function automatic logic [N-1:0] ref_out(cm_e o, logic [N-1:0] a, logic [N-1:0] b);
    longint unsigned A, B;
    longint unsigned hi, lo;
    A = longint'(a);
    B = longint'(b);
    case (o)
      CM1: return N'(fw(A, B, N, cm1_comp(A, B, N)));
      CM2: begin
        hi = fw(field(A, 0, M), field(B, M, M), M, 1);
        lo = fw(field(A, M, M), field(B, 0, M), M, 1);
        return N'((hi << M) | lo);
      end
      CM3: return N'(exact(field(A, M, M), field(B, M, M), M));
      default: begin
        hi = exact(field(A, M + Q, Q), field(B, M + Q, Q), Q);
        lo = exact(field(A, M, Q), field(B, M, Q), Q);
        return N'((hi << M) | lo);
      end
    endcase
  endfunction

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // mechanism counters, sampled on each rising edge
  always @(posedge clk) if (rst_n) begin
    automatic int md = t_s1.t3 ? 0 : t_s1.t2 ? 1 : t_s1.t1 ? 2 : 3;
    ops[md]++;
    if (g_s1.m1) loads[md][0]++;
    if (g_s1.m2) loads[md][1]++;
    if (g_s1.m3) loads[md][2]++;
    if (t_s1.t3) begin
      if (!g_s1.m1) ev[EV_GATE1]++;
      if (!g_s1.m2) ev[EV_GATE2]++;
      if (!g_s1.m3) ev[EV_GATE3]++;
    end
    if (t3_s2 && !g_s2.m2 && g_s2.m1) ev[EV_CU]++;
    if (!g_s2.m1) ev[EV_LATCH_HOLD]++;
    if (t3_s2 && g_s2.m1 && scc1) ev[EV_SCC1]++;
    if (!t3_s2) ev[EV_ZERO_IN]++;
    if (t3_s2 && !g_s2.m1 && sub1_v) ev[EV_SUB1_V]++;
  end

  initial begin
    cm_e prev;
    int  run;
    done = 0; checks = 0; failures = 0;
    foreach (ev[i]) ev[i] = 0;
    err_sum = 0.0; err_max = 0.0; err_cnt = 0;
    foreach (ops[i]) ops[i] = 0;
    foreach (loads[i, j]) loads[i][j] = 0;
    rst_n = 0; op = CM1; x = '0; y = '0;
    prev = CM1; run = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NVEC + 3; c++) begin
      // drive operation c (captured at the next rising edge)
      if (c < NVEC) begin
        if (PHASED) begin
          op = cm_e'(c / (NVEC / 4));
        end else if (run == 0) begin
          op  = cm_e'($urandom_range(3));
          run = ($urandom_range(3) == 0) ? int'($urandom_range(6)) : 0;
        end else run--;
        for (int i = 0; i < N; i += 32) begin
          x[i +: 32 > N ? N : 32] = (32 > N ? N : 32)'($urandom);
          y[i +: 32 > N ? N : 32] = (32 > N ? N : 32)'($urandom);
        end
        if (PHASED) begin
          // uniform operands only
        end else if ($urandom_range(3) == 0) x[N-1:M] = '0;
        if (!PHASED && $urandom_range(3) == 0) x[M-1:0] = '0;
        if (!PHASED && $urandom_range(3) == 0) y[N-1:M] = '0;
        if (!PHASED && $urandom_range(3) == 0) y[M-1:0] = '0;
        if (!PHASED && $urandom_range(7) == 0) begin   // x_{M-1} = y_{M-1} = 1
          x[M-1] = 1'b1; y[M-1] = 1'b1;
        end
        ev[int'(op)]++;
        if (c > 0 && op != prev) ev[EV_SWITCH]++;
        prev = op;
        exp_q.push_back(ref_out(op, x, y));
        if (op == CM1)
          true_q.push_back(real'($signed({{64{x[N-1]}}, x})) * real'($signed({{64{y[N-1]}}, y}))
                           / (2.0 ** N));
        else
          true_q.push_back(1e30);
      end
      @(posedge clk);
      #1;
      // result of operation c-3 is now on p
      if (c >= 3) begin
        logic [N-1:0] e;
        e = exp_q.pop_front();
        begin
          real tv, ev;
          tv = true_q.pop_front();
          if (tv < 1e29) begin
            ev = real'($signed(p)) - tv;
            err_sum += ev;
            if ((ev < 0 ? -ev : ev) > err_max) err_max = (ev < 0 ? -ev : ev);
            err_cnt++;
          end
        end
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d vector %0d p=%h exp=%h", N, c - 3, p, e);
        end
      end
      @(negedge clk);
    end
    if (!PHASED) foreach (ev[i]) begin
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL N=%0d mechanism %s never happened", N, ev_e'(i));
      end
    end
    $display("N=%0d events: CM1=%0d CM2=%0d CM3=%0d CM4=%0d switches=%0d gateMUL1=%0d gateMUL2=%0d gateMUL3=%0d CU=%0d latch_hold=%0d SCC1=%0d zero_in=%0d sub1_v=%0d",
             N, ev[EV_CM1], ev[EV_CM2], ev[EV_CM3], ev[EV_CM4], ev[EV_SWITCH], ev[EV_GATE1],
             ev[EV_GATE2], ev[EV_GATE3], ev[EV_CU], ev[EV_LATCH_HOLD], ev[EV_SCC1],
             ev[EV_ZERO_IN], ev[EV_SUB1_V]);
    if (err_cnt > 0)
      $display("N=%0d CM1 error against the exact product over %0d results: mean %f LSB, max |error| %f LSB",
               N, err_cnt, err_sum / err_cnt, err_max);
    for (int md = 0; md < 4; md++)
      $display("N=%0d CM%0d: %0d stage-1 cycles, input-register loads MUL1=%0d MUL2=%0d MUL3=%0d",
               N, md + 1, ops[md], loads[md][0], loads[md][1], loads[md][2]);
    done = 1;
  end
endmodule
