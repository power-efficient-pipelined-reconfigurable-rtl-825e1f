// tb_rfw_mul_sizes: end-to-end test of rfw_mul_top at the other evaluated
// word lengths, n = 16, 24 and 32, side by side: random back-to-back
// operations in all four modes, results checked at the 4-edge latency and
// every mechanism counted for each size.
module tb_rfw_mul_sizes;
  import rfw_pkg::*;
  localparam int NV = 50000;

  logic c16, r16, d16, c24, r24, d24, c32, r32, d32;
  cm_e o16, o24, o32;
  logic [15:0] x16, y16, p16;
  logic [23:0] x24, y24, p24;
  logic [31:0] x32, y32, p32;
  int k16, f16, k24, f24, k32, f32;

  rfw_mul_top #(.N(16)) dut16 (.clk(c16), .rst_n(r16), .op(o16), .x(x16), .y(y16), .p(p16));
  rfw_mul_top #(.N(24)) dut24 (.clk(c24), .rst_n(r24), .op(o24), .x(x24), .y(y24), .p(p24));
  rfw_mul_top #(.N(32)) dut32 (.clk(c32), .rst_n(r32), .op(o32), .x(x32), .y(y32), .p(p32));

  tb_rfw_mul_chk #(.N(16), .NVEC(NV)) chk16 (
    .clk(c16), .rst_n(r16), .op(o16), .x(x16), .y(y16), .p(p16),
    .g_s1(dut16.g_s1), .t_s1(dut16.t_s1), .g_s2(dut16.g_s2), .scc1(dut16.u_mul1.scc1),
    .t3_s2(dut16.t_s2.t3), .sub1_v(dut16.xy_s2 | dut16.km2_cu),
    .done(d16), .checks(k16), .failures(f16));
  tb_rfw_mul_chk #(.N(24), .NVEC(NV)) chk24 (
    .clk(c24), .rst_n(r24), .op(o24), .x(x24), .y(y24), .p(p24),
    .g_s1(dut24.g_s1), .t_s1(dut24.t_s1), .g_s2(dut24.g_s2), .scc1(dut24.u_mul1.scc1),
    .t3_s2(dut24.t_s2.t3), .sub1_v(dut24.xy_s2 | dut24.km2_cu),
    .done(d24), .checks(k24), .failures(f24));
  tb_rfw_mul_chk #(.N(32), .NVEC(NV)) chk32 (
    .clk(c32), .rst_n(r32), .op(o32), .x(x32), .y(y32), .p(p32),
    .g_s1(dut32.g_s1), .t_s1(dut32.t_s1), .g_s2(dut32.g_s2), .scc1(dut32.u_mul1.scc1),
    .t3_s2(dut32.t_s2.t3), .sub1_v(dut32.xy_s2 | dut32.km2_cu),
    .done(d32), .checks(k32), .failures(f32));

  initial begin
    repeat (NV * 2) @(posedge c16);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", k16 + k24 + k32, f16 + f24 + f32 + 1);
    $finish;
  end

  initial begin
    wait (d16 && d24 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", k16 + k24 + k32, f16 + f24 + f32);
    $finish;
  end
endmodule
