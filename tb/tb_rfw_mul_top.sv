// tb_rfw_mul_top: end-to-end test of rfw_mul_top at its default size
// (n = 8): 200000 back-to-back operations in random modes, each result
// checked at the 4-edge latency, and every mechanism counted.
module tb_rfw_mul_top;
  import rfw_pkg::*;
  localparam int N = 8;
  logic clk, rst_n, done;
  cm_e op;
  logic [N-1:0] x, y, p;
  int checks, failures;

  rfw_mul_top dut (.clk(clk), .rst_n(rst_n), .op(op), .x(x), .y(y), .p(p));

  tb_rfw_mul_chk #(.N(N), .NVEC(200000)) chk (
    .clk(clk), .rst_n(rst_n), .op(op), .x(x), .y(y), .p(p),
    .g_s1(dut.g_s1), .t_s1(dut.t_s1), .g_s2(dut.g_s2), .scc1(dut.u_mul1.scc1),
    .t3_s2(dut.t_s2.t3), .sub1_v(dut.xy_s2 | dut.km2_cu),
    .done(done), .checks(checks), .failures(failures));

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
