// tb_rfw_decoder: the OP decoder truth table (00 -> t=1000, 01 -> 0100,
// 10 -> 0010, 11 -> 0001) and the gated-register enables, for random
// operands with each operand half zero a quarter of the time.
module tb_rfw_decoder;
  import rfw_pkg::*;
  localparam int N = 8;
  cm_e op;
  logic [N-1:0] x, y;
  ctl_t t;
  gate_t g;
  int checks = 0, failures = 0;
  localparam logic [3:0] T_TABLE [4] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001};

  rfw_decoder #(.N(N)) dut (.op(op), .x(x), .y(y), .t(t), .g(g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic e1, e2, e3;
      op = cm_e'(k % 4);
      x = N'($urandom); y = N'($urandom);
      if ($urandom_range(3) == 0) x[7:4] = '0;
      if ($urandom_range(3) == 0) x[3:0] = '0;
      if ($urandom_range(3) == 0) y[7:4] = '0;
      if ($urandom_range(3) == 0) y[3:0] = '0;
      #1;
      case (k % 4)
        0: begin
          e1 = (x[7:4] != 0) && (y[3:0] != 0);
          e2 = (x[3:0] != 0) && (y[7:4] != 0);
          e3 = (x[7:4] != 0) && (y[7:4] != 0);
        end
        1: begin e1 = 1; e2 = 1; e3 = 0; end
        default: begin e1 = 0; e2 = 0; e3 = 1; end
      endcase
      checks++;
      if (4'(t) !== T_TABLE[k % 4] || g.m1 !== e1 || g.m2 !== e2 || g.m3 !== e3) begin
        failures++;
        $display("FAIL op=%0d x=%h y=%h t=%b g=%b", k % 4, x, y, t, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
