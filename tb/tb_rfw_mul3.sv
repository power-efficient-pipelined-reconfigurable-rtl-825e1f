// tb_rfw_mul3: exhaustive test of MUL3 for n = 8 (X[7:4], Y[7:4]) in its
// three configurations. CM1: bits 15..8 of the MUL3 share of the Baugh-
// Wooley sum (rows 4..7, columns 4..7, constant 2^15). CM3: the exact signed
// product X[7:4]*Y[7:4]. CM4: the exact signed products X[7:6]*Y[7:6] (high
// nibble) and X[5:4]*Y[5:4] (low nibble).
module tb_rfw_mul3;
  import rfw_ref_pkg::*;
  localparam int N = 8;
  logic [3:0] x_hi, y_hi;
  logic t1, t0;
  logic [7:0] m3;
  int checks = 0, failures = 0;

  rfw_mul3 #(.N(N)) dut (.x_hi(x_hi), .y_hi(y_hi), .t1(t1), .t0(t0), .m3(m3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 16; xv++)
      for (int yv = 0; yv < 16; yv++) begin
        longint unsigned X, Y;
        logic [7:0] exp_v;
        big_t s;
        x_hi = 4'(xv); y_hi = 4'(yv);
        X = longint'({x_hi, 4'b0000});
        Y = longint'({y_hi, 4'b0000});
        // CM1
        t1 = 0; t0 = 0; #1;
        s = bw_region(X, Y, 8, 4, 7, 4, 7, 8) + (big_t'(1) << 15);
        exp_v = 8'(s >> 8);
        checks++;
        if (m3 !== exp_v) begin
          failures++;
          $display("FAIL CM1 x=%h y=%h m3=%h exp=%h", x_hi, y_hi, m3, exp_v);
        end
        // CM3
        t1 = 1; t0 = 0; #1;
        exp_v = 8'(exact(longint'(x_hi), longint'(y_hi), 4));
        checks++;
        if (m3 !== exp_v) begin
          failures++;
          $display("FAIL CM3 x=%h y=%h m3=%h exp=%h", x_hi, y_hi, m3, exp_v);
        end
        // CM4
        t1 = 0; t0 = 1; #1;
        exp_v = {4'(exact(longint'(x_hi[3:2]), longint'(y_hi[3:2]), 2)),
                 4'(exact(longint'(x_hi[1:0]), longint'(y_hi[1:0]), 2))};
        checks++;
        if (m3 !== exp_v) begin
          failures++;
          $display("FAIL CM4 x=%h y=%h m3=%h exp=%h", x_hi, y_hi, m3, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
