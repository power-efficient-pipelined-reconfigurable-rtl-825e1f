// tb_rfw_mul1: exhaustive test of MUL1 for n = 8 (all 5-bit X[7:3], 4-bit
// Y[3:0], t2 and K_m2). CM1: the output must equal the MUL1 share of the
// fixed-width Baugh-Wooley sum (terms of weight >= 7 in rows 0..3 and
// columns 3..7, the constant 2^8, and at weight 7 the OR of the weight-6
// terms plus the SCC1 bit), and K_m1 the NOR of the weight-6 terms.
// CM2: bits [4:1] must equal the 4 x 4 fixed-width product X[7:4]*Y[3:0].
module tb_rfw_mul1;
  import rfw_ref_pkg::*;
  localparam int N = 8;
  logic [4:0] x_hi;
  logic [3:0] y_lo;
  logic t2, km2, km1;
  logic [5:0] m1;
  int checks = 0, failures = 0;

  rfw_mul1 #(.N(N)) dut (.x_hi(x_hi), .y_lo(y_lo), .t2(t2), .km2(km2), .m1(m1), .km1(km1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 32; xv++)
      for (int yv = 0; yv < 16; yv++)
        for (int mode = 0; mode < 4; mode++) begin
          longint unsigned X, Y;
          big_t s;
          bit or1;
          x_hi = 5'(xv); y_lo = 4'(yv); t2 = mode[1]; km2 = mode[0];
          #1;
          X = longint'({x_hi, 3'b000});
          Y = longint'(y_lo);
          or1 = 0;
          for (int j = 0; j < 4; j++) if (X[6-j] && Y[j] && !(t2 && j == 3)) or1 = 1;
          checks++;
          if (km1 !== !or1) begin
            failures++;
            $display("FAIL km1 x=%h y=%h t2=%b", x_hi, y_lo, t2);
          end
          if (!t2) begin
            s = bw_region(X, Y, 8, 3, 7, 0, 3, 7) + (big_t'(1) << 8)
                + (big_t'(1'(or1 | (!or1 && km2))) << 7);
            checks++;
            if (m1 !== 6'(s >> 7)) begin
              failures++;
              $display("FAIL CM1 x=%h y=%h km2=%b m1=%h exp=%h", x_hi, y_lo, km2, m1, 6'(s >> 7));
            end
          end else begin
            checks++;
            if (m1[4:1] !== 4'(fw(X >> 4, Y, 4, 1))) begin
              failures++;
              $display("FAIL CM2 x=%h y=%h m1=%h exp=%h", x_hi, y_lo, m1[4:1], 4'(fw(X >> 4, Y, 4, 1)));
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
