// tb_rfw_mul2: exhaustive test of MUL2 for n = 8 (X[3:0], Y[7:4], t2).
// CM1: the output must equal the MUL2 share of the fixed-width sum (terms
// of weight >= 7 in rows 4..7 and columns 0..3, plus the OR of its weight-6
// terms at weight 7), K_m2 the NOR of those terms. CM2: bits [4:1] must be
// the 4 x 4 fixed-width product X[3:0]*Y[7:4].
module tb_rfw_mul2;
  import rfw_ref_pkg::*;
  localparam int N = 8;
  logic [3:0] x_lo, y_hi;
  logic t2, km2;
  logic [5:0] m2;
  int checks = 0, failures = 0;

  rfw_mul2 #(.N(N)) dut (.x_lo(x_lo), .y_hi(y_hi), .t2(t2), .m2(m2), .km2(km2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 16; xv++)
      for (int yv = 0; yv < 16; yv++)
        for (int mode = 0; mode < 2; mode++) begin
          longint unsigned X, Y;
          big_t s;
          bit or2;
          x_lo = 4'(xv); y_hi = 4'(yv); t2 = mode[0];
          #1;
          X = longint'(x_lo);
          Y = longint'({y_hi, 4'b0000});
          or2 = 0;
          for (int j = 4; j <= 6; j++) if (X[6-j] && Y[j]) or2 = 1;
          checks++;
          if (km2 !== !or2) begin
            failures++;
            $display("FAIL km2 x=%h y=%h", x_lo, y_hi);
          end
          if (!t2) begin
            s = bw_region(X, Y, 8, 0, 3, 4, 7, 7) + (big_t'(or2) << 7);
            checks++;
            if (m2 !== 6'(s >> 7)) begin
              failures++;
              $display("FAIL CM1 x=%h y=%h m2=%h exp=%h", x_lo, y_hi, m2, 6'(s >> 7));
            end
          end else begin
            checks++;
            if (m2[4:1] !== 4'(fw(X, Y >> 4, 4, 1))) begin
              failures++;
              $display("FAIL CM2 x=%h y=%h m2=%h exp=%h", x_lo, y_hi, m2[4:1], 4'(fw(X, Y >> 4, 4, 1)));
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
