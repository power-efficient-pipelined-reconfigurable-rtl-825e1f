// tb_rfw_km2_ctrl: CU passes K_m2 while MUL2 is enabled and gives 1 while it
// is gated; the latch follows the CU output while MUL1 is enabled and holds
// its last value while MUL1 is gated.
module tb_rfw_km2_ctrl;
  logic km2, g_m2, g_m1, km2_cu, km2_l;
  logic held;
  int checks = 0, failures = 0;

  rfw_km2_ctrl dut (.km2(km2), .g_m2(g_m2), .g_m1(g_m1), .km2_cu(km2_cu), .km2_l(km2_l));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g_m1 = 1; g_m2 = 1; km2 = 0;
    #1;
    held = km2_l;
    for (int k = 0; k < 1000; k++) begin
      logic exp_cu;
      km2  = 1'($urandom);
      g_m2 = 1'($urandom);
      g_m1 = ($urandom_range(2) != 0);
      #1;
      exp_cu = g_m2 ? km2 : 1'b1;
      if (g_m1) held = exp_cu;
      checks++;
      if (km2_cu !== exp_cu || km2_l !== held) begin
        failures++;
        $display("FAIL km2=%b g_m2=%b g_m1=%b cu=%b l=%b exp %b %b", km2, g_m2, g_m1,
                 km2_cu, km2_l, exp_cu, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
