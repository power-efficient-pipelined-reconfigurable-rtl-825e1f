// tb_rfw_scc1: SCC1 against its truth table (all K_m1, K_m2, mode inputs).
// CM1 column: 0 0 0 1; CM2 column: 0 0 1 1 (rows K_m1 K_m2 = 00 01 10 11).
module tb_rfw_scc1;
  logic km1, km2, t2, scc1;
  int checks = 0, failures = 0;
  localparam logic [3:0] CM1_COL = 4'b1000;  // bit index = {km1, km2}
  localparam logic [3:0] CM2_COL = 4'b1100;

  rfw_scc1 dut (.km1(km1), .km2(km2), .t2(t2), .scc1(scc1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {t2, km1, km2} = 3'(v);
      #1;
      checks++;
      if (scc1 !== (t2 ? CM2_COL[{km1, km2}] : CM1_COL[{km1, km2}])) begin
        failures++;
        $display("FAIL t2=%b km1=%b km2=%b scc1=%b", t2, km1, km2, scc1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
