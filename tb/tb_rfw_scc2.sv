// tb_rfw_scc2: SCC2 against its truth table: 0 in CM1, K_m2 in CM2.
module tb_rfw_scc2;
  logic km2, t2, scc2;
  int checks = 0, failures = 0;
  localparam logic [1:0] CM1_COL = 2'b00;  // bit index = km2
  localparam logic [1:0] CM2_COL = 2'b10;

  rfw_scc2 dut (.km2(km2), .t2(t2), .scc2(scc2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {t2, km2} = 2'(v);
      #1;
      checks++;
      if (scc2 !== (t2 ? CM2_COL[km2] : CM1_COL[km2])) begin
        failures++;
        $display("FAIL t2=%b km2=%b scc2=%b", t2, km2, scc2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
