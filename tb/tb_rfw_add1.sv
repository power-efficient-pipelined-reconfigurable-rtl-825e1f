// tb_rfw_add1: exhaustive 6-bit ADD1: the output is (a + b) / 2, i.e. the
// carry-out and the sum bits above the dropped least significant bit.
module tb_rfw_add1;
  logic [5:0] a, b, s;
  int checks = 0, failures = 0;

  rfw_add1 #(.W(6)) dut (.a(a), .b(b), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a = 6'(i); b = 6'(j);
        #1;
        checks++;
        if (int'(s) != (i + j) / 2) begin
          failures++;
          $display("FAIL a=%0d b=%0d s=%0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
