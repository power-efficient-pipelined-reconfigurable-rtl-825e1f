// tb_rfw_add2: ADD2 with zero input: s = (p + a) mod 2^8 when en is 1 and
// s = a when en is 0 (the product word is forced to zero).
module tb_rfw_add2;
  logic en;
  logic [7:0] p, s;
  logic [5:0] a;
  int checks = 0, failures = 0;

  rfw_add2 #(.N(8), .WA(6)) dut (.en(en), .p(p), .a(a), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      en = 1'(k);
      p  = 8'($urandom);
      a  = 6'($urandom);
      #1;
      checks++;
      if (int'(s) != (en ? (int'(p) + int'(a)) % 256 : int'(a))) begin
        failures++;
        $display("FAIL en=%b p=%0d a=%0d s=%0d", en, p, a, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
