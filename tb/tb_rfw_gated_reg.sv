// tb_rfw_gated_reg: the register loads d on a rising edge only when en is
// 1, holds otherwise, and clears on reset.
module tb_rfw_gated_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  rfw_gated_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    model = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL k=%0d en=%b q=%h exp=%h", k, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
