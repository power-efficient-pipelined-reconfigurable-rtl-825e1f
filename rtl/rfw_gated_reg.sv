// rfw_gated_reg: gated pipeline register. When en is 0 the register keeps
// its value, so the logic it feeds sees no transitions. The design gates the
// register's clock; here the gating is written as a clock enable, which a
// synthesis flow maps onto an integrated clock-gating cell. Asynchronous
// active-low reset to zero (a choice of this design). One cycle latency.
module rfw_gated_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
