// Self-checking testbench of csa_accumulator (body in tb_acc_body.svh).
module tb_csa_accumulator;
`include "tb_acc_body.svh"
  csa_accumulator #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .first(first), .neg(neg), .din(din), .s(s), .c(c));
endmodule
