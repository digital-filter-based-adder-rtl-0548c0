// Self-checking testbench of rca_accumulator (body in tb_acc_body.svh).
// The RCA accumulator's carry word drops the top bit of its register, so
// s + 2c equals A modulo 2^(L+3); the shared check compares exact integers,
// which holds as long as A stays inside L+2 signed bits after the final
// halving, as it does for table values of this range.
module tb_rca_accumulator;
`include "tb_acc_body.svh"
  rca_accumulator #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .first(first), .neg(neg), .din(din), .s(s), .c(c));
endmodule
