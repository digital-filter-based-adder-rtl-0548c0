// Bit-serial shift accumulator with a ripple-carry adder.
//
// Same recurrence as the carry-save accumulator,
//   A_0 = T_0,   A_j = floor(A_{j-1} / 2) +/- T_j,
// with the subtraction in the last (weight sign) bit cycle, but A is held
// in one (L+3)-bit register and every bit cycle is one carry-propagate
// addition by a ripple-carry adder. As in the carry-save version, sign
// control is an XOR of the operand, so the register ends a sample in
// one's-complement form, A_reg + 1 = A_{L-1}; the +1 is left to the adder
// that forms y.
//
// To plug into the same output path as the carry-save accumulator the value
// is presented as a sum/carry pair with A_reg = s + 2c: the carry word is
// c = A_reg >>> 1 (its top bit dropped; the output path works modulo
// 2^(L+2) and the final y fits) and the sum word is the single bit A_reg[0],
// so only s[0] is ever non-zero.
//
// Interface and timing are those of csa_accumulator: `first` starts a sample
// from zero, `neg` marks the sign cycle, outputs are registers valid after
// the edge that ends bit cycle L-1. Asynchronous active-low reset.
module rca_accumulator
  import da_pkg::*;
#(
  parameter int unsigned L = L_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,
  input  logic         neg,
  input  logic [L+1:0] din,
  output logic [L+1:0] s,
  output logic [L+1:0] c
);
  localparam int unsigned W = L + 3;

  logic [W-1:0] acc, fb, op, sum;
  logic         unused_cout;

  always_comb begin
    fb = first ? '0 : {acc[W-1], acc[W-1:1]};      // acc >>> 1
    op = {din[L+1], din} ^ {W{neg}};               // sign-extend, sign control
  end

  rca_adder #(.W(W)) u_rca (.a(fb), .b(op), .cin(1'b0), .sum(sum), .cout(unused_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= sum;
  end

  assign s = {{(L+1){1'b0}}, acc[0]};
  assign c = acc[W-1:1];
endmodule
