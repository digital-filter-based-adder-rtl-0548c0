// Bit-serial shift accumulator in carry-save form.
//
// The inner product is computed one weight bit at a time, least significant
// bit first. With T_j the MUX output in bit cycle j (the sum of the samples
// whose weight has bit j set), the running value A follows
//   A_0 = T_0,   A_j = floor(A_{j-1} / 2) + T_j,   j = 1 .. L-1,
// where the last (weight sign) cycle subtracts T_{L-1} instead of adding it.
// A is kept as two L+2-bit words, a sum word s and a carry word c with
// A = s + 2*c (the carry word is stored unshifted, one place to the left of
// the sum word). Halving the value is then just (s >>> 1) + c, and
// floor(s/2) + c = floor(A/2) exactly, so each bit cycle is a single 3:2
// carry-save addition of (s >>> 1), c and the operand, with no carry
// propagation in the loop. Sign control XORs the operand with the `neg`
// flag (one's complement); the +1 that completes the two's complement is
// left to the carry-propagate adder that later forms y from s and c.
//
// Interface: `first` marks bit cycle 0 (feedback ignored, the accumulation
// starts from zero), `neg` the sign cycle. s and c are registers; after the
// clock edge that ends bit cycle L-1 they hold the finished sample, one's
// complement form: s + 2c + 1 = A_{L-1}. Asynchronous active-low reset.
module csa_accumulator
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
  localparam int unsigned W = L + 2;

  logic [W-1:0] fb_s, fb_c, op, s_nx, c_nx;

  always_comb begin
    fb_s = first ? '0 : {s[W-1], s[W-1:1]};   // s >>> 1
    fb_c = first ? '0 : c;
    op   = din ^ {W{neg}};                     // sign control
  end

  csa_adder #(.W(W)) u_csa (.a(fb_s), .b(fb_c), .c(op), .s(s_nx), .cy(c_nx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
      c <= '0;
    end else begin
      s <= s_nx;
      c <= c_nx;
    end
  end
endmodule
