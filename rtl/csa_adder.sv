// W-bit 3:2 carry-save adder.
//
// Adds three W-bit words without propagating carries: each bit position is a
// full adder, giving a sum word s and a carry word cy whose bits have twice
// the weight of the same bit of s, so that a + b + c = s + 2*cy. The identity
// holds exactly when all five words are read as signed W-bit numbers, which
// is what lets the carry-save accumulator keep a signed running value in two
// words with no sign-extension bit. Combinational; delay of one full adder,
// independent of W.
module csa_adder #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]), .b (b[i]), .ci(c[i]),
      .s (s[i]), .co(cy[i])
    );
  end
endmodule
