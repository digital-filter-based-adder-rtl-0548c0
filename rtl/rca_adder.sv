// W-bit ripple-carry adder: {cout, sum} = a + b + cin.
//
// A chain of W full adders; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W while the area is one full adder per bit.
// Combinational, no clock. The ripple-carry structure is the adder style the
// filter uses for every carry-propagate addition; its gate-level form is
// this design's own (the textbook chain).
module rca_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]), .b (b[i]), .ci(carry[i]),
      .s (sum[i]), .co(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
