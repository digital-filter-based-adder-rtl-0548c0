// 16-to-1 multiplexer of the 4-point inner product.
//
// Selects one of the sixteen DA-table entries. The select lines are the
// current bit slice d = [d3 d2 d1 d0] of the four weights (bit j of w3..w0 in
// bit cycle j), so q = sum over i of d_i * x(n-i). Input 0 is the constant
// zero entry. Combinational.
module da_mux16
  import da_pkg::*;
#(
  parameter int unsigned W = L_DEF + 2
) (
  input  logic [W-1:0] entry [N_ENTRIES],
  input  logic [3:0]   sel,
  output logic [W-1:0] q
);
  always_comb q = entry[sel];
endmodule
