// Arithmetic right barrel shifter: y = x >>> sh.
//
// Logarithmic structure: stage k shifts by 2^k when bit k of sh is set,
// filling with the sign bit. Combinational. Four of these form the
// products x(n-i) * 2^-t of the weight-increment block.
module barrel_shifter
  import da_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic signed [L-1:0] x,
  input  logic [TW-1:0]       sh,
  output logic signed [L-1:0] y
);
  logic signed [L-1:0] stage [TW+1];

  assign stage[0] = x;
  for (genvar k = 0; k < TW; k++) begin : g_stage
    assign stage[k+1] = sh[k] ? (stage[k] >>> (1 << k)) : stage[k];
  end
  assign y = stage[TW];
endmodule
