// Sign-magnitude separator.
//
// Splits the L-bit two's-complement scaled error mu*e into its sign and an
// (L-1)-bit magnitude: sign = v[L-1], mag = |v|. The most negative value,
// whose magnitude needs L bits, is given the largest (L-1)-bit magnitude
// (this design's choice). Combinational; the sign chooses add or subtract
// in the weight update and the magnitude feeds the control word generator.
module sign_mag_separator
  import da_pkg::*;
#(
  parameter int unsigned L = L_DEF
) (
  input  logic signed [L-1:0] v,
  output logic                sign,
  output logic [L-2:0]        mag
);
  logic [L-1:0] neg_v;

  always_comb begin
    sign  = v[L-1];
    neg_v = -v;
    if (!sign)                 mag = v[L-2:0];
    else if (neg_v[L-1])       mag = '1;            // |most negative|
    else                       mag = neg_v[L-2:0];
  end
endmodule
