// Control word generator: power-of-two step for the weight update.
//
// The weight increment mu*e*x is approximated by shifting x: |mu*e| is
// rounded down to 2^p, p being the position of the leading one of its
// (L-1)-bit magnitude, and the barrel shifters then shift x right by
//   t = L-2-p       (0 .. L-2),
// so a full-scale error gives the largest step x >>> 0 and the smallest
// non-zero magnitude the smallest step x >>> (L-2). A zero magnitude gives
// t = all ones, which the weight-increment block treats as "no update"
// (all ones is never a valid shift because 2^TW - 1 >= L-1). The encoding is
// this design's own; the width of t is $clog2(L), 3 bits for L = 8.
// Combinational.
module control_word_gen
  import da_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic [L-2:0]  mag,
  output logic [TW-1:0] t
);
  always_comb begin
    t = '1;
    for (int p = 0; p <= int'(L) - 2; p++) begin
      if (mag[p]) t = TW'(int'(L) - 2 - p);
    end
  end
endmodule
