// One-bit full adder: sum = a ^ b ^ ci, co = majority(a, b, ci).
// Purely combinational. It is the cell from which the ripple-carry adder
// (a chain of these) and the carry-save adder (a row of these) are built.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
