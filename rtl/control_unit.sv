// Control unit: bit-cycle sequencer of the bit-serial filter.
//
// A modulo-L counter on the fast bit clock. One sample period is L clock
// cycles, one per weight bit. `first` is high in bit cycle 0 (the
// accumulator starts a new inner product, the output registers take the
// previous one), `last` in bit cycle L-1 (the weights' sign bit is
// subtracted; a new input sample is taken, the weights are updated and the
// scaled error registered). Asynchronous active-low reset to bit cycle 0.
// Assertions state the strobe rules the rest of the filter relies on.
module control_unit
  import da_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned CW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          first,
  output logic          last,
  output logic [CW-1:0] bit_idx
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     bit_idx <= '0;
    else if (bit_idx == CW'(L - 1)) bit_idx <= '0;
    else                            bit_idx <= bit_idx + 1'b1;
  end

  assign first = (bit_idx == '0);
  assign last  = (bit_idx == CW'(L - 1));

  // A sample period is L cycles: the sign cycle is always followed by the
  // start of the next sample, and the two strobes never coincide.
  a_last_then_first: assert property (@(posedge clk) disable iff (!rst_n) last |=> first);
  a_strobes_apart:   assert property (@(posedge clk) disable iff (!rst_n) !(first && last));
endmodule
