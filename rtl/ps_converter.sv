// Parallel-to-bit-serial converter for one weight.
//
// An L-bit shift register: on `load` it takes the parallel word; on every
// other clock it shifts right by one, so `bit_out` presents bits 0, 1, ..,
// L-1 of the word in the L cycles after a load, least significant first.
// Asynchronous active-low reset to zero.
module ps_converter
  import da_pkg::*;
#(
  parameter int unsigned L = L_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [L-1:0] din,
  output logic         bit_out
);
  logic [L-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= din;
    else           sr <= {1'b0, sr[L-1:1]};
  end

  assign bit_out = sr[0];
endmodule
