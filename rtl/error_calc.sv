// Error path: filter output, error and scaled error.
//
//   y      = (s >>> 1) + c + s[0]          (L+2 bits)
//   e      = d - y                         (L+2 bits)
//   mu_e   = e >>> 2, the top L bits of e  (step size mu = 1/4)
//
// s and c come from the inner-product output registers in one's-complement
// form (s + 2c + 1 is the accumulated value A). The shift by one and the
// carry-in s[0] give y = floor((s + 2c + 1) / 2) = floor(A / 2) exactly; the
// halving keeps y inside L+2 bits. All three additions use ripple-carry
// adders. The desired signal is delayed by two sample registers so that it
// meets the output computed from the same sample (the inner-product block
// delivers a sample's result one period after it has taken the sample);
// mu_e is registered once more, so the weight update sees mu*e two samples
// late, the delay of the delayed-LMS loop.
//
// Ranges: a finished 4-point inner product of L-bit samples and L-bit
// weights gives |y| <= 2^(L-2) (y = sum x*w / 2^L), and |d| <= 2^(L-1), so
// |e| <= 3*2^(L-2) fits L+2 bits and e >>> 2 fits L bits: no overflow or
// saturation logic is needed on this path.
//
// Interface: `sample` is the strobe of the cycle in which d_in is taken
// (the last bit cycle of a sample period). y and e are combinational from
// the input words and the delayed d; mu_e is a register that loads on
// `sample`. Asynchronous active-low reset.
module error_calc
  import da_pkg::*;
#(
  parameter int unsigned L = L_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample,
  input  logic [L+1:0]        s,
  input  logic [L+1:0]        c,
  input  logic signed [L-1:0] d_in,
  output logic signed [L+1:0] y,
  output logic signed [L+1:0] e,
  output logic signed [L-1:0] mu_e
);
  logic signed [L-1:0] d_q1, d_q2;
  logic                unused_cy, unused_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q1 <= '0;
      d_q2 <= '0;
    end else if (sample) begin
      d_q1 <= d_in;
      d_q2 <= d_q1;
    end
  end

  // y = (s >>> 1) + c + s[0]
  rca_adder #(.W(L+2)) u_yadd (
    .a({s[L+1], s[L+1:1]}), .b(c), .cin(s[0]), .sum(y), .cout(unused_cy)
  );

  // e = d - y = d + ~y + 1
  rca_adder #(.W(L+2)) u_esub (
    .a({{2{d_q2[L-1]}}, d_q2}), .b(~y), .cin(1'b1),
    .sum(e), .cout(unused_ce)
  );

  // >> 2: the top L bits of e
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mu_e <= '0;
    else if (sample) mu_e <= e[L+1:2];
  end
endmodule
