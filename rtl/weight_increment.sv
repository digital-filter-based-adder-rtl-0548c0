// Weight-increment block of the DA LMS filter.
//
// Holds the four L-bit two's-complement weights w_0..w_3 and, once per
// sample (on `sample`), applies the sign-LMS-style update with a power-of-two
// step:
//   w_i <- sat( w_i + (xd_i >>> t) )   if sgn = 0
//   w_i <- sat( w_i - (xd_i >>> t) )   if sgn = 1
// where xd_i = x(n-2-i) are the inputs the scaled error belongs to, t is the
// shift from the control word generator and sgn the sign of mu*e. t = all
// ones means a zero error: the weights are kept. Four barrel shifters form
// the increments and four ripple-carry adder/subtractors apply them
// (subtraction as ~b + 1); the results saturate at the L-bit limits, this
// design's choice.
//
// The updated weights are also loaded into four parallel-to-serial shift
// registers, which present one bit slice per clock, least significant bit
// first: addr[i] = bit j of w_i in bit cycle j of the next sample period.
// This slice is the select word A of the inner product's 16:1 MUX.
//
// Timing: `sample` is the last bit cycle of a period; the weights and the
// serialisers change at the edge that ends it. w shows the weights used by
// the current period. Asynchronous active-low reset to zero weights.
module weight_increment
  import da_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned TW = $clog2(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample,
  input  logic signed [L-1:0] xd   [N_TAPS],
  input  logic [TW-1:0]       t,
  input  logic                sgn,
  output logic [N_TAPS-1:0]   addr,
  output logic signed [L-1:0] w    [N_TAPS]
);
  localparam logic signed [L-1:0] MAXV = {1'b0, {(L-1){1'b1}}};
  localparam logic signed [L-1:0] MINV = {1'b1, {(L-1){1'b0}}};

  logic                no_update;
  logic signed [L-1:0] w_next [N_TAPS];

  assign no_update = (t == '1);

  // The control word is either a valid shift (0 .. L-2) or the no-update code.
  a_t_valid: assert property (@(posedge clk) disable iff (!rst_n)
                              sample |-> (no_update || int'(t) <= int'(L) - 2));

  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    logic signed [L-1:0] inc;
    logic        [L:0]   sum;
    logic                unused_cout;

    barrel_shifter #(.L(L), .TW(TW)) u_bs (.x(xd[i]), .sh(t), .y(inc));

    rca_adder #(.W(L+1)) u_addsub (
      .a  ({w[i][L-1], w[i]}),
      .b  ({inc[L-1], inc} ^ {(L+1){sgn}}),
      .cin(sgn),
      .sum(sum),
      .cout(unused_cout)
    );

    always_comb begin
      if (no_update)               w_next[i] = w[i];
      else if (sum[L] != sum[L-1]) w_next[i] = sum[L] ? MINV : MAXV;
      else                         w_next[i] = sum[L-1:0];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      w[i] <= '0;
      else if (sample) w[i] <= w_next[i];
    end

    ps_converter #(.L(L)) u_ps (
      .clk(clk), .rst_n(rst_n), .load(sample), .din(w_next[i]), .bit_out(addr[i])
    );
  end
endmodule
