// Four-tap adaptive FIR filter using distributed arithmetic (DA) and a
// delayed LMS update, with a pipelined DA table and a carry-save
// (or ripple-carry) shift accumulator; no multipliers.
//
// Data flow per sample period (L clock cycles of the bit clock):
//  * inner_product_4pt forms y = sum_i w_i x(n-i) bit-serially: the weights
//    are read one bit slice per cycle, LSB first, and each slice selects a
//    precomputed sum of input samples from the DA table;
//  * error_calc forms y, e = d - y and mu*e = e/4 (saturated to L bits);
//  * sign_mag_separator and control_word_gen turn mu*e into a sign and a
//    power-of-two shift t;
//  * weight_increment adds or subtracts x(n-2-i) >>> t to w_i, which is the
//    delayed LMS update w(n+1) = w(n) + mu e(n-2) x(n-2) with the product
//    replaced by a shift, and serialises the new weights for the next period.
//  The two sample registers here extend the table's delay line from x(n-3)
//  to x(n-4), x(n-5).
//
// Number formats: x, d and the weights are L-bit two's complement integers.
// The output is y = floor(sum_i x_i * w_i / 2^L), i.e. the weights act as
// fractions w / 2^L in [-1/2, 1/2).
//
// Interface: x_in and d_in (the same sample index) are taken at the clock
// edge where sample_take is high, once every L cycles, starting L-1 cycles
// after reset. With takes numbered m = 0, 1, ..., during the take-m cycle
// y_out shows the output for sample m-2, e_out its error and mu_e the
// scaled error of sample m-3; the weights w_out are those in use, which
// already include the update from sample m-4. USE_CSA selects the
// accumulator: 1 carry-save (default), 0 ripple-carry. Asynchronous
// active-low reset clears all state (zero weights, zero samples).
module da_lms_filter
  import da_pkg::*;
#(
  parameter int unsigned L       = L_DEF,
  parameter bit          USE_CSA = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [L-1:0] x_in,
  input  logic signed [L-1:0] d_in,
  output logic                sample_take,
  output logic signed [L+1:0] y_out,
  output logic signed [L+1:0] e_out,
  output logic signed [L-1:0] mu_e,
  output logic signed [L-1:0] w_out [N_TAPS]
);
  localparam int unsigned TW = $clog2(L);

  logic                first, last;
  logic [TW-1:0]       bit_idx;
  logic [N_TAPS-1:0]   addr;
  logic [L+1:0]        s_w, c_w;
  logic signed [L-1:0] taps [N_TAPS];
  logic signed [L-1:0] x_d4, x_d5;
  logic signed [L-1:0] xd   [N_TAPS];
  logic                sgn;
  logic [L-2:0]        mag;
  logic [TW-1:0]       t;
  logic                unused_bits;

  control_unit #(.L(L), .CW(TW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .first(first), .last(last), .bit_idx(bit_idx)
  );
  assign unused_bits = ^bit_idx;
  assign sample_take = last;

  inner_product_4pt #(.L(L), .USE_CSA(USE_CSA)) u_ip (
    .clk(clk), .rst_n(rst_n), .first(first), .last(last),
    .x_in(x_in), .addr(addr), .s_out(s_w), .c_out(c_w), .taps(taps)
  );

  // x(n-4), x(n-5)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d4 <= '0;
      x_d5 <= '0;
    end else if (last) begin
      x_d4 <= taps[3];
      x_d5 <= x_d4;
    end
  end

  assign xd[0] = taps[2];
  assign xd[1] = taps[3];
  assign xd[2] = x_d4;
  assign xd[3] = x_d5;

  error_calc #(.L(L)) u_err (
    .clk(clk), .rst_n(rst_n), .sample(last), .s(s_w), .c(c_w), .d_in(d_in),
    .y(y_out), .e(e_out), .mu_e(mu_e)
  );

  sign_mag_separator #(.L(L)) u_sm (.v(mu_e), .sign(sgn), .mag(mag));

  control_word_gen #(.L(L), .TW(TW)) u_cwg (.mag(mag), .t(t));

  weight_increment #(.L(L), .TW(TW)) u_wi (
    .clk(clk), .rst_n(rst_n), .sample(last), .xd(xd), .t(t), .sgn(sgn),
    .addr(addr), .w(w_out)
  );
endmodule
