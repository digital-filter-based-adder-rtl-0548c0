// Four-point inner product block: y = sum_{i=0..3} w_i * x(n-i) by
// distributed arithmetic, without multipliers.
//
// Inside: the pipelined DA table (delay line x(n)..x(n-3) plus the adders
// that form all sums of those samples), the 16:1 MUX whose select lines are
// the current bit slice `addr` of the four weights, a bit-serial shift
// accumulator, and the output registers D on the sum and carry words.
// USE_CSA = 1 selects the carry-save accumulator (the main configuration),
// USE_CSA = 0 the ripple-carry accumulator; both give the same s + 2c.
//
// Timing: a sample period is L clock cycles. `first` marks bit cycle 0,
// `last` bit cycle L-1 (the weights' sign bit, which is subtracted). In
// the cycle with `last` high the table shifts in x_in, so the next period
// works on it as x(n). The accumulator finishes at the edge ending bit cycle
// L-1, and the output registers load it at the edge ending the next bit cycle
// 0: s_out/c_out then hold the previous sample's result, y(n-1), for the rest
// of the period. They are in one's-complement form: the value of the inner
// product, in units of 2^-(L-1) of the weight scale, is s_out + 2*c_out + 1.
module inner_product_4pt
  import da_pkg::*;
#(
  parameter int unsigned L       = L_DEF,
  parameter bit          USE_CSA = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,
  input  logic                last,
  input  logic signed [L-1:0] x_in,
  input  logic [3:0]          addr,
  output logic [L+1:0]        s_out,
  output logic [L+1:0]        c_out,
  output logic signed [L-1:0] taps [N_TAPS]
);
  logic        [L+1:0] entry [N_ENTRIES];
  logic        [L+1:0] t_sel, s_acc, c_acc;

  da_table #(.L(L)) u_table (
    .clk(clk), .rst_n(rst_n), .shift(last), .x_in(x_in),
    .entry(entry), .taps(taps)
  );

  da_mux16 #(.W(L+2)) u_mux (.entry(entry), .sel(addr), .q(t_sel));

  if (USE_CSA) begin : g_csa
    csa_accumulator #(.L(L)) u_acc (
      .clk(clk), .rst_n(rst_n), .first(first), .neg(last),
      .din(t_sel), .s(s_acc), .c(c_acc)
    );
  end else begin : g_rca
    rca_accumulator #(.L(L)) u_acc (
      .clk(clk), .rst_n(rst_n), .first(first), .neg(last),
      .din(t_sel), .s(s_acc), .c(c_acc)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      c_out <= '0;
    end else if (first) begin
      s_out <= s_acc;
      c_out <= c_acc;
    end
  end
endmodule
