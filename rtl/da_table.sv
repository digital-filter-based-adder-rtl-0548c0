// Pipelined DA table of the 4-point inner product.
//
// The filter's weights change every sample, so the table cannot hold
// precomputed weight sums; instead it holds every sum of a subset of the
// four most recent input samples, and the weights address it. Entry a is
//   entry[a] = sum of x(n-i) over every bit i set in a,   entry[0] = 0,
// so the 16:1 MUX driven by bit j of (w3, w2, w1, w0) returns
// sum_i w_i[j] * x(n-i).
//
// Structure (pipelined form): only the four samples are registered, as a
// delay line x(n) .. x(n-3) that shifts once per sample when `shift` is high
// (x_in, the next sample x(n+1), enters at the head). The eleven sums of two
// or more samples are formed combinationally from the delay-line registers
// by eleven ripple-carry adders: six pairs (L+1 bits) from the samples, the
// four triples (L+2 bits) each as a pair plus one sample, and the 4-sum
// (L+2 bits) as the sum of two pairs. This replaces the earlier table form in
// which every one of the fifteen entries is a register of its own.
// Which pair feeds which triple is this design's choice; any choice gives the
// same values. Entry widths follow the sample-pair-triple growth L, L+1,
// L+2; every entry is sign-extended to L+2 bits at the output.
//
// Timing: entries and taps change one clock after a cycle with shift = 1 and
// are stable for the rest of the sample period. Asynchronous active-low
// reset clears the delay line.
module da_table
  import da_pkg::*;
#(
  parameter int unsigned L = L_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [L-1:0] x_in,
  output logic        [L+1:0] entry [N_ENTRIES],
  output logic signed [L-1:0] taps  [N_TAPS]
);
  // Delay line: xr[i] = x(n-i).
  logic signed [L-1:0] xr [N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) xr[i] <= '0;
    end else if (shift) begin
      xr[0] <= x_in;
      for (int i = 1; i < N_TAPS; i++) xr[i] <= xr[i-1];
    end
  end

  assign taps = xr;

  // ---- pairs: p_ij = x(n-i) + x(n-j), L+1 bits --------------------------
  logic signed [L:0] p01, p02, p03, p12, p13, p23;
  logic              unused_pc01, unused_pc02, unused_pc03,
                     unused_pc12, unused_pc13, unused_pc23;

  function automatic logic [L:0] sx1(input logic signed [L-1:0] v);
    return {v[L-1], v};
  endfunction

  rca_adder #(.W(L+1)) u_p01 (.a(sx1(xr[0])), .b(sx1(xr[1])), .cin(1'b0), .sum(p01), .cout(unused_pc01));
  rca_adder #(.W(L+1)) u_p02 (.a(sx1(xr[0])), .b(sx1(xr[2])), .cin(1'b0), .sum(p02), .cout(unused_pc02));
  rca_adder #(.W(L+1)) u_p03 (.a(sx1(xr[0])), .b(sx1(xr[3])), .cin(1'b0), .sum(p03), .cout(unused_pc03));
  rca_adder #(.W(L+1)) u_p12 (.a(sx1(xr[1])), .b(sx1(xr[2])), .cin(1'b0), .sum(p12), .cout(unused_pc12));
  rca_adder #(.W(L+1)) u_p13 (.a(sx1(xr[1])), .b(sx1(xr[3])), .cin(1'b0), .sum(p13), .cout(unused_pc13));
  rca_adder #(.W(L+1)) u_p23 (.a(sx1(xr[2])), .b(sx1(xr[3])), .cin(1'b0), .sum(p23), .cout(unused_pc23));

  // ---- triples and the 4-sum, L+2 bits ----------------------------------
  logic signed [L+1:0] t012, t013, t023, t123, q0123;
  logic                unused_tc012, unused_tc013, unused_tc023,
                       unused_tc123, unused_qc;

  function automatic logic [L+1:0] sxp(input logic signed [L:0] v);
    return {v[L], v};
  endfunction
  function automatic logic [L+1:0] sxs(input logic signed [L-1:0] v);
    return {{2{v[L-1]}}, v};
  endfunction

  rca_adder #(.W(L+2)) u_t012 (.a(sxp(p01)), .b(sxs(xr[2])), .cin(1'b0), .sum(t012), .cout(unused_tc012));
  rca_adder #(.W(L+2)) u_t013 (.a(sxp(p01)), .b(sxs(xr[3])), .cin(1'b0), .sum(t013), .cout(unused_tc013));
  rca_adder #(.W(L+2)) u_t023 (.a(sxp(p02)), .b(sxs(xr[3])), .cin(1'b0), .sum(t023), .cout(unused_tc023));
  rca_adder #(.W(L+2)) u_t123 (.a(sxp(p12)), .b(sxs(xr[3])), .cin(1'b0), .sum(t123), .cout(unused_tc123));
  rca_adder #(.W(L+2)) u_q    (.a(sxp(p01)), .b(sxp(p23)),   .cin(1'b0), .sum(q0123), .cout(unused_qc));

  // ---- table, address bit i selects x(n-i) ------------------------------
  always_comb begin
    entry[4'b0000] = '0;
    entry[4'b0001] = sxs(xr[0]);
    entry[4'b0010] = sxs(xr[1]);
    entry[4'b0011] = sxp(p01);
    entry[4'b0100] = sxs(xr[2]);
    entry[4'b0101] = sxp(p02);
    entry[4'b0110] = sxp(p12);
    entry[4'b0111] = t012;
    entry[4'b1000] = sxs(xr[3]);
    entry[4'b1001] = sxp(p03);
    entry[4'b1010] = sxp(p13);
    entry[4'b1011] = t013;
    entry[4'b1100] = sxp(p23);
    entry[4'b1101] = t023;
    entry[4'b1110] = t123;
    entry[4'b1111] = q0123;
  end
endmodule
