// Self-checking testbench of inner_product_4pt, both accumulator variants.
//
// The testbench plays the control unit and the weight serialiser: periods of
// L cycles, `first` in cycle 0, `last` in cycle L-1, a new random sample on
// x_in in every `last` cycle and new random weights every period, presented
// LSB first as 4-bit slices on addr. The result of period p must appear on
// s_out/c_out exactly after the edge that ends cycle 0 of period p+1 (and not
// before). It is compared, as y = floor((s + 2c + 1) / 2), with
//  * the shift-and-add recurrence computed on integers from the sample and
//    weight values (exact match), and
//  * the true inner product sum x*w / 2^L (within 2 LSB of truncation).
module tb_inner_product_4pt;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, first = 0, last = 0;
  logic signed [L-1:0] x_in = '0;
  logic [3:0]   addr = '0;
  logic [L+1:0] s_c, c_c, s_r, c_r;
  logic signed [L-1:0] taps_c [4], taps_r [4];
  int checks = 0, failures = 0;

  inner_product_4pt #(.L(L), .USE_CSA(1'b1)) dut_csa (
    .clk(clk), .rst_n(rst_n), .first(first), .last(last), .x_in(x_in), .addr(addr),
    .s_out(s_c), .c_out(c_c), .taps(taps_c));
  inner_product_4pt #(.L(L), .USE_CSA(1'b0)) dut_rca (
    .clk(clk), .rst_n(rst_n), .first(first), .last(last), .x_in(x_in), .addr(addr),
    .s_out(s_r), .c_out(c_r), .taps(taps_r));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv2(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic int yval(input logic [L+1:0] s, input logic [L+1:0] c);
    return fdiv2(int'($signed(s)) + 2 * int'($signed(c)) + 1);
  endfunction

  int xm [4];          // x(n) .. x(n-3) of the current period
  int w  [4];          // weights of the current period
  int y_prev, y_prev2 = 0, y_cur, exact_x2;   // exact_x2 = 2^(L) * true value

  task automatic cmp(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin xm[i] = 0; w[i] = 0; end
    y_prev = 0;
    #12 rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      automatic int acc = 0, xnew, tj, e;
      for (int i = 0; i < 4; i++) w[i] = int'($signed(L'($urandom)));
      if (p == 5) for (int i = 0; i < 4; i++) w[i] = -128;
      xnew = int'($signed(L'($urandom)));
      if (p >= 3 && p < 8) xnew = -128;
      for (int j = 0; j < int'(L); j++) begin
        @(negedge clk);
        first = (j == 0);
        last  = (j == int'(L) - 1);
        for (int i = 0; i < 4; i++) addr[i] = w[i][j];
        x_in  = L'(xnew);
        // result of the previous period appears after the edge ending cycle 0
        if (j == 0 && p > 0) begin
          cmp("hold before edge (csa)", yval(s_c, c_c), y_prev2);
        end
        if (j == 1) begin
          cmp("y csa", yval(s_c, c_c), y_prev);
          cmp("y rca", yval(s_r, c_r), y_prev);
        end
        tj = 0;
        for (int i = 0; i < 4; i++) if (addr[i]) tj += xm[i];
        if (j == 0)                acc = tj;
        else if (j == int'(L) - 1) acc = fdiv2(acc) - tj;
        else                       acc = fdiv2(acc) + tj;
      end
      y_cur = fdiv2(acc);
      exact_x2 = 0;
      for (int i = 0; i < 4; i++) exact_x2 += xm[i] * w[i];
      e = y_cur * (1 << L) - exact_x2;
      checks++;
      if (e > 0 || e <= -2 * (1 << L)) begin
        failures++;
        if (failures < 20) $display("FAIL truncation y=%0d exact*2^L=%0d", y_cur, exact_x2);
      end
      y_prev2 = y_prev;
      y_prev  = y_cur;
      for (int i = 3; i > 0; i--) xm[i] = xm[i-1];
      xm[0] = xnew;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
