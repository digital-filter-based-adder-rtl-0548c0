// Self-checking testbench of error_calc.
//
// Each "sample period" is shortened to two clocks here: a cycle with
// sample = 1 followed by one with sample = 0. Random sum/carry word pairs
// whose value y lies in the range a 4-point inner product can reach
// (|y| <= 2^(L-2)), including both extremes, and random desired samples are
// applied; the testbench checks
//   y    = floor((s + 2c + 1) / 2)
//   e    = d(m-2) - y, d(m-2) being the d_in taken two strobes earlier
//   mu_e = floor(e / 4), registered on the strobe and held in between.
module tb_error_calc;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [L+1:0] s = '0, c = '0;
  logic signed [L-1:0] d_in = '0;
  logic signed [L+1:0] y;
  logic signed [L+1:0] e;
  logic signed [L-1:0] mu_e;
  int checks = 0, failures = 0;

  error_calc #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .sample(sample), .s(s), .c(c),
                           .d_in(d_in), .y(y), .e(e), .mu_e(mu_e));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv(input int v, input int k);   // floor(v / k)
    return (v >= 0) ? v / k : -((-v + k - 1) / k);
  endfunction

  task automatic cmp(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  int dq [2];
  int mu_exp;

  initial begin
    dq[0] = 0; dq[1] = 0; mu_exp = 0;
    #12 rst_n = 1;
    for (int m = 0; m < 5000; m++) begin
      int sv, cv, yv, ev, dv;
      // pick y, then a redundant (s, c) pair with s + 2c + 1 = 2y or 2y+1
      yv = int'($urandom % 513) - 256;
      if (m % 7 == 3) yv = 256;
      if (m % 7 == 5) yv = -256;
      cv = fdiv(2 * yv, 2) - int'($urandom % 201) + 100;
      sv = 2 * yv + int'($urandom % 2) - 1 - 2 * cv;
      dv = int'($signed(L'($urandom)));
      if (m % 7 == 3) dv = -128;
      if (m % 7 == 5) dv = 127;
      @(negedge clk);
      cmp("mu_e reg", int'(mu_e), mu_exp);
      s = (L+2)'(sv); c = (L+2)'(cv); d_in = L'(dv); sample = 1;
      #1;
      ev = dq[1] - yv;
      cmp("y", int'(y), yv);
      cmp("e", int'(e), ev);
      mu_exp = fdiv(ev, 4);
      @(posedge clk); #1;
      sample = 0;
      dq[1] = dq[0]; dq[0] = dv;
      @(negedge clk);
      cmp("mu_e hold", int'(mu_e), mu_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
