// Self-checking testbench of weight_increment.
//
// Periods of L clocks with `sample` in the last cycle. Every period the
// testbench applies random delayed inputs xd, a random shift t (including
// the "no update" code 7) and a random sign, and checks
//  * during the period, addr[i] = bit j of w_i in cycle j (LSB first), and
//    w equals the model weights;
//  * after the strobe, w_i = clamp(w_i +/- (xd_i >>> t)) or unchanged for
//    t = 7, computed on integers.
// Counts additions, subtractions, skipped updates and saturations; each must
// occur at least once.
module tb_weight_increment;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, sample = 0;
  logic signed [L-1:0] xd [4];
  logic [2:0] t = '1;
  logic sgn = 0;
  logic [3:0] addr;
  logic signed [L-1:0] w [4];
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0, n_sat = 0;

  weight_increment #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .sample(sample), .xd(xd),
                                 .t(t), .sgn(sgn), .addr(addr), .w(w));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fshr(input int v, input int k);   // floor(v / 2^k)
    return (v >= 0) ? (v >> k) : -(((-v) + (1 << k) - 1) >> k);
  endfunction

  int wm [4];

  initial begin
    for (int i = 0; i < 4; i++) begin wm[i] = 0; xd[i] = '0; end
    #12 rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      int xv [4];
      int tv;
      bit sv;
      for (int i = 0; i < 4; i++) xv[i] = int'($signed(L'($urandom)));
      tv = $urandom % 8;
      sv = 1'($urandom);
      if (p % 50 < 10) begin tv = 0; sv = 0; for (int i = 0; i < 4; i++) xv[i] = 127; end
      if (p % 50 >= 25 && p % 50 < 35) begin tv = 0; sv = 1; for (int i = 0; i < 4; i++) xv[i] = 127; end
      for (int j = 0; j < int'(L); j++) begin
        @(negedge clk);
        sample = (j == int'(L) - 1);
        for (int i = 0; i < 4; i++) xd[i] = L'(xv[i]);
        t = 3'(tv); sgn = sv;
        if (p > 0) begin
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (addr[i] != wm[i][j]) begin
              failures++;
              if (failures < 20) $display("FAIL p=%0d j=%0d addr[%0d]", p, j, i);
            end
          end
        end
        if (j == 0) for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(w[i]) != wm[i]) begin
            failures++;
            if (failures < 20) $display("FAIL p=%0d w[%0d]=%0d exp %0d", p, i, w[i], wm[i]);
          end
        end
      end
      // model update at the strobe
      if (tv == 7) n_skip++;
      else begin
        if (sv) n_sub++; else n_add++;
        for (int i = 0; i < 4; i++) begin
          automatic int inc = fshr(xv[i], tv);
          automatic int nw  = sv ? wm[i] - inc : wm[i] + inc;
          if (nw > 127)  begin nw = 127;  n_sat++; end
          if (nw < -128) begin nw = -128; n_sat++; end
          wm[i] = nw;
        end
      end
    end
    checks += 4;
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_sat == 0) failures++;
    $display("adds=%0d subs=%0d skips=%0d saturations=%0d", n_add, n_sub, n_skip, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
