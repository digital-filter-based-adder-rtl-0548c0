// Shared body of the end-to-end testbenches of da_lms_filter. The including
// module declares the DUT instance `dut` (ports as below, L = 8) and the
// watchdog.
//
// Stimulus: a system-identification run. Phase 1 (1000 samples): x is
// random and the desired signal is the output of a fixed 4-tap "unknown"
// filter H (in the filter's own weight format, value H/2^L). Phase 2 drives
// a full-scale desired signal unrelated to x so that the weights saturate. Phase 3 holds x = d = 0 so the error is zero and
// the weights must stay put.
//
// Reference: a sample-level model written on integers, independent of the
// bit-serial hardware. With takes numbered m (one per L cycles):
//   y(k)      = DA result of X(k) = [x(k) .. x(k-3)] with the weights of
//               period k+1, computed as the shift-and-add recurrence over
//               the weight bits, and also checked against sum x*w / 2^L;
//   mu_e(k)   = clamp(floor((d(k) - y(k)) / 4));
//   W(m+1)    = clamp(W(m) +/- (X(m-3) >>> t(mu_e(m-3)))).
// In the take-m cycle the testbench compares y_out with y(m-2), e_out with
// d(m-2) - y(m-2), mu_e with mu_e(m-3) and w_out with W(m), and checks that
// takes come exactly L cycles apart. It counts how often each mechanism of
// the design happened (add update, subtract update, skipped update on a zero
// error, weight saturation, a negative weight whose sign bit is subtracted in
// the last bit cycle) and fails if one never did, and it checks
// that the error energy falls during the identification phase.
  localparam int unsigned L  = 8;
  localparam int          NS = 1600;     // takes
  localparam int          OFF = 8;       // index offset: arrays hold k = -8 ..
  logic clk = 0, rst_n = 0;
  logic signed [L-1:0] x_in = '0, d_in = '0;
  logic                sample_take;
  logic signed [L+1:0] y_out;
  logic signed [L+1:0] e_out;
  logic signed [L-1:0] mu_e;
  logic signed [L-1:0] w_out [4];

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0, n_wsat = 0, n_negw = 0;
  int w1000 [4];

  always #5 clk = ~clk;

  int xs [NS+OFF], ds [NS+OFF], ys [NS+OFF], mus [NS+OFF];
  int wp [NS+OFF+1][4];
  int H [4] = '{40, -24, 12, 90};

  function automatic int fdiv(input int v, input int k);   // floor(v / k)
    return (v >= 0) ? v / k : -((-v + k - 1) / k);
  endfunction

  function automatic int da_y(input int k, input int p);   // y(k) with W(p)
    int acc = 0;
    for (int j = 0; j < int'(L); j++) begin
      int tj = 0;
      for (int i = 0; i < 4; i++)
        if (((wp[p+OFF][i] >> j) & 1) != 0) tj += xs[k-i+OFF];
      if (j == 0)                acc = tj;
      else if (j == int'(L) - 1) acc = fdiv(acc, 2) - tj;
      else                       acc = fdiv(acc, 2) + tj;
    end
    return fdiv(acc, 2);
  endfunction

  task automatic cmp(input string what, input int m, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL take %0d: %s got %0d exp %0d", m, what, got, exp_v);
    end
  endtask

  int last_take = -1, cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  longint err_early = 0, err_late = 0;

  initial begin
    for (int k = 0; k < NS + OFF; k++) begin
      xs[k] = 0; ds[k] = 0; ys[k] = 0; mus[k] = 0;
    end
    for (int k = 0; k < NS + OFF + 1; k++) for (int i = 0; i < 4; i++) wp[k][i] = 0;
    // stimulus
    for (int k = 0; k < NS; k++) begin
      automatic int xv = int'($signed(L'($urandom)));
      automatic int dv = 0;
      if (k < 1000) begin
        xs[k+OFF] = xv;
        for (int i = 0; i < 4; i++) dv += H[i] * ((k - i >= 0) ? xs[k-i+OFF] : 0);
        dv = fdiv(dv, 1 << L);
      end else if (k < 1300) begin
        xs[k+OFF] = (k % 2 == 0) ? 127 : 100;
        dv = (k < 1150) ? 127 : -128;
      end else begin
        xs[k+OFF] = 0;
        dv = 0;
      end
      ds[k+OFF] = dv;
    end

    #12 rst_n = 1;
    for (int m = 0; m < NS; m++) begin
      // wait for the take cycle
      do @(negedge clk); while (!sample_take);
      if (last_take >= 0) cmp("take spacing", m, cyc - last_take, int'(L));
      else                cmp("first take", m, cyc, int'(L) - 1);
      last_take = cyc;
      // model: outputs visible in this cycle
      ys[m-2+OFF] = (m >= 2) ? da_y(m - 2, m - 1) : 0;
      if (m >= 2) begin
        automatic int ex = 0, ev, mv;
        for (int i = 0; i < 4; i++) ex += wp[m-1+OFF][i] * xs[m-2-i+OFF];
        checks++;
        if (ys[m-2+OFF] * (1 << L) > ex || ys[m-2+OFF] * (1 << L) <= ex - 2 * (1 << L)) begin
          failures++;
          $display("FAIL take %0d: y %0d far from exact %0d/2^L", m, ys[m-2+OFF], ex);
        end
        ev = ds[m-2+OFF] - ys[m-2+OFF];
        mv = fdiv(ev, 4);
        checks++;
        if (mv > 127 || mv < -128) begin
          failures++;
          $display("FAIL take %0d: scaled error %0d outside L bits", m, mv);
        end
        mus[m-2+OFF] = mv;
        if (m - 2 < 200)                  err_early += longint'(ev * ev);
        if (m - 2 >= 800 && m - 2 < 1000) err_late  += longint'(ev * ev);
      end
      cmp("y_out", m, int'(y_out), ys[m-2+OFF]);
      cmp("e_out", m, int'(e_out), ds[m-2+OFF] - ys[m-2+OFF]);
      cmp("mu_e", m, int'(mu_e), mus[m-3+OFF]);
      for (int i = 0; i < 4; i++) cmp("w_out", m, int'(w_out[i]), wp[m+OFF][i]);
      // model: weight update at this take
      begin
        automatic int mv = mus[m-3+OFF];
        automatic int mag = (mv < 0) ? -mv : mv;
        if (mag > 127) mag = 127;
        if (mag == 0) begin
          n_skip++;
          for (int i = 0; i < 4; i++) wp[m+1+OFF][i] = wp[m+OFF][i];
        end else begin
          automatic int p = -1;
          automatic int t;
          for (int v = mag; v > 0; v = v / 2) p++;
          t = int'(L) - 2 - p;
          if (mv < 0) n_sub++; else n_add++;
          for (int i = 0; i < 4; i++) begin
            automatic int inc = fdiv(xs[m-3-i+OFF], 1 << t);
            automatic int nw  = (mv < 0) ? wp[m+OFF][i] - inc : wp[m+OFF][i] + inc;
            if (nw > 127 || nw < -128) n_wsat++;
            if (nw > 127) nw = 127;
            if (nw < -128) nw = -128;
            wp[m+1+OFF][i] = nw;
          end
        end
      end
      if (m == 1000) for (int i = 0; i < 4; i++) w1000[i] = wp[m+OFF][i];
      for (int i = 0; i < 4; i++) if (wp[m+OFF][i] < 0) n_negw++;
      // drive the next sample for this take
      x_in = L'(xs[m+OFF]);
      d_in = L'(ds[m+OFF]);
    end
    $display("updates: add=%0d sub=%0d skipped=%0d  weight saturations=%0d  negative-weight periods=%0d",
             n_add, n_sub, n_skip, n_wsat, n_negw);
    $display("error energy: first 200 samples %0d, samples 800-999 %0d", err_early, err_late);
    $display("weights at take 1000: %0d %0d %0d %0d (unknown filter %0d %0d %0d %0d)",
             w1000[0], w1000[1], w1000[2], w1000[3], H[0], H[1], H[2], H[3]);
    checks += 6;
    if (n_add == 0)   failures++;
    if (n_sub == 0)   failures++;
    if (n_skip == 0)  failures++;
    if (n_negw == 0)  failures++;
    if (n_wsat == 0)  failures++;
    if (!(err_late * 4 < err_early)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
