// Self-checking testbench of da_table.
// 1) The constant-input case: x = 10 shifted in four times gives 10 for the
//    single samples, 20 for pairs, 30 for triples and 40 for the 4-sum.
// 2) Random signed samples, including the extremes, shifted in with random
//    gaps; after every clock all 16 entries and the four taps are compared
//    with sums taken from an independent model of the delay line.
module tb_da_table;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [L-1:0] x_in = '0;
  logic        [L+1:0] entry [16];
  logic signed [L-1:0] taps [4];
  int model [4];
  int checks = 0, failures = 0;

  da_table #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .x_in(x_in), .entry(entry), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 16; a++) begin
      int e = 0;
      for (int i = 0; i < 4; i++) if (a[i]) e += model[i];
      checks++;
      if (int'($signed(entry[a])) != e) begin
        failures++;
        if (failures < 10) $display("FAIL entry[%0d]=%0d exp %0d", a, $signed(entry[a]), e);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(taps[i]) != model[i]) failures++;
    end
  endtask

  task automatic step(input bit sh, input int v);
    @(negedge clk);
    shift = sh; x_in = L'(v);
    @(posedge clk); #1;
    if (sh) begin
      for (int i = 3; i > 0; i--) model[i] = model[i-1];
      model[0] = v;
    end
    check_all();
  endtask

  initial begin
    for (int i = 0; i < 4; i++) model[i] = 0;
    #12 rst_n = 1;
    check_all();
    for (int k = 0; k < 4; k++) step(1, 10);
    checks++;
    if ($signed(entry[1]) != 10 || $signed(entry[3]) != 20 ||
        $signed(entry[7]) != 30 || $signed(entry[15]) != 40) failures++;
    for (int k = 0; k < 4; k++) step(1, (k % 2 == 1) ? 127 : -128);
    for (int k = 0; k < 4; k++) step(1, -128);
    for (int k = 0; k < 2000; k++) begin
      automatic int v = int'($signed(L'($urandom)));
      step(($urandom % 3) != 0, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
