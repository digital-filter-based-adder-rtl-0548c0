// Self-checking testbench of control_word_gen: all 7-bit magnitudes.
// Expected t = 6 - floor(log2(mag)), and 7 for a zero magnitude.
module tb_control_word_gen;
  localparam int unsigned L = 8;
  logic [L-2:0] mag;
  logic [2:0]   t;
  int checks = 0, failures = 0;

  control_word_gen #(.L(L)) dut (.mag(mag), .t(t));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 128; m++) begin
      int p, exp_t;
      mag = 7'(m);
      #1;
      p = -1;
      for (int k = m; k > 0; k = k / 2) p++;
      exp_t = (m == 0) ? 7 : 6 - p;
      checks++;
      if (int'(t) != exp_t) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%0d t=%0d exp=%0d", m, t, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
