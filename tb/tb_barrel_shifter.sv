// Self-checking testbench of barrel_shifter: every 8-bit input and every
// 3-bit shift, compared with floor(x / 2^sh).
module tb_barrel_shifter;
  localparam int unsigned L = 8;
  logic signed [L-1:0] x, y;
  logic [2:0] sh;
  int checks = 0, failures = 0;

  barrel_shifter #(.L(L)) dut (.x(x), .sh(sh), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++)
      for (int k = 0; k < 8; k++) begin
        int exp_v;
        x = L'(v); sh = 3'(k);
        #1;
        exp_v = (v >= 0) ? v / (1 << k) : -((-v + (1 << k) - 1) / (1 << k));
        checks++;
        if (int'(y) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d >>> %0d = %0d exp %0d", v, k, y, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
