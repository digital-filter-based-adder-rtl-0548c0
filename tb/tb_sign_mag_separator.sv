// Self-checking testbench of sign_mag_separator: all 256 8-bit inputs.
module tb_sign_mag_separator;
  localparam int unsigned L = 8;
  logic signed [L-1:0] v;
  logic                sign;
  logic [L-2:0]        mag;
  int checks = 0, failures = 0;

  sign_mag_separator #(.L(L)) dut (.v(v), .sign(sign), .mag(mag));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      int m;
      v = L'(i);
      #1;
      m = (i < 0) ? -i : i;
      if (m > 127) m = 127;
      checks++;
      if (sign != (i < 0) || int'(mag) != m) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d sign=%0d mag=%0d", i, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
