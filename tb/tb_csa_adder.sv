// Self-checking testbench of csa_adder: random signed 10-bit triples; checks
// the bitwise sum word and the signed identity a + b + c = s + 2*cy.
module tb_csa_adder;
  localparam int unsigned W = 10;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_adder #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int lhs, rhs;
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (n == 0) begin a = '1; b = '1; c = '1; end
      #1;
      lhs = int'($signed(a)) + int'($signed(b)) + int'($signed(c));
      rhs = int'($signed(s)) + 2 * int'($signed(cy));
      checks++;
      if (lhs != rhs || s != (a ^ b ^ c)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d s=%0d cy=%0d", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
