// Self-checking testbench of rca_adder: exhaustive over all 8-bit operand
// pairs and both carry-ins, comparing {cout, sum} with the integer sum.
module tb_rca_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int k = 0; k < 2; k++) begin
          int exp_v;
          a = W'(i); b = W'(j); cin = k[0];
          #1;
          exp_v = i + j + k;
          checks++;
          if ({cout, sum} != (W+1)'(exp_v)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d got %0d", i, j, k, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
