// Self-checking testbench of control_unit: after reset the counter runs
// 0..L-1 repeatedly; `first` is high exactly in cycle 0 and `last` exactly
// in cycle L-1 of every L-cycle period.
module tb_control_unit;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0;
  logic first, last;
  logic [2:0] bit_idx;
  int checks = 0, failures = 0;

  control_unit #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .first(first), .last(last), .bit_idx(bit_idx));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;  // released mid-cycle, before the edge at 15
    for (int cyc = 0; cyc < 10 * L; cyc++) begin
      if (cyc > 0) @(negedge clk);
      checks++;
      if (int'(bit_idx) != cyc % L || first != (cyc % L == 0) || last != (cyc % L == L - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d idx=%0d first=%0d last=%0d", cyc, bit_idx, first, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
