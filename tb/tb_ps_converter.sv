// Self-checking testbench of ps_converter: random words loaded every L
// cycles (and occasionally after a longer gap); in the L cycles after each
// load bit_out must present bits 0 .. L-1 of the word, LSB first.
module tb_ps_converter;
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [L-1:0] din = '0;
  logic bit_out;
  int checks = 0, failures = 0;

  ps_converter #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      automatic logic [L-1:0] w = L'($urandom);
      @(negedge clk);
      load = 1; din = w;
      @(negedge clk);
      load = 0; din = L'($urandom);
      for (int j = 0; j < int'(L); j++) begin
        checks++;
        if (bit_out != w[j]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d", n, j);
        end
        if (j < int'(L) - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
