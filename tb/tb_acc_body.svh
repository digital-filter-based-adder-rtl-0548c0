// Shared body of the two accumulator testbenches. Expects a DUT instance
// `dut` with ports clk, rst_n, first, neg, din, s, c (L = 8) declared by the
// including module. For each random sample it feeds L operands, the last one
// in a sign cycle, and checks after the final edge that
//   s + 2c = A,  A_0 = T_0,  A_j = floor(A_{j-1}/2) + T_j,
//   A_{L-1} = floor(A_{L-2}/2) + ~T_{L-1}     (one's complement sign cycle).
// The accumulator must take exactly L cycles: its value is checked right
// after the edge that ends bit cycle L-1.
  localparam int unsigned L = 8;
  logic clk = 0, rst_n = 0, first = 0, neg = 0;
  logic [L+1:0] din = '0;
  logic [L+1:0] s, c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv2(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int acc = 0, got;
      for (int j = 0; j < int'(L); j++) begin
        int t;
        // table values are sums of up to four L-bit samples: range of L+2 bits
        t = int'($signed((L+2)'($urandom))) ;
        if (n == 1) t = -512;
        if (n == 2) t = (j == L - 1) ? -512 : 508;
        @(negedge clk);
        first = (j == 0);
        neg   = (j == int'(L) - 1);
        din   = (L+2)'(t);
        if (j == 0)                 acc = t;
        else if (j == int'(L) - 1)  acc = fdiv2(acc) - t - 1;
        else                        acc = fdiv2(acc) + t;
      end
      @(posedge clk); #1;
      got = int'($signed(s)) + 2 * int'($signed(c));
      checks++;
      if (got != acc) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: s+2c=%0d exp %0d", n, got, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
