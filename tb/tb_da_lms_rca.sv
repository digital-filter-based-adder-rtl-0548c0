// End-to-end testbench of da_lms_filter with the ripple-carry accumulator
// (USE_CSA = 0). Same stimulus and reference model as the default build
// (tb_lms_body.svh): both accumulators must give identical outputs.
module tb_da_lms_rca;
`include "tb_lms_body.svh"
  da_lms_filter #(.USE_CSA(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in), .sample_take(sample_take),
    .y_out(y_out), .e_out(e_out), .mu_e(mu_e), .w_out(w_out));

  // watchdog: 20 times the cycles the run needs
  initial begin
    #(20 * L * NS * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
