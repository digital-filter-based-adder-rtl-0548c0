// End-to-end testbench of da_lms_filter at its default parameters (carry-save
// accumulator, L = 8). Body and reference model in tb_lms_body.svh.
module tb_da_lms_filter;
`include "tb_lms_body.svh"
  da_lms_filter dut (
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
