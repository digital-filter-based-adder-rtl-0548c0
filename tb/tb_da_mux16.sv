// Self-checking testbench of da_mux16: random table contents, every select.
module tb_da_mux16;
  localparam int unsigned W = 10;
  logic [W-1:0] entry [16];
  logic [3:0]   sel;
  logic [W-1:0] q;
  logic [W-1:0] ref_tab [16];
  int checks = 0, failures = 0;

  da_mux16 #(.W(W)) dut (.entry(entry), .sel(sel), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 16; i++) begin
        ref_tab[i] = W'($urandom);
        entry[i]   = ref_tab[i];
      end
      for (int k = 0; k < 16; k++) begin
        sel = 4'(k);
        #1;
        checks++;
        if (q !== ref_tab[k]) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d q=%0d exp=%0d", k, q, ref_tab[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
