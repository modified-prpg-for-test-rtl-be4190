// tb_misr: random inputs with random enable and clear against the reference
// MISR step; checks the signature every cycle.
module tb_misr;
  import bast_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clear = 1'b0, en = 1'b0;
  logic [15:0] d = '0, sig, exp_sig;
  int checks = 0, failures = 0;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_sig = '0;
    for (int i = 0; i < 5000; i++) begin
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 199) == 0);
      d     = 16'($urandom);
      @(posedge clk);
      if (clear)   exp_sig = '0;
      else if (en) exp_sig = ref_misr(exp_sig, d);
      #1;
      checks++;
      if (sig !== exp_sig) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d sig=%h exp=%h", i, sig, exp_sig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
