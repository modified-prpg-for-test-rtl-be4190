// tb_inverter_block: random sequences of set / clear / idle cycles against a
// reference copy of the inverter code; checks the stored code and that the
// scan-chain inputs are the PRPG bits XOR the code, every cycle.
module tb_inverter_block;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] set = '0, prpg = '0;
  logic        clear = 1'b0;
  logic [15:0] inv_code, scan_in;
  logic [15:0] ref_code;
  int checks = 0, failures = 0;

  inverter_block dut (.clk, .rst_n, .set, .clear, .prpg, .inv_code, .scan_in);

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
    ref_code = '0;
    for (int i = 0; i < 3000; i++) begin
      int unsigned r;
      r = $urandom_range(0, 9);
      set   = (r < 6) ? (16'h1 << $urandom_range(0, 15)) : 16'h0;
      clear = (r == 9);
      prpg  = 16'($urandom);
      #1;
      checks++;
      if (scan_in !== (prpg ^ ref_code) || inv_code !== ref_code) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: code=%h ref=%h scan_in=%h", i, inv_code, ref_code, scan_in);
      end
      @(posedge clk);
      ref_code = clear ? 16'h0 : (ref_code | set);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
