// tb_x_mask: random chain outputs and masks; a masked chain must read 0 and an
// unmasked chain must pass its value.
module tb_x_mask;
  logic [15:0] scan_out, mask, masked;
  int checks = 0, failures = 0;

  x_mask dut (.scan_out, .mask, .masked);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      scan_out = 16'($urandom);
      mask     = 16'($urandom);
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (masked[b] !== (mask[b] ? 1'b0 : scan_out[b])) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d out=%b mask=%b got=%b", b,
                                      scan_out[b], mask[b], masked[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
