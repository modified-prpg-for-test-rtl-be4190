// tb_bast_decoder: exhaustive check of the BAST code decoder: every 6-bit code
// with code_valid high and low, compared with the code table (invert mode 10
// sets the addressed inverter flip-flop; reset mode 00 shifts, with
// {M, L0} = 00 normal, 10 load '0', 11 load '1', 01 normal; 01/11 do nothing).
module tb_bast_decoder;
  import bast_pkg::*;

  logic        code_valid;
  logic [5:0]  code;
  logic [15:0] inv_set;
  logic        shift, m, l0;
  int checks = 0, failures = 0;

  bast_decoder dut (
    .code_valid, .mode(bast_mode_e'(code[5:4])), .addr(code[3:0]),
    .inv_set, .shift, .m, .l0
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int c = 0; c < 64; c++) begin
        logic [15:0] e_set;
        logic        e_shift, e_m, e_l0;
        code_valid = v[0];
        code = 6'(c);
        #1;
        e_set = 16'h0; e_shift = 1'b0; e_m = 1'b0; e_l0 = 1'b0;
        if (v == 1) begin
          if (c / 16 == 2) e_set = 16'h1 << (c % 16);
          if (c / 16 == 0) begin
            e_shift = 1'b1;
            if ((c % 4) == 2) begin e_m = 1'b1; e_l0 = 1'b0; end
            if ((c % 4) == 3) begin e_m = 1'b1; e_l0 = 1'b1; end
          end
        end
        checks++;
        if (inv_set !== e_set || shift !== e_shift || m !== e_m || l0 !== e_l0) begin
          failures++;
          $display("FAIL valid=%0d code=%b: set=%h shift=%b m=%b l0=%b", v, code,
                   inv_set, shift, m, l0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
