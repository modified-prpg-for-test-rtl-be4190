// tb_bast_workloads: runs the BAST logic, at its default parameters, through
// pattern sets shaped like the 13 benchmark circuits of the evaluation: the
// scan-chain length Nlen, the number of test vectors Nvect and the fraction of
// don't-care bits of each circuit. The ATPG patterns themselves are not
// available, so the care bits are synthetic: each care bit is present with
// probability (1 - don't-care ratio); in two thirds of the slices the care bits
// lean 90 % towards one value (0 or 1), in the rest they are random. The
// numbers of invert codes therefore do not reproduce the published ones; they
// show the mechanism on sets of the published sizes.
//
// For every circuit: reset, then the tester loop (invert codes for conflicting
// bits, one reset code per slice choosing normal / load '0' / load '1' for the
// next slice). Checks: each shifted slice satisfies all care bits and equals
// the reference PRPG slice XOR the requested flips; the number of clock cycles
// equals Nvect*Nlen + Ninv. Prints TD = (Nvect*Nlen + Ninv) * 6 next to the
// value for an unmodified PRPG fed the same patterns.
module tb_bast_workloads;
  import bast_ref_pkg::*;

  localparam int NC = 13;
  typedef struct {
    string name;
    int    nlen;
    int    nvect;
    int    dc_permille;
  } circ_t;

  circ_t circ [NC];

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        code_valid = 1'b0;
  logic [5:0]  code = '0;
  logic [15:0] scan_in, signature;
  logic        scan_shift;

  bast_top dut (
    .clk, .rst_n, .code_valid, .code, .misr_clear(1'b0), .x_mask(16'h0),
    .scan_out(16'h5a5a), .scan_in, .scan_shift, .signature
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) if (rst_n) cycles++;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic void make_slice(input int dc, output logic [15:0] care,
                                     output logic [15:0] val);
    int unsigned bias = $urandom_range(0, 2);
    for (int c = 0; c < 16; c++) begin
      care[c] = ($urandom_range(0, 999) >= dc);
      case (bias)
        0:       val[c] = ($urandom_range(0, 9) == 0);
        1:       val[c] = ($urandom_range(0, 9) != 0);
        default: val[c] = 1'($urandom);
      endcase
    end
  endfunction

  task automatic run_circuit(input circ_t ct);
    int ns = ct.nvect * ct.nlen;
    int n_inv = 0, n_base = 0, cyc0;
    int n_mode [3] = '{0, 0, 0};
    logic [15:0] st, base;
    logic [15:0] care_c, val_c, care_n, val_n;

    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc0 = cycles;
    st   = REF_SEED;
    base = REF_SEED;
    make_slice(ct.dc_permille, care_c, val_c);
    for (int s = 0; s < ns; s++) begin
      logic [15:0] flips;
      int sel, best;
      if (s + 1 < ns) make_slice(ct.dc_permille, care_n, val_n);
      else begin care_n = '0; val_n = '0; end
      n_base += popc((base ^ val_c) & care_c);
      base = ref_prpg(base, 1'b0, 1'b0, REF_MUX, REF_NOT);

      flips = (st ^ val_c) & care_c;
      for (int c = 0; c < 16; c++)
        if (flips[c]) begin
          code_valid = 1'b1;
          code = code_invert(c);
          @(posedge clk); #1;
          n_inv++;
        end
      sel  = 0;
      best = popc((ref_prpg(st, 1'b0, 1'b0, REF_MUX, REF_NOT) ^ val_n) & care_n);
      for (int k = 1; k <= 2; k++) begin
        int n = popc((ref_prpg(st, 1'b1, k == 2, REF_MUX, REF_NOT) ^ val_n) & care_n);
        if (n < best) begin best = n; sel = k; end
      end
      n_mode[sel]++;
      code_valid = 1'b1;
      code = code_reset(sel);
      #1;
      checks++;
      if (!scan_shift || scan_in !== (st ^ flips) || ((scan_in ^ val_c) & care_c) != 0) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s slice %0d: scan_in=%h expected %h", ct.name, s, scan_in, st ^ flips);
      end
      @(posedge clk); #1;
      st = ref_prpg(st, sel != 0, sel == 2, REF_MUX, REF_NOT);
      care_c = care_n;
      val_c  = val_n;
    end
    code_valid = 1'b0;
    checks++;
    if (cycles - cyc0 != ns + n_inv) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", ct.name, cycles - cyc0, ns + n_inv);
    end
    checks++;
    if (n_mode[1] == 0 || n_mode[2] == 0) begin
      failures++;
      $display("FAIL %s: a forced PRPG mode never used", ct.name);
    end
    $display("%-9s Nlen=%4d Nvect=%4d dc=%0d.%0d%%  Ninv=%6d (unmodified %6d)  TD=%7d (unmodified %7d)  normal/load0/load1=%0d/%0d/%0d",
             ct.name, ct.nlen, ct.nvect, ct.dc_permille / 10, ct.dc_permille % 10, n_inv, n_base,
             (ns + n_inv) * 6, (ns + n_base) * 6, n_mode[0], n_mode[1], n_mode[2]);
  endtask

  initial begin
    circ[0]  = '{"b14",      18, 437, 756};
    circ[1]  = '{"b15",      31, 439, 875};
    circ[2]  = '{"b17",      91, 452, 882};
    circ[3]  = '{"b20",      33, 424, 713};
    circ[4]  = '{"b21",      33, 417, 718};
    circ[5]  = '{"b22",      48, 440, 737};
    circ[6]  = '{"s5378",    14, 109, 418};
    circ[7]  = '{"s9234.1",  16, 143, 522};
    circ[8]  = '{"s13207.1", 44, 262, 600};
    circ[9]  = '{"s15850.1", 39, 138, 730};
    circ[10] = '{"s35932",  111,  18, 480};
    circ[11] = '{"s38417",  104, 106, 382};
    circ[12] = '{"s38584.1", 92, 139, 796};
    for (int i = 0; i < NC; i++) run_circuit(circ[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
