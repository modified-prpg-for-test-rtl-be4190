// tb_bast_top: end-to-end test of the BAST logic at its default parameters.
//
// The testbench plays both neighbours of the design:
//  * the tester: it holds a set of ATPG patterns (care bits and values, made
//    here with correlated care bits and about 60 % don't-cares), tracks the
//    PRPG with a reference model and emits BAST codes: one invert code for
//    every care bit the PRPG slice gets wrong, then one reset code whose
//    {M, L0} sub-mode (normal / load '0' / load '1') is the one that leaves
//    the fewest conflicts in the following slice. It also inserts idle cycles
//    and no-operation codes.
//  * the circuit under test: 16 scan chains of NLEN flip-flops that shift on
//    scan_shift, capture a response after each pattern, with some response
//    bits unknown (random value, masked through x_mask).
// Checks: every shifted slice equals the reference PRPG slice XOR the flips
// the tester asked for and agrees with every care bit; the loaded chains hold
// the pattern; the MISR signature matches a reference compaction of the
// unmasked response bits (so an unmasked unknown bit would show); the cycle
// count equals (slices + invert codes + idle/no-op cycles), i.e. the code
// count behind TD = (Nvect*Nlen + Ninv) * (2 + log2 Nch); the MISR clear.
// Every mechanism (invert, reset normal / load 0 / load 1, NOT-gated stage
// used, no-op code, idle cycle, X masking, MISR clear) must occur at least once.
module tb_bast_top;
  import bast_ref_pkg::*;

  localparam int NLEN = 8;             // scan-chain length of the modelled CUT
  localparam int NPAT = 40;            // ATPG patterns
  localparam int NS   = (NPAT + 1) * NLEN;  // last NLEN slices only unload

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        code_valid = 1'b0;
  logic [5:0]  code = '0;
  logic        misr_clear = 1'b0;
  logic [15:0] x_mask;
  logic [15:0] scan_out;
  logic [15:0] scan_in;
  logic        scan_shift;
  logic [15:0] signature;

  bast_top dut (
    .clk, .rst_n, .code_valid, .code, .misr_clear, .x_mask, .scan_out,
    .scan_in, .scan_shift, .signature
  );

  always #5 clk = ~clk;

  // ---------------- CUT scan-chain model ----------------
  logic [NLEN-1:0] chain [16];
  logic [NLEN-1:0] xch   [16];   // 1 = this bit is unknown
  always_comb
    for (int c = 0; c < 16; c++) begin
      scan_out[c] = chain[c][NLEN-1];
      x_mask[c]   = xch[c][NLEN-1];
    end

  // ---------------- pattern set ----------------
  logic [15:0] care [NS];
  logic [15:0] val  [NS];

  int checks = 0, failures = 0;
  int n_inv = 0, n_rst_norm = 0, n_rst_l0 = 0, n_rst_l1 = 0, n_not_used = 0;
  int n_nop = 0, n_idle = 0, n_xmasked = 0, n_clear = 0, n_capture = 0;
  int n_inv_base = 0;
  int cycles = 0, shifts = 0;
  logic [15:0] ref_state, exp_sig;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (scan_shift) shifts++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic int popc(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction

  // One clock with a code (or idle). Updates the CUT and MISR models on a shift.
  task automatic cycle(input bit valid, input logic [5:0] c);
    logic [15:0] si, d;
    code_valid = valid;
    code       = c;
    #1;
    si = scan_in;
    d  = scan_out & ~x_mask;
    n_xmasked += (scan_shift ? popc(x_mask) : 0);
    @(posedge clk);
    #1;
    if (scan_shift) begin
      for (int k = 0; k < 16; k++) begin
        chain[k] = {chain[k][NLEN-2:0], si[k]};
        xch[k]   = {xch[k][NLEN-2:0], 1'b0};
      end
      exp_sig = ref_misr(exp_sig, d);
    end
    code_valid = 1'b0;
    checks++;
    if (signature !== exp_sig) fail($sformatf("signature %h expected %h", signature, exp_sig));
  endtask

  // Randomly insert idle cycles and no-op codes.
  task automatic maybe_filler();
    int unsigned r = $urandom_range(0, 19);
    if (r == 0) begin cycle(1'b0, 6'($urandom)); n_idle++; end
    if (r == 1) begin cycle(1'b1, {2'b01, 4'($urandom)}); n_nop++; end
    if (r == 2) begin cycle(1'b1, {2'b11, 4'($urandom)}); n_nop++; end
  endtask

  function automatic int conflicts(input logic [15:0] st, input int s);
    return popc((st ^ val[s]) & care[s]);
  endfunction

  initial run();

  task automatic run();
    int filler_cycles;
    logic [15:0] base_state;
    // Patterns: each slice is biased towards 0, towards 1, or unbiased.
    for (int s = 0; s < NS; s++) begin
      int unsigned bias = $urandom_range(0, 2);
      care[s] = '0; val[s] = '0;
      if (s < NPAT * NLEN)
        for (int c = 0; c < 16; c++) begin
          care[s][c] = ($urandom_range(0, 99) < 40);
          case (bias)
            0: val[s][c] = ($urandom_range(0, 9) == 0);
            1: val[s][c] = ($urandom_range(0, 9) != 0);
            default: val[s][c] = 1'($urandom);
          endcase
        end
    end
    for (int c = 0; c < 16; c++) begin
      chain[c] = NLEN'($urandom);
      xch[c]   = '1;
    end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_state = REF_SEED;
    exp_sig   = '0;
    filler_cycles = 0;

    for (int s = 0; s < NS; s++) begin
      logic [15:0] flips;
      int sel, best;
      // invert codes for the conflicting bits of this slice
      flips = (ref_state ^ val[s]) & care[s];
      for (int c = 0; c < 16; c++)
        if (flips[c]) begin
          cycle(1'b1, code_invert(c));
          n_inv++;
          begin int f0 = n_idle + n_nop; maybe_filler(); filler_cycles += n_idle + n_nop - f0; end
        end
      // choose the PRPG sub-mode for the next slice
      sel = 0;
      if (s + 1 < NS) begin
        best = conflicts(ref_prpg(ref_state, 1'b0, 1'b0, REF_MUX, REF_NOT), s + 1);
        for (int k = 1; k <= 2; k++) begin
          int n = conflicts(ref_prpg(ref_state, 1'b1, k == 2, REF_MUX, REF_NOT), s + 1);
          if (n < best) begin best = n; sel = k; end
        end
        // a NOT-gated stage that a forced step sets to the value its care bit wants
        if (sel != 0 && ((REF_NOT & care[s+1] & ~(val[s+1] ^ {16{sel == 1}}))) != 0)
          n_not_used++;
      end
      // reset code: check the slice being shifted before the clock edge
      code_valid = 1'b1;
      code       = code_reset(sel);
      #1;
      checks++;
      if (scan_in !== (ref_state ^ flips))
        fail($sformatf("slice %0d scan_in %h expected %h", s, scan_in, ref_state ^ flips));
      checks++;
      if (((scan_in ^ val[s]) & care[s]) != 0) fail($sformatf("slice %0d misses care bits", s));
      checks++;
      if (!scan_shift) fail("no scan_shift on a reset code");
      cycle(1'b1, code_reset(sel));
      case (sel)
        0: n_rst_norm++;
        1: n_rst_l0++;
        default: n_rst_l1++;
      endcase
      ref_state = ref_prpg(ref_state, sel != 0, sel == 2, REF_MUX, REF_NOT);
      begin int f0 = n_idle + n_nop; maybe_filler(); filler_cycles += n_idle + n_nop - f0; end

      // a pattern is fully loaded: check chain contents, then capture
      if ((s + 1) % NLEN == 0 && s < NPAT * NLEN) begin
        int p0 = s + 1 - NLEN;
        for (int c = 0; c < 16; c++)
          for (int k = 0; k < NLEN; k++) begin
            checks++;
            if (care[p0 + k][c] && chain[c][NLEN-1-k] !== val[p0 + k][c])
              fail($sformatf("pattern at slice %0d chain %0d bit %0d not loaded", p0, c, k));
          end
        begin
          logic [NLEN-1:0] resp [16];
          for (int c = 0; c < 16; c++)
            resp[c] = {chain[c][NLEN-2:0], chain[(c + 1) % 16][NLEN-1]} ^ NLEN'(c * 37 + s);
          for (int c = 0; c < 16; c++)
            for (int k = 0; k < NLEN; k++) begin
              xch[c][k] = ($urandom_range(0, 7) == 0);
              chain[c][k] = xch[c][k] ? 1'($urandom) : resp[c][k];
            end
        end
        n_capture++;
      end

      // clear the MISR once, after the fourth pattern has been unloaded
      if (s == 5 * NLEN - 1) begin
        checks++;
        if (signature == '0) fail("signature zero before clear");
        misr_clear = 1'b1;
        exp_sig = '0;
        cycle(1'b0, 6'h0);
        misr_clear = 1'b0;
        checks++;
        if (signature !== '0) fail("MISR clear");
        n_clear++;
        filler_cycles++;
      end
    end

    // baseline: the same patterns with an unmodified PRPG (normal steps only)
    base_state = REF_SEED;
    for (int s = 0; s < NS; s++) begin
      n_inv_base += conflicts(base_state, s);
      base_state = ref_prpg(base_state, 1'b0, 1'b0, REF_MUX, REF_NOT);
    end

    // cycle count: one code per slice plus one per inversion, plus fillers
    checks++;
    if (shifts != NS) fail($sformatf("shifts %0d expected %0d", shifts, NS));
    checks++;
    if (cycles != NS + n_inv + filler_cycles)
      fail($sformatf("cycles %0d expected %0d", cycles, NS + n_inv + filler_cycles));

    $display("slices=%0d invert codes=%0d (unmodified PRPG would need %0d)", NS, n_inv, n_inv_base);
    $display("TD = (slices + Ninv) * 6 = %0d bits, unmodified PRPG %0d bits", (NS + n_inv) * 6, (NS + n_inv_base) * 6);
    $display("reset normal=%0d load0=%0d load1=%0d not-gate-used=%0d nop=%0d idle=%0d xmasked=%0d clear=%0d capture=%0d",
             n_rst_norm, n_rst_l0, n_rst_l1, n_not_used, n_nop, n_idle, n_xmasked, n_clear, n_capture);
    checks++; if (n_inv == 0)      fail("no invert code");
    checks++; if (n_rst_norm == 0) fail("no normal reset");
    checks++; if (n_rst_l0 == 0)   fail("no load-0 reset");
    checks++; if (n_rst_l1 == 0)   fail("no load-1 reset");
    checks++; if (n_not_used == 0) fail("NOT gate never used");
    checks++; if (n_nop == 0)      fail("no no-op code");
    checks++; if (n_idle == 0)     fail("no idle cycle");
    checks++; if (n_xmasked == 0)  fail("no X masked");
    checks++; if (n_clear == 0)    fail("no MISR clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
