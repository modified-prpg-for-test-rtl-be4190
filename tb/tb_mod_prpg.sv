// tb_mod_prpg: self-checking test of the modified PRPG at its default
// parameters. Checks the reset seed, hold when not stepped, normal LFSR steps
// against the reference model, the maximal period (65535 steps back to the
// seed), and forced load-'0' / load-'1' steps including the NOT-gated stages.
module tb_mod_prpg;
  import bast_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        step = 1'b0, m = 1'b0, l0 = 1'b0;
  logic [15:0] state;
  logic [15:0] exp_s;
  int checks = 0, failures = 0;
  int period;

  mod_prpg dut (.clk, .rst_n, .step, .m, .l0, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (state !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %s: state=%h expected=%h", what, state, exp_s);
    end
  endtask

  task automatic do_step(input bit s, input bit mm, input bit ll);
    step = s; m = mm; l0 = ll;
    @(posedge clk); #1;
    if (s) exp_s = ref_prpg(exp_s, mm, ll, REF_MUX, REF_NOT);
    step = 1'b0; m = 1'b0; l0 = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_s = REF_SEED;
    check("reset seed");

    // hold with step low, even with m set
    do_step(1'b0, 1'b1, 1'b1);
    check("hold");

    // normal steps
    for (int i = 0; i < 200; i++) begin
      do_step(1'b1, 1'b0, 1'b0);
      check("normal step");
    end

    // random mix of normal / load0 / load1 / hold
    for (int i = 0; i < 2000; i++) begin
      int unsigned r;
      r = $urandom_range(0, 3);
      case (r)
        0: do_step(1'b1, 1'b0, 1'b0);
        1: do_step(1'b1, 1'b1, 1'b0);
        2: do_step(1'b1, 1'b1, 1'b1);
        default: do_step(1'b0, 1'b0, 1'b0);
      endcase
      check("mixed step");
    end

    // explicit forced values: stages 0..12 forced, 2/5/8 inverted
    do_step(1'b1, 1'b1, 1'b0);
    checks++;
    if ((state & 16'h1FFF) !== 16'h0124) begin
      failures++; $display("FAIL load0 pattern %h", state);
    end
    do_step(1'b1, 1'b1, 1'b1);
    checks++;
    if ((state & 16'h1FFF) !== 16'h1EDB) begin
      failures++; $display("FAIL load1 pattern %h", state);
    end

    // maximal period from the seed (reset again)
    rst_n = 1'b0; #1; rst_n = 1'b1;
    exp_s = REF_SEED;
    period = 0;
    step = 1'b1;
    do begin
      @(posedge clk); #1;
      period++;
    end while (state !== REF_SEED && period < 70000);
    step = 1'b0;
    checks++;
    if (period != 65535) begin
      failures++; $display("FAIL period %0d", period);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
