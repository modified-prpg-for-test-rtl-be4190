// bast_top: on-chip BIST-aided scan test (BAST) logic with the modified PRPG.
//
// The tester sends one BAST code per clock. The decoder turns it into either
// "set inverter flip-flop <addr>" (invert mode) or "shift this slice, clear the
// inverter code, step the PRPG" (reset mode, with the PRPG controls M and L0
// from the address). The slice applied to the scan-chain inputs is the PRPG
// pattern XOR the inverter code, so the tester only pays one code per bit on
// which the pseudorandom slice disagrees with a care bit of the ATPG slice, plus
// one reset code per slice. The modified PRPG can force its MUXed stages to
// 0 or 1 (NOT-gated stages to the opposite value) for the next slice, which
// removes many of those flips when the chains' care bits are correlated.
// On the response side the chain outputs pass through the X-masking block
// into the MISR, which updates on every scan shift.
//
// The block set (PRPG, inverter block, decoder, X-masking, MISR) and the
// PRPG/inverter/decoder behaviour follow the document. Code bit encodings, the
// polynomial, seed, MUX/NOT positions, the X-mask input and the MISR clear
// input are this design's choices. The capture cycle of the circuit under test
// is controlled by the tester and not by this block.
//
// Timing: code presented with code_valid high acts on that clock edge. In the
// cycle of a reset-mode code, scan_shift is high and scan_in holds the slice the
// chains capture at the edge; scan_out must then hold the chains' outputs.
module bast_top
  import bast_pkg::*;
#(
  parameter int unsigned N        = N_CH,
  parameter logic [N-1:0] POLY     = N'(POLY16),
  parameter logic [N-1:0] SEED     = N'(16'hACE1),
  parameter logic [N-1:0] MUX_MASK = N'(16'h1FFF),
  parameter logic [N-1:0] NOT_MASK = N'(16'h0124),
  parameter int unsigned  AW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            code_valid,
  input  logic [AW+1:0]   code,        // {mode[1:0], addr[AW-1:0]}
  input  logic            misr_clear,
  input  logic [N-1:0]    x_mask,
  input  logic [N-1:0]    scan_out,
  output logic [N-1:0]    scan_in,
  output logic            scan_shift,
  output logic [N-1:0]    signature
);

  logic [N-1:0] inv_set;
  logic         m, l0;
  logic [N-1:0] prpg;
  logic [N-1:0] masked;

  bast_decoder #(.N(N), .AW(AW)) u_dec (
    .code_valid (code_valid),
    .mode       (bast_mode_e'(code[AW+1:AW])),
    .addr       (code[AW-1:0]),
    .inv_set    (inv_set),
    .shift      (scan_shift),
    .m          (m),
    .l0         (l0)
  );

  mod_prpg #(
    .N(N), .POLY(POLY), .SEED(SEED), .MUX_MASK(MUX_MASK), .NOT_MASK(NOT_MASK)
  ) u_prpg (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (scan_shift),
    .m     (m),
    .l0    (l0),
    .state (prpg)
  );

  inverter_block #(.N(N)) u_inv (
    .clk      (clk),
    .rst_n    (rst_n),
    .set      (inv_set),
    .clear    (scan_shift),
    .prpg     (prpg),
    .inv_code (),
    .scan_in  (scan_in)
  );

  x_mask #(.N(N)) u_xmask (
    .scan_out (scan_out),
    .mask     (x_mask),
    .masked   (masked)
  );

  misr #(.N(N), .POLY(POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (scan_shift),
    .d     (masked),
    .sig   (signature)
  );

endmodule
