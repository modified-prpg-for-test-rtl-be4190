// misr: multiple-input signature register compacting the scan-chain outputs.
//
// The document names the MISR in the BAST architecture; its form is this
// design's choice: an N-bit shift register with external (Fibonacci) feedback, the same
// polynomial as the PRPG, into which the N masked chain outputs are XORed
// every scan shift:  sig' = {sig[N-2:0], ^(sig & POLY)} ^ d.
// 'en' is the scan-shift strobe, 'clear' a synchronous return to zero (e.g.
// before a new test session). Asynchronous active-low reset also clears it.
module misr
  import bast_pkg::*;
#(
  parameter int unsigned  N    = N_CH,
  parameter logic [N-1:0] POLY = N'(POLY16)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] d,
  output logic [N-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[N-2:0], ^(sig & POLY)} ^ d;
  end

endmodule
