// mod_prpg: the modified pseudorandom pattern generator.
//
// An N-stage Fibonacci LFSR whose stage i drives scan chain i. The LFSR is
// extended with a 2:1 MUX in front of selected flip-flops (MUX_MASK). When the
// control signal M is 0 every flip-flop takes its normal LFSR input. When M is
// 1 the MUXed flip-flops load L0 instead, or the inverse of L0 where a NOT gate
// sits on the MUX input (NOT_MASK); flip-flops without a MUX keep their normal
// LFSR input. This lets the tester set chosen stages of the next scan slice to
// 0 or 1 with a single reset-mode code, so that fewer inverter codes are needed.
//
// Following the document: a 16-bit LFSR for 16 scan chains, MUXes on at most
// 13 flip-flops, at most three NOT gates, and the two control signals M and L0.
// The positions of the MUXes and NOT gates are chosen per circuit by an offline
// correlation analysis of the ATPG patterns; they are parameters here and the
// defaults (MUXes on stages 0..12, NOT gates on stages 2, 5 and 8) are only an
// example. The feedback polynomial, the reset seed and the Fibonacci form are
// this design's choices. With no NOT gate, a load-'0' step can leave the LFSR
// all-zero, where it stays until a load-'1' step; with at least one NOT gate
// and one plain MUX a forced step can never produce the all-zero state.
//
// Interface: 'step' advances the generator by one clock; 'state' is the
// current pattern (one bit per scan chain). Asynchronous active-low reset
// loads SEED.
module mod_prpg
  import bast_pkg::*;
#(
  parameter int unsigned     N        = N_CH,
  parameter logic [N-1:0]    POLY     = N'(POLY16),
  parameter logic [N-1:0]    SEED     = N'(16'hACE1),
  parameter logic [N-1:0]    MUX_MASK = N'(16'h1FFF),
  parameter logic [N-1:0]    NOT_MASK = N'(16'h0124)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         m,
  input  logic         l0,
  output logic [N-1:0] state
);

  logic [N-1:0] lfsr_next;
  logic [N-1:0] forced;
  logic [N-1:0] next;

  // A NOT gate only makes sense on a MUXed stage.
  initial assert ((NOT_MASK & ~MUX_MASK) == '0)
    else $error("mod_prpg: NOT_MASK has a bit outside MUX_MASK");

  always_comb begin
    lfsr_next = {state[N-2:0], ^(state & POLY)};
    forced    = {N{l0}} ^ NOT_MASK;
    next      = m ? ((forced & MUX_MASK) | (lfsr_next & ~MUX_MASK)) : lfsr_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= next;
  end

endmodule
