// inverter_block: holds the inverter code and flips the PRPG bits it marks.
//
// One flip-flop and one XOR per scan chain, as the document draws it: the
// scan-chain input is prpg[i] XOR code[i], so a 1 in the inverter code inverts
// that chain's PRPG bit and a 0 passes it unchanged. 'set' (one-hot, from an
// invert-mode code) sets flip-flops; 'clear' (from a reset-mode code) clears
// them all after the slice has been shifted out on the same edge. The output
// is combinational from the flip-flops and the PRPG, so the slice a reset code
// shifts already holds every flip set by the invert codes before it.
// Set and clear never come together from the decoder; if they did, clear wins
// (this design's choice; an assertion flags it). Asynchronous active-low reset clears the code.
module inverter_block
  import bast_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] set,
  input  logic         clear,
  input  logic [N-1:0] prpg,
  output logic [N-1:0] inv_code,
  output logic [N-1:0] scan_in
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     inv_code <= '0;
    else if (clear) inv_code <= '0;
    else            inv_code <= inv_code | set;
  end

  assign scan_in = prpg ^ inv_code;

  // An invert code and a reset code cannot share a cycle.
  a_set_clear_excl: assert property (@(posedge clk) disable iff (!rst_n) !(clear && (set != '0)))
    else $error("inverter_block: set and clear in the same cycle");

endmodule
