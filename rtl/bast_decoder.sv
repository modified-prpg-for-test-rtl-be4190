// bast_decoder: decodes one BAST code per clock into the controls of the
// inverter block, the PRPG and the scan chains.
//
// A code is {mode[1:0], address}. In invert mode (10) the flip-flop of the
// inverter block chosen by the address is set. In reset mode (00) the current
// slice is shifted into the scan chains, all inverter flip-flops are cleared and
// the PRPG takes one step; the two low address bits then give the PRPG controls
// {M, L0}: 00 normal, 10 load '0', 11 load '1' (01 is taken as normal). Modes
// 01 and 11 do nothing. The two modes, the mode/address split and the
// {M, L0} values follow the document; the bit encodings of the modes, the
// placement of M and L0 in the address and the no-operation codes are this
// design's choices.
//
// Purely combinational: the outputs act on the clock edge at which the code is
// presented with code_valid high, so each code takes exactly one cycle.
module bast_decoder
  import bast_pkg::*;
#(
  parameter int unsigned N = N_CH,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          code_valid,
  input  bast_mode_e    mode,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  inv_set,  // one-hot: set this inverter flip-flop
  output logic          shift,    // scan shift, clear inverter code, step PRPG
  output logic          m,        // PRPG MUX select
  output logic          l0        // value loaded through the PRPG MUXes
);

  always_comb begin
    inv_set = '0;
    shift   = 1'b0;
    m       = 1'b0;
    l0      = 1'b0;
    if (code_valid) begin
      unique case (mode)
        MODE_INVERT: if (32'(addr) < N) inv_set[addr] = 1'b1;
        MODE_RESET: begin
          shift = 1'b1;
          if (addr[1:0] == RST_LOAD0 || addr[1:0] == RST_LOAD1) {m, l0} = addr[1:0];
          else                                                  {m, l0} = RST_NORMAL;
        end
        default: ;
      endcase
    end
  end

endmodule
