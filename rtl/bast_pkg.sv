// bast_pkg: constants and types shared by the BAST (BIST-aided scan test) blocks.
//
// A BAST code is the word the tester sends for each step of a scan slice. It
// has a 2-bit mode part and an address part of ceil(log2(N_CH)) bits, so with
// 16 scan chains a code is 6 bits, matching the code length 2 + ceil(log2 Nch)
// used for the test-data count. The two modes in use are the reset mode
// (00: shift the current slice into the chains, clear the inverter code, step
// the PRPG) and the invert mode (10: set one inverter flip-flop). The values
// 01 and 11 have no defined meaning and are decoded as "do nothing"; that is
// this design's choice.
//
// In reset mode the two low address bits carry the PRPG control signals
// {M, L0}: 00 = normal LFSR step, 10 = the MUXed flip-flops load '0',
// 11 = they load '1'. Address 01 is treated as a normal step.
package bast_pkg;

  // Number of scan chains, which is also the PRPG (LFSR) length.
  parameter int unsigned N_CH   = 16;
  parameter int unsigned ADDR_W = $clog2(N_CH);
  parameter int unsigned CODE_W = 2 + ADDR_W;

  typedef enum logic [1:0] {
    MODE_RESET  = 2'b00,
    MODE_NOP0   = 2'b01,
    MODE_INVERT = 2'b10,
    MODE_NOP1   = 2'b11
  } bast_mode_e;

  // Reset-mode sub-modes carried in address bits [1:0] as {M, L0}.
  parameter logic [1:0] RST_NORMAL = 2'b00;
  parameter logic [1:0] RST_LOAD0  = 2'b10;
  parameter logic [1:0] RST_LOAD1  = 2'b11;

  typedef struct packed {
    bast_mode_e        mode;
    logic [ADDR_W-1:0] addr;
  } bast_code_t;

  // Default feedback polynomial x^16 + x^15 + x^13 + x^4 + 1 (primitive), as a
  // tap mask: bit i set means flip-flop i (stage i+1) feeds the XOR.
  parameter logic [15:0] POLY16 = 16'hD008;

endpackage
