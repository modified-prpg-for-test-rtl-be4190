// bast_ref_pkg: reference models used by the testbenches.
//
// Written apart from the RTL, with the default polynomial
// x^16 + x^15 + x^13 + x^4 + 1 spelled out as explicit taps, so that the
// testbenches compare the design with an independent computation.
package bast_ref_pkg;

  localparam logic [15:0] REF_MUX = 16'h1FFF;  // default MUX positions
  localparam logic [15:0] REF_NOT = 16'h0124;  // default NOT-gate positions
  localparam logic [15:0] REF_SEED = 16'hACE1;

  // One step of the modified PRPG: Fibonacci shift towards higher stages,
  // feedback into stage 0; with m set, MUXed stages load l0 (inverted where a
  // NOT gate sits).
  function automatic logic [15:0] ref_prpg(input logic [15:0] s, input bit m,
                                           input bit l0, input logic [15:0] mux,
                                           input logic [15:0] notm);
    logic [15:0] n;
    n = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
    if (m)
      for (int i = 0; i < 16; i++)
        if (mux[i]) n[i] = l0 ^ notm[i];
    return n;
  endfunction

  function automatic logic [15:0] ref_misr(input logic [15:0] s, input logic [15:0] d);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]} ^ d;
  endfunction

  // BAST code builders: {mode[1:0], addr[3:0]}.
  function automatic logic [5:0] code_invert(input int unsigned chain);
    return {2'b10, 4'(chain)};
  endfunction

  // sel: 0 normal, 1 load '0', 2 load '1'
  function automatic logic [5:0] code_reset(input int unsigned sel);
    case (sel)
      1:       return 6'b00_0010;
      2:       return 6'b00_0011;
      default: return 6'b00_0000;
    endcase
  endfunction

endpackage
