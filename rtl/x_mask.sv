// x_mask: blocks unknown (X) scan-out values from the signature register.
//
// The document names an X-masking block in the BAST architecture without
// describing it. This is the simplest block that does the job: each chain
// output is gated to 0 when its mask bit is 1. Where the mask comes from is
// not given; here it is an input driven by the tester, which knows from the
// expected responses which chain outputs are unknown. Combinational.
module x_mask
  import bast_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic [N-1:0] scan_out,
  input  logic [N-1:0] mask,
  output logic [N-1:0] masked
);

  assign masked = scan_out & ~mask;

endmodule
