// Counter reset logic of the DSMS: a 2-input OR driving a 2-input AND.
//
// internal_reset_n = reset_n & (en_reg | mask). The counters are held in reset
// while no READ is in progress. The reset is released as soon as
// dfi_rddata_en_reg rises, and asserted again the moment the mask falls after
// dfi_rddata_en_reg has fallen. Clearing both counters immediately makes
// not_equal low, which keeps the mask low, so the circuit is idle and ready for
// a back-to-back READ. Combinational; the gate types are the published
// design's, the choice of OR inputs is read from its schematic.
`timescale 1ps/1ps
module dsms_reset_logic (
  input  logic reset_n,
  input  logic en_reg,
  input  logic mask,
  output logic internal_reset_n
);
  always_comb internal_reset_n = reset_n & (en_reg | mask);
endmodule
