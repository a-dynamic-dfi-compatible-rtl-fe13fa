// Inequality monitor of the DSMS.
//
// Continuously compares the expected falling-edge count (Counter-A) with the
// received count (Counter-B). not_equal is high while they differ and low when
// they match; once dfi_rddata_en_reg has fallen this output is the mask, so a
// match closes the mask. Purely combinational.
`timescale 1ps/1ps
module dsms_ineq_mon #(
  parameter int unsigned CNT_W = dsms_pkg::CNT_W
) (
  input  logic [CNT_W-1:0] expected,
  input  logic [CNT_W-1:0] actual,
  output logic             not_equal
);
  always_comb not_equal = (expected != actual);
endmodule
