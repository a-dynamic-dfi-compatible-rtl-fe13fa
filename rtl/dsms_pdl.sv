// Behavioural model of the DSMS 64-tap programmable delay line (PDL).
//
// In silicon this is a chain of delay cells with a tap selector; it delays
// dfi_rddata_en_reg so that the mask rises part-way through the DQS preamble,
// compensating the strobe's time of flight from the SDRAM. It is a physical
// delay, not logic, so it is modelled here as a transport delay of
// taps * TAP_DELAY_PS picoseconds applied to both edges (taps = 0 gives no
// delay). The 64 taps and 6-bit setting are the published design's; the 80 ps
// per tap is an estimate chosen so that the 64 taps span one 200 MHz period.
// taps is a static configuration value (cnf_dsms_taps).
`timescale 1ps/1ps
module dsms_pdl #(
  parameter int unsigned TAP_W        = dsms_pkg::TAP_W,
  parameter int unsigned TAP_DELAY_PS = dsms_pkg::TAP_DELAY_PS
) (
  input  logic             pdl_in,
  input  logic [TAP_W-1:0] taps,
  output logic             pdl_out
);
  initial pdl_out = 1'b0;
  always @(pdl_in) pdl_out <= #(taps * TAP_DELAY_PS) pdl_in;
endmodule
