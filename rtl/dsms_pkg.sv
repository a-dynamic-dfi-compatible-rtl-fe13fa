// Shared constants of the dynamic strobe masking system (DSMS).
//
// The DSMS qualifies the DQS read strobe of a DDR PHY using only the DFI
// signal dfi_rddata_en: one counter measures how many strobe pulses to expect,
// a second counts the ones that arrive, and the mask closes when they match.
// The counter width (3 bits) and the 64-tap delay line with its 6-bit tap
// setting follow the published design; the delay values are this design's
// own estimates, since only the tap count is specified.
`timescale 1ps/1ps
package dsms_pkg;
  // Width of Counter-A (expected edges) and Counter-B (received edges).
  localparam int unsigned CNT_W = 3;
  // Tap-select width of the 64-tap programmable delay line.
  localparam int unsigned TAP_W = 6;
  // Delay of one PDL tap and of one select-path buffer, in ps (assumed).
  localparam int unsigned TAP_DELAY_PS = 80;
  localparam int unsigned BUF_DELAY_PS = 40;
endpackage
