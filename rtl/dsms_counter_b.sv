// Counter-B of the DSMS: counts the DQS falling edges actually received.
//
// A negative-edge triggered up-counter clocked by the masked strobe, so only
// edges that pass the mask are counted and preamble glitches are not. It runs
// in the strobe's own timing domain, asynchronous to dfi_clk.
// enable gates counting (the design drives it with the mask signal).
// internal_reset_n clears the count asynchronously (active low) when the mask
// closes, ready for the next READ. Wraps modulo 2**CNT_W like Counter-A.
// The 3-bit width and negative-edge clocking follow the published design.
`timescale 1ps/1ps
module dsms_counter_b #(
  parameter int unsigned CNT_W = dsms_pkg::CNT_W
) (
  input  logic             dqs,
  input  logic             internal_reset_n,
  input  logic             enable,
  output logic [CNT_W-1:0] actual
);
  always_ff @(negedge dqs or negedge internal_reset_n) begin
    if (!internal_reset_n) actual <= '0;
    else if (enable)       actual <= actual + 1'b1;
  end
endmodule
