// Strobe-domain block of the DSMS: Counter-B together with the inequality
// monitor.
//
// Counter-B counts falling edges of masked_dqs while enable is high and is
// cleared asynchronously by internal_reset_n. The inequality monitor compares
// its count with total_neg_edges (the expected count from Counter-A) and
// drives not_equal high while they differ. Grouping the monitor with
// Counter-B follows the published implementation; port names follow its
// top-level schematic. actual is an extra output for observation.
// Timing: actual and not_equal change right after each counted falling edge
// (zero modelled delay) and when total_neg_edges changes.
`timescale 1ps/1ps
module dsms_cnt_b_ineq #(
  parameter int unsigned CNT_W = dsms_pkg::CNT_W
) (
  input  logic             masked_dqs,
  input  logic             internal_reset_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] total_neg_edges,
  output logic             not_equal,
  output logic [CNT_W-1:0] actual
);
  dsms_counter_b #(.CNT_W(CNT_W)) u_cnt_b (
    .dqs              (masked_dqs),
    .internal_reset_n (internal_reset_n),
    .enable           (enable),
    .actual           (actual)
  );

  dsms_ineq_mon #(.CNT_W(CNT_W)) u_ineq (
    .expected  (total_neg_edges),
    .actual    (actual),
    .not_equal (not_equal)
  );
endmodule
