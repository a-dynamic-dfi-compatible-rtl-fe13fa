// Behavioural model of the DSMS select-path delay: two buffers in series.
//
// When dfi_rddata_en_reg falls, Counter-A takes its last increment on the same
// dfi_clk edge, so the inequality monitor may momentarily report a match. If
// the mux switched to the monitor at that instant, the mask could glitch low
// and reset the counters too early. Delaying the mux select by two buffer
// delays lets the monitor settle first. The two-buffer structure is the
// published design's; the 40 ps per buffer is an estimate. Modelled as a
// transport delay of 2 * BUF_DELAY_PS on both edges.
`timescale 1ps/1ps
module dsms_sel_delay #(
  parameter int unsigned BUF_DELAY_PS = dsms_pkg::BUF_DELAY_PS
) (
  input  logic a,
  output logic y
);
  logic b1;
  initial begin
    b1 = 1'b0;
    y  = 1'b0;
  end
  always @(a)  b1 <= #(BUF_DELAY_PS) a;
  always @(b1) y  <= #(BUF_DELAY_PS) b1;
endmodule
