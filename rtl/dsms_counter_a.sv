// Counter-A of the DSMS: counts the DQS falling edges to expect.
//
// The DFI protocol holds dfi_rddata_en high for one dfi_clk cycle per
// single-data-rate word, and each such word arrives with one DQS pulse. This
// positive-edge up-counter therefore increments on every dfi_clk rising edge
// while en (dfi_rddata_en_reg) is high; when en falls it holds the number of
// falling edges the strobe will carry.
// internal_reset_n clears it asynchronously (active low) once the mask closes.
// The count wraps modulo 2**CNT_W; Counter-B wraps the same way, so the
// equality test still works for bursts longer than 2**CNT_W-1 pulses as long
// as fewer than 2**CNT_W pulses are outstanding when en falls.
// The 3-bit width follows the published design; wrap-around is this design's
// reading of it.
`timescale 1ps/1ps
module dsms_counter_a #(
  parameter int unsigned CNT_W = dsms_pkg::CNT_W
) (
  input  logic             dfi_clk,
  input  logic             internal_reset_n,
  input  logic             en,
  output logic [CNT_W-1:0] expected
);
  always_ff @(posedge dfi_clk or negedge internal_reset_n) begin
    if (!internal_reset_n) expected <= '0;
    else if (en)           expected <= expected + 1'b1;
  end
endmodule
