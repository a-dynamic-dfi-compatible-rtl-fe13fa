// Input register of the DSMS: a positive-edge D flip-flop that registers the
// DFI read-data enable (dfi_rddata_en) on dfi_clk, giving dfi_rddata_en_reg.
//
// dfi_rddata_en_reg is the signal that starts a masking operation: it releases
// the counter reset, enables Counter-A, feeds the delay line and selects the
// mux input. The reset is asynchronous and active low (reset_n), so the flop
// output is low after reset, as the published design requires.
// Timing: q follows d one dfi_clk rising edge later.
`timescale 1ps/1ps
module dsms_rddata_en_ff (
  input  logic dfi_clk,
  input  logic reset_n,
  input  logic d,
  output logic q
);
  always_ff @(posedge dfi_clk or negedge reset_n) begin
    if (!reset_n) q <= 1'b0;
    else          q <= d;
  end
endmodule
