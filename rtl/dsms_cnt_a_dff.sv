// dfi_clk-domain block of the DSMS: the dfi_rddata_en input flop together
// with Counter-A.
//
// Both parts run on dfi_clk and are kept in one block so that they share one
// clock tree, as in the published implementation. dfi_rddata_en is
// registered into dfi_rddata_en_reg (reset by reset_n); while
// dfi_rddata_en_reg is high, Counter-A counts dfi_clk rising edges, giving
// the number of DQS falling edges to expect (expected). Counter-A is cleared
// asynchronously by internal_reset_n.
// Timing: dfi_rddata_en_reg follows dfi_rddata_en by one dfi_clk edge; for an
// enable pulse of n cycles, expected reaches n (mod 2**CNT_W) on the same
// edge at which dfi_rddata_en_reg falls.
// Port names follow the published top-level schematic.
`timescale 1ps/1ps
module dsms_cnt_a_dff #(
  parameter int unsigned CNT_W = dsms_pkg::CNT_W
) (
  input  logic             dfi_clk,
  input  logic             reset_n,
  input  logic             dfi_rddata_en,
  input  logic             internal_reset_n,
  output logic             dfi_rddata_en_reg,
  output logic [CNT_W-1:0] expected
);
  dsms_rddata_en_ff u_dff (
    .dfi_clk (dfi_clk),
    .reset_n (reset_n),
    .d       (dfi_rddata_en),
    .q       (dfi_rddata_en_reg)
  );

  dsms_counter_a #(.CNT_W(CNT_W)) u_cnt_a (
    .dfi_clk          (dfi_clk),
    .internal_reset_n (internal_reset_n),
    .en               (dfi_rddata_en_reg),
    .expected         (expected)
  );
endmodule
