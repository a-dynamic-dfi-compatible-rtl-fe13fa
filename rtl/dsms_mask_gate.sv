// Masking gate of the DSMS: masked_dqs = read_dqs AND mask.
//
// Written, as in the published implementation, as a NAND followed by a second
// NAND with both inputs tied together (an inverter). In silicon the two NANDs
// are balanced cells to keep duty-cycle distortion of the strobe low; that
// sizing is not visible at this level. Combinational.
`timescale 1ps/1ps
module dsms_mask_gate (
  input  logic read_dqs,
  input  logic mask,
  output logic masked_dqs
);
  logic nand1;
  always_comb begin
    nand1      = ~(read_dqs & mask);
    masked_dqs = ~(nand1 & nand1);
  end
endmodule
