// Mask multiplexer of the DSMS.
//
// z is the masking signal. While s (the delayed dfi_rddata_en_reg) is high it
// passes i1, the delay-line output, which opens the mask inside the DQS
// preamble and keeps it open while the counters may briefly match. When s is
// low it passes i0, the inequality monitor, which holds the mask open until
// the last expected strobe falling edge has been counted. Combinational.
`timescale 1ps/1ps
module dsms_mask_mux (
  input  logic i0,
  input  logic i1,
  input  logic s,
  output logic z
);
  always_comb z = s ? i1 : i0;
endmodule
