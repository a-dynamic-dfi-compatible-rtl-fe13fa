// Dynamic strobe masking system (DSMS): qualifies the DDR read strobe (DQS)
// using only the DFI read-data enable, with no calibration sequence.
//
// During a READ the memory controller holds dfi_rddata_en high for one
// dfi_clk cycle per expected strobe pulse. The enable is registered
// (dfi_rddata_en_reg) and then:
//   * releases the counter reset (internal_reset_n);
//   * enables Counter-A, which counts dfi_clk cycles = expected DQS falling
//     edges;
//   * passes through the programmable delay line (PDL, cnf_dsms_taps taps);
//     its rising output opens the mask inside the DQS preamble, because the
//     mux selects the PDL while the (slightly delayed) registered enable is high.
// Counter-B counts the falling edges of the masked strobe. Once the registered
// enable falls, the mux passes the inequality monitor instead, so the mask
// stays open exactly until the received count equals the expected count, then
// closes right after the last falling edge, before the postamble glitch. The
// closing mask also resets both counters, which leaves the mask low and the
// circuit ready for the next READ.
//
// Interface: dfi_clk / reset_n / dfi_rddata_en from the DFI side, read_dqs
// from the pad, cnf_dsms_taps a static setting; masked_dqs is the clean
// strobe. mask, expected and actual are brought out for observation.
// Timing: the mask opens one dfi_clk edge plus taps*TAP_DELAY_PS after
// dfi_rddata_en rises, and closes in zero modelled delay after the last
// counted falling edge (only the PDL and the select buffers carry delay).
// Requirement: the first strobe falling edge must arrive while
// dfi_rddata_en_reg is high (tRDDATA_EN equal to the read latency), and the
// mask must open inside the preamble.
//
// The block structure and connections follow the published schematic. The
// Counter-B enable is driven by the mask here; the delay values are estimates.
//
// Tool warnings that stand, by design: Counter-B is clocked by the gated
// strobe, and both counters are reset asynchronously by combinational logic
// (internal_reset_n) that depends on the mask, which in turn depends on the
// counters. Synthesis therefore reports a loop mask -> internal_reset_n ->
// counter reset -> not_equal -> mask. It is the self-clearing mechanism of
// the circuit and settles in one pass: the reset drives both counts to 0,
// not_equal goes low and the mask stays low. dfi_rddata_en_reg is likewise
// used both as a synchronous enable (Counter-A) and in that asynchronous
// reset path.
`timescale 1ps/1ps
module dsms #(
  parameter int unsigned CNT_W        = dsms_pkg::CNT_W,
  parameter int unsigned TAP_W        = dsms_pkg::TAP_W,
  parameter int unsigned TAP_DELAY_PS = dsms_pkg::TAP_DELAY_PS,
  parameter int unsigned BUF_DELAY_PS = dsms_pkg::BUF_DELAY_PS
) (
  input  logic             dfi_clk,
  input  logic             reset_n,
  input  logic             dfi_rddata_en,
  input  logic             read_dqs,
  input  logic [TAP_W-1:0] cnf_dsms_taps,
  output logic             masked_dqs,
  output logic             mask,
  output logic [CNT_W-1:0] expected,
  output logic [CNT_W-1:0] actual
);
  logic dfi_rddata_en_reg;
  logic internal_reset_n;
  logic pdl_out;
  logic mux_sel;
  logic not_equal;

  // dfi_clk domain: input flop and Counter-A.
  dsms_cnt_a_dff #(.CNT_W(CNT_W)) u_cnt_a_dff (
    .dfi_clk           (dfi_clk),
    .reset_n           (reset_n),
    .dfi_rddata_en     (dfi_rddata_en),
    .internal_reset_n  (internal_reset_n),
    .dfi_rddata_en_reg (dfi_rddata_en_reg),
    .expected          (expected)
  );

  // Strobe domain: Counter-B and the inequality monitor.
  dsms_cnt_b_ineq #(.CNT_W(CNT_W)) u_cnt_b_ineq (
    .masked_dqs       (masked_dqs),
    .internal_reset_n (internal_reset_n),
    .enable           (mask),
    .total_neg_edges  (expected),
    .not_equal        (not_equal),
    .actual           (actual)
  );

  dsms_reset_logic u_rst (
    .reset_n          (reset_n),
    .en_reg           (dfi_rddata_en_reg),
    .mask             (mask),
    .internal_reset_n (internal_reset_n)
  );

  dsms_pdl #(.TAP_W(TAP_W), .TAP_DELAY_PS(TAP_DELAY_PS)) u_pdl (
    .pdl_in  (dfi_rddata_en_reg),
    .taps    (cnf_dsms_taps),
    .pdl_out (pdl_out)
  );

  dsms_sel_delay #(.BUF_DELAY_PS(BUF_DELAY_PS)) u_sel_dly (
    .a (dfi_rddata_en_reg),
    .y (mux_sel)
  );

  dsms_mask_mux u_mux (
    .i0 (not_equal),
    .i1 (pdl_out),
    .s  (mux_sel),
    .z  (mask)
  );

  dsms_mask_gate u_gate (
    .read_dqs   (read_dqs),
    .mask       (mask),
    .masked_dqs (masked_dqs)
  );
endmodule
