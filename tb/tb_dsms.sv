// End-to-end self-checking testbench for the dsms top, at its default
// parameters (3-bit counters, 64-tap delay line, 80 ps per tap).
//
// The testbench plays the memory controller and the SDRAM. For each READ it
// holds dfi_rddata_en high for n dfi_clk cycles and generates a DQS-like
// strobe on read_dqs: a narrow glitch where the preamble starts, a low
// preamble of one clock period, n pulses of half a period, a half-period
// postamble and a second narrow glitch. The strobe starts f ps after
// dfi_rddata_en_reg rises (time of flight). It then checks, independently of
// the RTL:
//   * exactly n pulses reach masked_dqs, each a full half period wide, and
//     neither glitch passes;
//   * the mask rises max(taps, 1) * 80 ps after dfi_rddata_en_reg, inside the
//     preamble;
//   * the mask falls at or after the last strobe falling edge and less than
//     half a clock period later (the shut-off requirement);
//   * Counter-A holds n mod 8 when dfi_rddata_en_reg falls, and both counters
//     are back at 0 after the READ.
// Runs cover 533 MHz (tCK 1876 ps) and 200 MHz (tCK 5000 ps), bursts of 4
// and 10 pulses as in the published examples, 10-pulse bursts with a
// preamble shorter than one clock (as in the layout-level test), bursts
// longer than the 3-bit counters, READs two cycles apart and random READs.
// Each mechanism of the design is counted and a mechanism that never occurs
// counts as a failure.
`timescale 1ps/1ps
module tb_dsms;
  logic       dfi_clk       = 1'b0;
  logic       reset_n       = 1'b1;
  logic       dfi_rddata_en = 1'b0;
  logic       read_dqs      = 1'b0;
  logic [5:0] cnf_dsms_taps = 6'd8;
  logic       masked_dqs, mask;
  logic [2:0] expected, actual;

  int checks = 0, failures = 0;
  int tck = 1876;
  int masked_rises = 0;

  // Mechanism counters.
  int n_pre_glitch_blocked  = 0;  // preamble glitch arrived with the mask low
  int n_post_glitch_blocked = 0;  // postamble glitch arrived with the mask low
  int n_transient_match     = 0;  // counts equal while dfi_rddata_en_reg high, mask held
  int n_select_race         = 0;  // counts equal at the edge where the select switches
  int n_counter_wrap        = 0;  // burst longer than the counters' range
  int n_back_to_back        = 0;  // READ issued two cycles after the previous one
  int n_mask_closed         = 0;  // mask closed by the inequality monitor
  int n_read_533            = 0;
  int n_read_200            = 0;
  int n_single_pulse        = 0;  // one-pulse READ: every edge arrives after dfi_rddata_en_reg fell
  int n_short_preamble      = 0;  // preamble shorter than one clock, as in the layout-level test

  dsms dut (
    .dfi_clk, .reset_n, .dfi_rddata_en, .read_dqs, .cnf_dsms_taps,
    .masked_dqs, .mask, .expected, .actual
  );

  always begin
    #(tck / 2) dfi_clk = 1'b1;
    #(tck - tck / 2) dfi_clk = 1'b0;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Every pulse that passes must keep the full strobe high time.
  realtime t_mrise;
  always @(posedge masked_dqs) begin
    masked_rises++;
    t_mrise = $realtime;
  end
  always @(negedge masked_dqs)
    if (masked_rises > 0) check(($realtime - t_mrise) == realtime'(tck / 2), "masked pulse width");

  // Counter-A value when the registered enable falls, and the Fig.-3 style
  // hazard: at that dfi_clk edge the counts match before Counter-A's last
  // increment, so an unprotected select would glitch the mask.
  always @(posedge dfi_clk) begin
    if (dut.dfi_rddata_en_reg && !dfi_rddata_en && reset_n) begin
      if (expected == actual) n_select_race++;
    end
  end

  always @(negedge masked_dqs) begin
    #1;
    if (dut.dfi_rddata_en_reg && mask && expected == actual) n_transient_match++;
  end

  // Times of the last mask edges, recorded for the strobe checker.
  realtime t_mask_rise = 0, t_mask_fall = 0;
  always @(posedge mask) t_mask_rise = $realtime;
  always @(negedge mask) t_mask_fall = $realtime;

  // Counter-A must hold n mod 8 when the registered enable falls.
  int cur_n = 0;
  always @(negedge dut.dfi_rddata_en_reg) begin
    automatic int n_at_fall = cur_n;
    #1;
    if (reset_n) check(int'(expected) == n_at_fall % 8, "expected count at enable fall");
  end

  typedef struct {
    int n;
    int f;
    int taps;
    int pre;
  } read_t;
  read_t reads_q[$];

  // Strobe generator and checker: one READ at a time, started by do_read.
  task automatic dqs_and_check(input read_t rd);
    realtime t_en, t_last, exp_mr;
    int      r0;
    int      t = tck;
    @(posedge dfi_clk);
    t_en = $realtime;
    cur_n = rd.n;
    r0 = masked_rises;
    exp_mr = t_en + realtime'((rd.taps > 1 ? rd.taps : 1) * 80);
    // Preamble start: glitch while the line leaves high-Z.
    #(rd.f);
    check(mask == 1'b0, "mask low at preamble glitch");
    if (mask == 1'b0) n_pre_glitch_blocked++;
    read_dqs = 1'b1;
    #150 read_dqs = 1'b0;
    #(rd.pre - 150);
    check(mask == 1'b1, "mask open before the first strobe edge");
    for (int i = 0; i < rd.n; i++) begin
      read_dqs = 1'b1;
      #(t / 2) read_dqs = 1'b0;
      t_last = $realtime;
      #(t - t / 2);
    end
    // End of the postamble: glitch while the line returns to high-Z.
    check(mask == 1'b0, "mask low at postamble glitch");
    if (mask == 1'b0) n_post_glitch_blocked++;
    read_dqs = 1'b1;
    #150 read_dqs = 1'b0;
    #10;
    check(masked_rises - r0 == rd.n,
          $sformatf("%0d pulses passed, expected %0d", masked_rises - r0, rd.n));
    check(t_mask_rise == exp_mr, $sformatf("mask rise at %0t, expected %0t", t_mask_rise, exp_mr));
    check(t_mask_rise > t_en + rd.f + 150 && t_mask_rise < t_en + rd.f + rd.pre,
          "mask rises inside the preamble");
    check(t_mask_fall >= t_last, "mask not closed before the last falling edge");
    check(t_mask_fall - t_last < realtime'(t) / 2.0, "mask shut-off within half a clock period");
    if (t_mask_fall >= t_last && t_mask_fall - t_last < realtime'(t) / 2.0) n_mask_closed++;
    check(expected == 3'd0 && actual == 3'd0, "counters reset after the READ");
    check(dut.internal_reset_n == 1'b0, "counters held in reset when idle");
  endtask

  initial begin
    forever begin
      wait (reads_q.size() > 0);
      dqs_and_check(reads_q.pop_front());
    end
  end

  // pre is the preamble length in ps; 0 means one clock period.
  task automatic do_read(input int n, input int f, input int taps, input int gap,
                         input int pre = 0);
    cnf_dsms_taps = 6'(taps);
    @(posedge dfi_clk);
    #(tck / 8) dfi_rddata_en = 1'b1;
    reads_q.push_back('{n: n, f: f, taps: taps, pre: (pre == 0 ? tck : pre)});
    if (pre != 0) n_short_preamble++;
    repeat (n) @(posedge dfi_clk);
    #(tck / 8) dfi_rddata_en = 1'b0;
    repeat (gap - 1) @(posedge dfi_clk);
    if (n > 7) n_counter_wrap++;
    if (n == 1) n_single_pulse++;
    if (tck == 1876) n_read_533++;
    if (tck == 5000) n_read_200++;
  endtask

  task automatic settle();
    repeat (4) @(posedge dfi_clk);
  endtask

  initial begin
    #100 reset_n = 1'b0;
    repeat (3) @(posedge dfi_clk);
    #10 reset_n = 1'b1;
    check(mask == 1'b0 && expected == 3'd0 && actual == 3'd0, "idle after reset");
    settle();

    // 533 MHz: the 4-pulse example with 8 taps, then the 10-pulse burst.
    tck = 1876;
    settle();
    do_read(4, 300, 8, 4);
    settle();
    do_read(10, 300, 8, 4);
    settle();
    for (int n = 1; n <= 12; n++) begin
      do_read(n, 250, 6 + n, 4);
    end
    settle();
    // Back-to-back READs two cycles apart.
    do_read(4, 300, 8, 2);
    n_back_to_back++;
    do_read(4, 300, 8, 2);
    n_back_to_back++;
    do_read(10, 300, 8, 4);
    settle();
    // Half-period preamble: the mask still has to open between the glitch
    // and the first strobe edge.
    do_read(10, 300, 8, 4, 938);
    do_read(10, 200, 5, 4, 700);
    settle();

    // 200 MHz: the 10-pulse burst, and other tap settings.
    tck = 5000;
    settle();
    do_read(10, 800, 30, 4);
    do_read(4, 800, 50, 4);
    do_read(10, 1000, 20, 2);
    n_back_to_back++;
    do_read(10, 1000, 20, 4);
    do_read(10, 800, 25, 4, 2500);
    settle();

    // Random READs at 533 MHz: burst length, flight time and taps vary.
    tck = 1876;
    settle();
    for (int k = 0; k < 40; k++) begin
      automatic int n    = $urandom_range(1, 16);
      automatic int f    = $urandom_range(100, 500);
      automatic int lo   = (f + 150) / 80 + 1;
      automatic int hi   = (f + tck - 1) / 80 < (tck - 1) / 80 ? (f + tck - 1) / 80 : (tck - 1) / 80;
      automatic int taps = $urandom_range(lo, hi);
      automatic int gap  = $urandom_range(2, 4);
      do_read(n, f, taps, gap);
      if (gap == 2) n_back_to_back++;
    end
    settle();
    settle();

    check(n_pre_glitch_blocked > 0,  "mechanism: preamble glitch blocked");
    check(n_post_glitch_blocked > 0, "mechanism: postamble glitch blocked");
    check(n_transient_match > 0,     "mechanism: transient count match while enable high");
    check(n_select_race > 0,         "mechanism: counts equal at the select switch");
    check(n_counter_wrap > 0,        "mechanism: counter wrap-around");
    check(n_back_to_back > 0,        "mechanism: back-to-back READs");
    check(n_mask_closed > 0,         "mechanism: mask closed by inequality monitor");
    check(n_read_533 > 0,            "mechanism: 533 MHz operation");
    check(n_read_200 > 0,            "mechanism: 200 MHz operation");
    check(n_single_pulse > 0,        "mechanism: single-pulse READ");
    check(n_short_preamble > 0,      "mechanism: preamble shorter than one clock");
    $display("mechanisms: pre_glitch=%0d post_glitch=%0d transient_match=%0d select_race=%0d wrap=%0d back_to_back=%0d closed=%0d r533=%0d r200=%0d single=%0d short_pre=%0d",
             n_pre_glitch_blocked, n_post_glitch_blocked, n_transient_match, n_select_race,
             n_counter_wrap, n_back_to_back, n_mask_closed, n_read_533, n_read_200, n_single_pulse, n_short_preamble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
