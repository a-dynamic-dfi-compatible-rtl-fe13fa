// Self-checking testbench for dsms_cnt_a_dff: enable pulses of 1 to 12 cycles
// with random gaps. Checks that dfi_rddata_en_reg is dfi_rddata_en delayed by
// exactly one dfi_clk edge, that expected counts one per cycle of
// dfi_rddata_en_reg and holds n mod 8 after it falls, and that
// internal_reset_n clears the count while reset_n clears the flop.
`timescale 1ps/1ps
module tb_dsms_cnt_a_dff;
  logic dfi_clk = 1'b0, reset_n = 1'b1, dfi_rddata_en = 1'b0, internal_reset_n = 1'b1;
  logic dfi_rddata_en_reg;
  logic [2:0] expected;
  int checks = 0, failures = 0;
  logic prev_en = 1'b0;
  int model_cnt = 0;

  dsms_cnt_a_dff dut (.dfi_clk, .reset_n, .dfi_rddata_en, .internal_reset_n,
                      .dfi_rddata_en_reg, .expected);

  always #938 dfi_clk = ~dfi_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: the flop output is the enable from the previous edge; the
  // counter adds one on every edge where the flop output was high.
  always @(posedge dfi_clk) begin
    if (reset_n && internal_reset_n && dfi_rddata_en_reg) model_cnt = (model_cnt + 1) % 8;
    prev_en = dfi_rddata_en;
  end

  always @(negedge dfi_clk) begin
    if (reset_n && $time > 5000) begin
      check(dfi_rddata_en_reg == prev_en, "dfi_rddata_en_reg is dfi_rddata_en one edge later");
      check(int'(expected) == model_cnt, "expected count");
    end
  end

  initial begin
    #100 reset_n = 1'b0;
    internal_reset_n = 1'b0;
    #3000;
    check(dfi_rddata_en_reg == 1'b0 && expected == 3'd0, "cleared by reset");
    @(negedge dfi_clk);
    reset_n = 1'b1;
    for (int n = 1; n <= 12; n++) begin
      @(negedge dfi_clk);
      internal_reset_n = 1'b1;
      dfi_rddata_en = 1'b1;
      repeat (n) @(negedge dfi_clk);
      dfi_rddata_en = 1'b0;
      @(negedge dfi_clk);
      check(int'(expected) == n % 8, $sformatf("burst of %0d counted", n));
      repeat ($urandom_range(1, 3)) @(negedge dfi_clk);
      check(int'(expected) == n % 8, "count held after enable fell");
      #100 internal_reset_n = 1'b0;
      model_cnt = 0;
      #10 check(expected == 3'd0, "cleared by internal_reset_n");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
