// Self-checking testbench for dsms_counter_a: random enable pattern and
// occasional asynchronous resets; the count is compared every cycle with a
// modulo-8 reference counter kept in the testbench.
`timescale 1ps/1ps
module tb_dsms_counter_a;
  logic dfi_clk = 1'b0, internal_reset_n = 1'b1, en = 1'b0;
  logic [2:0] expected;
  int checks = 0, failures = 0;
  int model;

  dsms_counter_a dut (.dfi_clk, .internal_reset_n, .en, .expected);

  always #938 dfi_clk = ~dfi_clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100 internal_reset_n = 1'b0;
    #2400;
    check(int'(expected), 0, "count in reset");
    internal_reset_n = 1'b1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge dfi_clk);
      check(int'(expected), model, "count");
      en = (i < 20) ? 1'b1 : 1'($urandom);
      if (i % 41 == 40) begin
        #50 internal_reset_n = 1'b0;
        #10 check(int'(expected), 0, "async clear");
        #50 internal_reset_n = 1'b1;
        model = 0;
      end
      @(posedge dfi_clk);
      if (en) model = (model + 1) % 8;
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
