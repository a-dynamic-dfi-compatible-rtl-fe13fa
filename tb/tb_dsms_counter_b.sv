// Self-checking testbench for dsms_counter_b: drives strobe pulses of random
// width, random enable and occasional asynchronous resets. Checks that only
// falling edges with enable high advance the count (modulo 8), that rising
// edges do not, and that reset clears it at once.
`timescale 1ps/1ps
module tb_dsms_counter_b;
  logic dqs = 1'b0, internal_reset_n = 1'b1, enable = 1'b1;
  logic [2:0] actual;
  int checks = 0, failures = 0;
  int model;

  dsms_counter_b dut (.dqs, .internal_reset_n, .enable, .actual);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100 internal_reset_n = 1'b0;
    #400;
    check(int'(actual), 0, "count in reset");
    internal_reset_n = 1'b1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      enable = (i < 20) ? 1'b1 : 1'($urandom);
      #(100 + $urandom_range(0, 400));
      dqs = 1'b1;
      #50 check(int'(actual), model, "no count on rising edge");
      #(100 + $urandom_range(0, 400));
      dqs = 1'b0;
      if (enable) model = (model + 1) % 8;
      #50 check(int'(actual), model, "count on falling edge");
      if (i % 29 == 28) begin
        internal_reset_n = 1'b0;
        #10 check(int'(actual), 0, "async clear");
        #50 internal_reset_n = 1'b1;
        model = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
