// Self-checking testbench for the dsms_sel_delay model: both edges of a pulse
// must come out 2 * 40 ps later, and a pulse is not lost.
`timescale 1ps/1ps
module tb_dsms_sel_delay;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;
  realtime t0;

  dsms_sel_delay dut (.a, .y);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000;
    for (int i = 0; i < 5; i++) begin
      t0 = $realtime;
      a = 1'b1;
      #79 check(y == 1'b0, "still low before 80 ps");
      #2  check(y == 1'b1, "high just after 80 ps");
      #(500 + 100 * i);
      t0 = $realtime;
      a = 1'b0;
      #79 check(y == 1'b1, "still high before 80 ps");
      #2  check(y == 1'b0, "low just after 80 ps");
      #300;
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
