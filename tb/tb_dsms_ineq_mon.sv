// Self-checking testbench for dsms_ineq_mon: all 64 pairs of 3-bit counts.
`timescale 1ps/1ps
module tb_dsms_ineq_mon;
  logic [2:0] expected, actual;
  logic not_equal;
  int checks = 0, failures = 0;

  dsms_ineq_mon dut (.expected, .actual, .not_equal);

  initial begin
    for (int e = 0; e < 8; e++) begin
      for (int a = 0; a < 8; a++) begin
        expected = 3'(e);
        actual   = 3'(a);
        #10;
        checks++;
        if (not_equal !== (e != a)) begin
          failures++;
          $display("FAIL expected=%0d actual=%0d not_equal=%0b", e, a, not_equal);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
