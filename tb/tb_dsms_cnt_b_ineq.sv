// Self-checking testbench for dsms_cnt_b_ineq: for target counts 1 to 10 it
// presents total_neg_edges = target mod 8, sends strobe pulses and checks
// that not_equal stays high until the target-th falling edge and drops on
// it, that rising edges and disabled edges are not counted, and that
// internal_reset_n clears the count.
`timescale 1ps/1ps
module tb_dsms_cnt_b_ineq;
  logic masked_dqs = 1'b0, internal_reset_n = 1'b1, enable = 1'b1;
  logic [2:0] total_neg_edges = '0;
  logic not_equal;
  logic [2:0] actual;
  int checks = 0, failures = 0;

  dsms_cnt_b_ineq dut (.masked_dqs, .internal_reset_n, .enable, .total_neg_edges,
                       .not_equal, .actual);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100 internal_reset_n = 1'b0;
    #100 check(actual == 3'd0 && not_equal == 1'b0, "cleared and equal in reset");
    for (int target = 1; target <= 10; target++) begin
      total_neg_edges = 3'(target % 8);
      internal_reset_n = 1'b1;
      #10 if (target % 8 != 0) check(not_equal == 1'b1, "unequal before any edge");
      // One disabled pulse must not count.
      enable = 1'b0;
      #200 masked_dqs = 1'b1;
      #400 masked_dqs = 1'b0;
      #10 check(actual == 3'd0, "disabled edge ignored");
      enable = 1'b1;
      for (int i = 1; i <= target; i++) begin
        #200 masked_dqs = 1'b1;
        #10 check(int'(actual) == (i - 1) % 8, "rising edge not counted");
        #390 masked_dqs = 1'b0;
        #10;
        check(int'(actual) == i % 8, "falling edge counted");
        if (i < target && (i % 8) != (target % 8))
          check(not_equal == 1'b1, "still unequal");
      end
      check(not_equal == 1'b0, $sformatf("equal after %0d edges", target));
      #100 internal_reset_n = 1'b0;
      #10 check(actual == 3'd0, "cleared by internal_reset_n");
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
