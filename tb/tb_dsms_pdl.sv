// Self-checking testbench for the dsms_pdl delay-line model: for several tap
// settings (including 0, 8 and 63) it launches a pulse and measures the delay
// of the rising and falling output edges against taps * 80 ps.
`timescale 1ps/1ps
module tb_dsms_pdl;
  logic       pdl_in = 1'b0;
  logic [5:0] taps   = '0;
  logic       pdl_out;
  int checks = 0, failures = 0;
  realtime t0, t_rise, t_fall;
  int tap_list[6] = '{0, 1, 8, 17, 40, 63};

  dsms_pdl dut (.pdl_in, .taps, .pdl_out);

  task automatic check_delay(input realtime got, input realtime exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: delay %0t exp %0t (taps=%0d)", what, got, exp, taps);
    end
  endtask

  initial begin
    foreach (tap_list[k]) begin
      taps = 6'(tap_list[k]);
      #10_000;
      checks++;
      if (pdl_out !== 1'b0) begin
        failures++;
        $display("FAIL output not idle");
      end
      t0 = $realtime;
      pdl_in = 1'b1;
      if (taps != 0) @(posedge pdl_out);
      else #0;
      t_rise = $realtime;
      check_delay(t_rise - t0, realtime'(taps) * 80.0, "rise");
      #3000;
      t0 = $realtime;
      pdl_in = 1'b0;
      if (taps != 0) @(negedge pdl_out);
      else #0;
      t_fall = $realtime;
      check_delay(t_fall - t0, realtime'(taps) * 80.0, "fall");
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
