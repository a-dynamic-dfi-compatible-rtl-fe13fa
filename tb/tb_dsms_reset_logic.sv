// Self-checking testbench for dsms_reset_logic: all 8 input combinations
// against internal_reset_n = reset_n & (en_reg | mask).
`timescale 1ps/1ps
module tb_dsms_reset_logic;
  logic reset_n, en_reg, mask, internal_reset_n;
  int checks = 0, failures = 0;

  dsms_reset_logic dut (.reset_n, .en_reg, .mask, .internal_reset_n);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {reset_n, en_reg, mask} = 3'(v);
      #10;
      checks++;
      if (internal_reset_n !== (reset_n && (en_reg || mask))) begin
        failures++;
        $display("FAIL reset_n=%0b en_reg=%0b mask=%0b -> %0b", reset_n, en_reg, mask,
                 internal_reset_n);
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
