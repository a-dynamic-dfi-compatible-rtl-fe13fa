// Self-checking testbench for dsms_mask_mux: all 8 input combinations; s=1
// must pass i1 (delay-line output), s=0 must pass i0 (inequality monitor).
`timescale 1ps/1ps
module tb_dsms_mask_mux;
  logic i0, i1, s, z;
  int checks = 0, failures = 0;

  dsms_mask_mux dut (.i0, .i1, .s, .z);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, i1, i0} = 3'(v);
      #10;
      checks++;
      if (z !== (s ? i1 : i0)) begin
        failures++;
        $display("FAIL s=%0b i1=%0b i0=%0b z=%0b", s, i1, i0, z);
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
