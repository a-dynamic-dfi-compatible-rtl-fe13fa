// Self-checking testbench for dsms_mask_gate: all 4 input combinations, and a
// check that a strobe pulse passes unchanged in width while the mask is high.
`timescale 1ps/1ps
module tb_dsms_mask_gate;
  logic read_dqs, mask, masked_dqs;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;

  dsms_mask_gate dut (.read_dqs, .mask, .masked_dqs);

  initial begin
    for (int v = 0; v < 4; v++) begin
      {mask, read_dqs} = 2'(v);
      #10;
      checks++;
      if (masked_dqs !== (read_dqs & mask)) begin
        failures++;
        $display("FAIL read_dqs=%0b mask=%0b masked_dqs=%0b", read_dqs, mask, masked_dqs);
      end
    end
    mask = 1'b1; read_dqs = 1'b0;
    #100 read_dqs = 1'b1;
    @(posedge masked_dqs) t_rise = $realtime;
    #(469) read_dqs = 1'b0;
    #1 t_fall = $realtime - 1;
    checks++;
    if (masked_dqs !== 1'b0 || (t_fall - t_rise) != 469) begin
      failures++;
      $display("FAIL pulse width %0t", t_fall - t_rise);
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
