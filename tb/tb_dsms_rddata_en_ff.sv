// Self-checking testbench for dsms_rddata_en_ff: drives random data and
// asynchronous resets and checks that q is the previous cycle's d, and 0
// right after reset.
`timescale 1ps/1ps
module tb_dsms_rddata_en_ff;
  logic dfi_clk = 1'b0, reset_n = 1'b1, d = 1'b0, q;
  int checks = 0, failures = 0;
  logic model_q;

  dsms_rddata_en_ff dut (.dfi_clk, .reset_n, .d, .q);

  always #1000 dfi_clk = ~dfi_clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100 reset_n = 1'b0;
    #3400;
    check(q, 1'b0, "q in reset");
    reset_n = 1'b1;
    model_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge dfi_clk);
      check(q, model_q, "q after edge");
      d = 1'($urandom);
      if (i % 37 == 36) begin
        #100 reset_n = 1'b0;
        #10  check(q, 1'b0, "async reset");
        #100 reset_n = 1'b1;
        model_q = 1'b0;
      end
      @(posedge dfi_clk);
      model_q = d;
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
