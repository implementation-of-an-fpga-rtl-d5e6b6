// tb_clk_div2_en: checks that the enable is high on exactly every second
// clock, starting with the first clock after reset, and restarts on reset.
module tb_clk_div2_en;
  logic clk = 0, rst_n = 0, ce;
  int checks = 0, failures = 0;

  clk_div2_en dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 50; i++) begin
        checks++;
        if (ce !== (i % 2 == 0)) begin failures++; $display("FAIL cycle %0d ce=%0b", i, ce); end
        @(negedge clk);
      end
      rst_n = 0; @(negedge clk); rst_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
