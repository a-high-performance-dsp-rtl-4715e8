// Testbench for clk_div2: the 25 MHz enable must be high on exactly every
// second 50 MHz clock after reset.
module tb_clk_div2;
  logic clk = 0, rst_n = 0;
  logic clk25, ce25;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk, .rst_n, .clk25, .ce25);

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs = 0;
    logic prev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    prev = ce25;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (ce25 == prev) begin
        failures++;
        $display("FAIL cycle %0d: ce25 did not alternate", i);
      end
      if (ce25) highs++;
      prev = ce25;
    end
    checks++;
    if (highs != 100) begin
      failures++;
      $display("FAIL: %0d enables in 200 clocks, expected 100", highs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
