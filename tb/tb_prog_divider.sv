// Testbench for prog_divider: for load values from the divider tables the
// distance between output ticks must be LOAD+1 periods of the 25 MHz enable
// (divisor = load + 1), i.e. a count duration of (LOAD+1) * 40 ns.
module tb_prog_divider;
  logic clk = 0, rst_n = 0;
  logic ce = 0, load_we = 0;
  logic [15:0] load_val = '0;
  logic tick;
  int checks = 0, failures = 0;

  prog_divider dut (.clk, .rst_n, .ce, .load_we, .load_val, .tick);

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n) ce <= ~ce;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int unsigned load);
    int t_prev, n, ce_cnt;
    @(negedge clk);
    load_val = 16'(load);
    load_we  = 1;
    @(negedge clk);
    load_we  = 0;
    // let the old count run out, then synchronise to a tick
    n = 0;
    while (n < 2) begin
      @(posedge clk);
      if (tick) n++;
    end
    for (int p = 0; p < 4; p++) begin
      ce_cnt = 0;
      do begin
        @(posedge clk);
        if (ce) ce_cnt++;
      end while (!tick);
      checks++;
      if (ce_cnt != int'(load) + 1) begin
        failures++;
        $display("FAIL load %0d: %0d ce between ticks, expected %0d", load, ce_cnt, load + 1);
      end
    end
    // count duration in ns, against T = (LOAD+1) / 25 MHz
    t_prev = int'($time);
    do @(posedge clk); while (!tick);
    checks++;
    if (int'($time) - t_prev != (int'(load) + 1) * 40) begin
      failures++;
      $display("FAIL load %0d: tick period %0d ns", load, int'($time) - t_prev);
    end
  endtask

  initial begin
    int unsigned loads [] = '{1, 2, 3, 4, 9, 14, 19, 24, 249, 2499};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (loads[i]) measure(loads[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
