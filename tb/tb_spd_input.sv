// Testbench for spd_input. A quadrature encoder model makes A and B with a
// quarter period of Q clocks (A leads B for positive direction, B leads A for
// negative) and an index pulse. Checks: the speed register holds the
// rise-to-rise time of A in divider units, 4Q*20 ns / ((LOAD+1)*40 ns), within
// one count; the position counts falls of A from the last index and clears
// on the index for either jumper polarity; the direction bit is 0 when A
// leads and 1 when B leads.
module tb_spd_input;
  logic clk = 0, rst_n = 0, ce25;
  logic div_we = 0;
  logic [15:0] wdata = '0;
  logic enc_a = 0, enc_b = 0, enc_i = 0, index_active_high = 1;
  logic [15:0] speed_time;
  logic [11:0] position;
  logic direction;
  int checks = 0, failures = 0;
  int speed_latches = 0;

  clk_div2 u_div2 (.clk, .rst_n, .clk25(), .ce25);
  spd_input dut (.clk, .rst_n, .ce25, .div_we, .wdata, .enc_a, .enc_b, .enc_i,
                 .index_active_high, .speed_time, .position, .direction);

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic set_div(input logic [15:0] v);
    @(negedge clk);
    wdata = v; div_we = 1;
    @(negedge clk);
    div_we = 0;
  endtask

  // One full encoder period; positive: A rises, B rises, A falls, B falls.
  task automatic period(input int q, input bit positive);
    if (positive) begin
      enc_a = 1; repeat (q) @(negedge clk);
      enc_b = 1; repeat (q) @(negedge clk);
      enc_a = 0; repeat (q) @(negedge clk);
      enc_b = 0; repeat (q) @(negedge clk);
    end else begin
      enc_b = 1; repeat (q) @(negedge clk);
      enc_a = 1; repeat (q) @(negedge clk);
      enc_b = 0; repeat (q) @(negedge clk);
      enc_a = 0; repeat (q) @(negedge clk);
    end
  endtask

  task automatic index_pulse(input int len);
    enc_i = index_active_high;
    repeat (len) @(negedge clk);
    enc_i = !index_active_high;
    repeat (6) @(negedge clk);
  endtask

  task automatic run_speed(input int q, input logic [15:0] load, input bit positive);
    int expected, diff;
    logic [15:0] prev_val;
    set_div(load);
    repeat (2) period(q, positive);   // flush the old measurement
    prev_val = speed_time;
    repeat (4) period(q, positive);
    repeat (6) @(negedge clk);
    expected = (4 * q * 20) / ((int'(load) + 1) * 40);
    diff = int'(speed_time) - expected;
    chk(diff >= -1 && diff <= 1,
        $sformatf("speed time %0d, expected %0d (q=%0d load=%0d)", speed_time, expected, q, load));
    chk(direction == !positive, $sformatf("direction %0b for positive=%0b", direction, positive));
    if (speed_time != 0) speed_latches++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(position == 0 && speed_time == 0, "reset values");
    // speed at three time units
    run_speed(50, 16'd1, 1);     // 80 ns units, 4 us period -> 50
    run_speed(30, 16'd4, 0);     // 200 ns units, 2.4 us period -> 12
    run_speed(250, 16'd24, 1);   // 1 us units, 20 us period -> 20
    // position: index clears, then count falls of A
    index_pulse(10);
    chk(position == 0, "position cleared by active-high index");
    repeat (37) period(20, 1);
    repeat (6) @(negedge clk);
    chk(position == 37, $sformatf("position %0d after 37 falls, expected 37", position));
    repeat (3) period(20, 0);
    repeat (6) @(negedge clk);
    chk(position == 40, $sformatf("position %0d, expected 40 (counter counts up in either direction)", position));
    chk(direction == 1, "direction negative");
    // wrap of the 12-bit counter
    index_pulse(4);
    repeat (4097) period(3, 1);
    repeat (6) @(negedge clk);
    chk(position == 1, $sformatf("position %0d after 4097 falls, expected 1", position));
    // other index polarity
    // (raising I while the jumper still says active-high is one last index)
    enc_i = 1;
    repeat (6) @(negedge clk);
    index_active_high = 0;
    repeat (2) @(negedge clk);
    chk(position == 0, "index seen before the polarity change");
    repeat (5) period(20, 1);
    repeat (6) @(negedge clk);
    chk(position == 5, $sformatf("position %0d, expected 5", position));
    index_pulse(10);
    chk(position == 0, "position cleared by active-low index");
    chk(speed_latches == 3, "speed register latched in each speed run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
