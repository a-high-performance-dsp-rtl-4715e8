// Testbench for pwm_output. With divider load L the sawtooth PCNT steps every
// 2(L+1) clocks and its period is 256 * 2(L+1) clocks (Eq. f = 25 MHz /
// (256 (L+1))). Each channel must be high for DATA * 2(L+1) clocks of every
// period, starting at PCNT = 0. Channel pairs are written from one word (odd
// channel in the high byte).
module tb_pwm_output;
  logic clk = 0, rst_n = 0, ce25;
  logic div_we = 0;
  logic [3:0] pair_we = '0;
  logic [15:0] wdata = '0;
  logic [7:0] pcnt, pwm;
  int checks = 0, failures = 0;

  clk_div2 u_div2 (.clk, .rst_n, .clk25(), .ce25);
  pwm_output dut (.clk, .rst_n, .ce25, .div_we, .pair_we, .wdata, .pcnt, .pwm);

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

  task automatic wr(input int port_kind, input logic [15:0] v);
    @(negedge clk);
    wdata = v;
    if (port_kind < 0) div_we = 1; else pair_we[port_kind] = 1;
    @(negedge clk);
    div_we = 0; pair_we = '0;
  endtask

  task automatic measure(input int load, input logic [7:0] duty [8]);
    int high [8];
    int clocks = 0;
    bit left;
    // start of a period: PCNT goes from 255 to 0
    while (pcnt != 8'd255) @(negedge clk);
    while (pcnt != 8'd0) @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      high[c] = 0;
      chk(pwm[c] == (duty[c] != 0), $sformatf("ch%0d level at period start", c));
    end
    left = 0;
    do begin
      for (int c = 0; c < 8; c++) if (pwm[c]) high[c]++;
      @(negedge clk);
      clocks++;
      if (pcnt != 8'd0) left = 1;
    end while (!(left && pcnt == 8'd0));
    chk(clocks == 256 * 2 * (load + 1), $sformatf("period %0d clocks at load %0d", clocks, load));
    for (int c = 0; c < 8; c++)
      chk(high[c] == int'(duty[c]) * 2 * (load + 1),
          $sformatf("ch%0d high %0d clocks, expected %0d", c, high[c], int'(duty[c]) * 2 * (load + 1)));
  endtask

  initial begin
    logic [7:0] d [8];
    repeat (5) @(posedge clk);
    rst_n = 1;
    // duty cycles 20/40/60/80 % as set by a pair write of 6633h and 0cd9ah
    wr(-1, 16'd1);
    wr(0, 16'h6633);
    wr(1, 16'hcd9a);
    wr(2, 16'h6633);
    wr(3, 16'hcd9a);
    d = '{8'h33, 8'h66, 8'h9a, 8'hcd, 8'h33, 8'h66, 8'h9a, 8'hcd};
    measure(1, d);
    // 0, 64, 128, 192, 255 and 1
    wr(0, 16'h4000);
    wr(1, 16'hc080);
    wr(2, 16'h01ff);
    wr(3, 16'h0000);
    d = '{8'h00, 8'h40, 8'h80, 8'hc0, 8'hff, 8'h01, 8'h00, 8'h00};
    measure(1, d);
    // a lower repetition rate (load 4, 19.5 kHz)
    wr(-1, 16'd4);
    measure(4, d);
    // 1.0 kHz and the lowest rate, 381 Hz
    wr(-1, 16'd97);
    measure(97, d);
    wr(-1, 16'd255);
    measure(255, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
