// Testbench for digital_io: the input latches follow their pins, hold while
// their port is read, and the output register keeps the last word written.
module tb_digital_io;
  logic clk = 0, rst_n = 0;
  logic [15:0] din_pins = '0, pos_pins = '0, wdata = '0;
  logic din_rd = 0, pos_rd = 0, out_we = 0;
  logic [15:0] din_word, pos_word, dout;
  int checks = 0, failures = 0;

  digital_io dut (.clk, .rst_n, .din_pins, .pos_pins, .din_rd, .pos_rd, .out_we, .wdata,
                  .din_word, .pos_word, .dout);

  always #10 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    logic [15:0] held_d, held_p, last_out;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(dout == 0, "output reset to 0");
    last_out = 0;
    for (int i = 0; i < 50; i++) begin
      din_pins = 16'($urandom);
      pos_pins = 16'($urandom);
      @(negedge clk);
      chk(din_word == din_pins && pos_word == pos_pins, "latches follow pins");
      // hold during a read
      held_d = din_word; held_p = pos_word;
      din_rd = 1; pos_rd = (i % 2 == 0);
      din_pins = ~din_pins; pos_pins = ~pos_pins;
      @(negedge clk);
      chk(din_word == held_d, "digital input held during read");
      chk(pos_rd ? (pos_word == held_p) : (pos_word == pos_pins), "position latch during read");
      din_rd = 0; pos_rd = 0;
      // output write
      wdata = 16'($urandom);
      out_we = (i % 3 != 0);
      if (out_we) last_out = wdata;
      @(negedge clk);
      out_we = 0;
      chk(dout == last_out, "output register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
