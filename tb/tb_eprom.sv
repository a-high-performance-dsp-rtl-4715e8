// Testbench for eprom: the first words come from tb/tb_eprom_test.hex
// (1234, abcd, 0020, ffff, 8000), the rest of the array must read zero, and a
// deselected EPROM returns zero.
module tb_eprom;
  logic [15:0] addr;
  logic        cs_n;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  logic [15:0] exp_words [5] = '{16'h1234, 16'habcd, 16'h0020, 16'hffff, 16'h8000};

  eprom #(.INIT_FILE("tb/tb_eprom_test.hex")) dut (.addr, .cs_n, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input logic [15:0] a, input logic c, input logic [15:0] e);
    addr = a;
    cs_n = c;
    #1;
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL addr %h cs_n %0b: %h expected %h", a, c, rdata, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) expect_word(16'(i), 1'b0, exp_words[i]);
    for (int i = 0; i < 5; i++) expect_word(16'(i), 1'b1, 16'h0000);
    expect_word(16'h0005, 1'b0, 16'h0000);
    expect_word(16'hffff, 1'b0, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
