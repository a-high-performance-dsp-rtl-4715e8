// Testbench for read_data_mux: each memory select and each input port returns
// its own word (with the unused bits as 0), unused ports and writes return 0.
module tb_read_data_mux;
  logic rw, eprom_cs_n, sram1_cs_n, sram2_cs_n, uart_sel, direction;
  logic [7:0] iport, uart_data;
  logic [15:0] eprom_data, sram1_data, sram2_data, din_word, speed_time, pos_word, rdata;
  logic [11:0] position;
  logic [9:0] adc_data;
  int checks = 0, failures = 0;

  read_data_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    rw = 1; eprom_cs_n = 1; sram1_cs_n = 1; sram2_cs_n = 1; uart_sel = 0; iport = '0;
  endtask

  task automatic expect_val(input logic [15:0] e, input string m);
    #1;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %s: %h expected %h", m, rdata, e); end
  endtask

  initial begin
    for (int i = 0; i < 20; i++) begin
      eprom_data = 16'($urandom); sram1_data = 16'($urandom); sram2_data = 16'($urandom);
      din_word = 16'($urandom); speed_time = 16'($urandom); pos_word = 16'($urandom);
      position = 12'($urandom); direction = 1'($urandom); adc_data = 10'($urandom);
      uart_data = 8'($urandom);
      clear(); expect_val(16'h0, "nothing selected");
      clear(); eprom_cs_n = 0; expect_val(eprom_data, "EPROM");
      clear(); sram1_cs_n = 0; expect_val(sram1_data, "SRAM1");
      clear(); sram2_cs_n = 0; expect_val(sram2_data, "SRAM2");
      clear(); iport[0] = 1; expect_val(din_word, "port 0");
      clear(); iport[1] = 1; expect_val(speed_time, "port 1");
      clear(); iport[2] = 1; expect_val({direction, 3'b000, position}, "port 2");
      clear(); iport[3] = 1; expect_val(pos_word, "port 3");
      clear(); iport[4] = 1; expect_val(16'h0, "port 4");
      clear(); iport[5] = 1; expect_val({6'b0, adc_data}, "port 5");
      clear(); iport[6] = 1; expect_val(16'h0, "port 6");
      clear(); iport[7] = 1; expect_val(16'h0, "port 7");
      clear(); uart_sel = 1; expect_val({8'h00, uart_data}, "UART");
      clear(); sram1_cs_n = 0; rw = 0; expect_val(16'h0, "write cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
