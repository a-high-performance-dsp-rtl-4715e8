// Testbench for memory_select: all eight input combinations against the two
// mapping modes (XF = 1: EPROM program, SRAM1 data; XF = 0: SRAM1 program,
// SRAM2 data).
module tb_memory_select;
  logic xf, ps_n, ds_n;
  logic eprom_cs_n, sram1_cs_n, sram2_cs_n;
  int checks = 0, failures = 0;

  memory_select dut (.xf, .ps_n, .ds_n, .eprom_cs_n, .sram1_cs_n, .sram2_cs_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e, s1, s2;
    for (int k = 0; k < 8; k++) begin
      {xf, ps_n, ds_n} = 3'(k);
      #1;
      if (xf) begin e = ps_n; s1 = ds_n; s2 = 1'b1; end
      else    begin e = 1'b1; s1 = ps_n; s2 = ds_n; end
      checks++;
      if ({eprom_cs_n, sram1_cs_n, sram2_cs_n} !== {e, s1, s2}) begin
        failures++;
        $display("FAIL xf=%0b ps_n=%0b ds_n=%0b -> %b%b%b", xf, ps_n, ds_n, eprom_cs_n, sram1_cs_n, sram2_cs_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
