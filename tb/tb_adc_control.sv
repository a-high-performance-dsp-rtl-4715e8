// Testbench for adc_control: after a start strobe the ADC must be
// chip-selected and sampling (S/H low) for exactly five instruction cycles
// (20 clocks, 400 ns), with RD masked high during that time even for reads;
// then deselected and in hold. A read of port 5 selects the ADC with RD low.
module tb_adc_control;
  logic clk = 0, rst_n = 0, cyc_en;
  logic start = 0, read_sel = 0, rw = 0;
  logic adc_cs_n, adc_rd_n, adc_sh, sampling;
  int checks = 0, failures = 0;
  int phase = 0;

  adc_control dut (.clk, .rst_n, .cyc_en, .start, .read_sel, .rw, .adc_cs_n, .adc_rd_n, .adc_sh, .sampling);

  always #10 clk = ~clk;
  always @(posedge clk) phase <= (phase + 1) % 4;
  assign cyc_en = (phase == 3);

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

  task automatic conversion(input logic rw_during);
    int cs_clocks = 0;
    bit rd_seen = 0, sh_bad = 0;
    @(negedge clk);
    while (phase != 0) @(negedge clk);
    start = 1;
    rw = 0;
    repeat (2) @(negedge clk);
    start = 0;
    rw = rw_during;   // DSP bus activity during the sample phase
    // CS was asserted from the strobe on; count clocks after the strobe
    while (adc_cs_n == 0 && cs_clocks < 100) begin
      if (!adc_rd_n) rd_seen = 1;
      if (adc_sh) sh_bad = 1;
      @(negedge clk);
      cs_clocks++;
    end
    // the strobe ended 2 clocks into cycle 0; the count holds 5 until the
    // edge ending that cycle, then counts 5 edges -> 20 - 2 clocks remain
    chk(cs_clocks == 18, $sformatf("CS held %0d clocks after strobe, expected 18", cs_clocks));
    chk(!rd_seen, "RD not masked while sampling");
    chk(!sh_bad, "S/H in hold while sampling");
    chk(adc_sh == 1 && sampling == 0, "hold after sampling");
    chk(adc_rd_n == !rw_during, "RD follows R/W after sampling");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(adc_cs_n && adc_sh && !sampling, "idle after reset");
    conversion(1'b1);
    conversion(1'b0);
    // result read
    @(negedge clk);
    read_sel = 1; rw = 1;
    #1;
    chk(adc_cs_n == 0 && adc_rd_n == 0, "read of port 5 selects ADC with RD");
    @(negedge clk);
    read_sel = 0;
    #1;
    chk(adc_cs_n == 1, "deselected after read");
    // a further conversion after the read
    conversion(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
