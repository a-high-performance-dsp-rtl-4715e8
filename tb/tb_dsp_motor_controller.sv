// End-to-end testbench of dsp_motor_controller at its default parameters.
//
// A bus model plays the DSP: CLKOUT1 runs at one period per 4 clocks (80 ns
// instruction cycle); each access starts after an instruction-cycle edge,
// holds the strobe, and ends at the first edge with READY high; the number of
// low READY samples is the access's wait-state count. A behavioural ADC, a
// UART register model and an encoder model drive the other pins. The test
// walks through what the controller software does: memory map switching,
// ADC conversions, PWM set-up, S/P/D reads, digital I/O and UART accesses,
// and counts each mechanism it saw.
module tb_dsp_motor_controller;
  import motor_ctrl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dsp_clkout1 = 0;
  logic [15:0] dsp_addr = '0, dsp_wdata = '0, dsp_rdata;
  logic dsp_ps_n = 1, dsp_ds_n = 1, dsp_is_n = 1, dsp_strb_n = 1, dsp_rw = 1, dsp_xf = 1;
  logic dsp_ready, dsp_int0_n, dsp_int1_n;
  logic uart_cs_n, uart_rd_n, uart_wr_n, uart_intr = 0;
  logic [2:0] uart_a;
  logic [7:0] uart_wdata, uart_rdata;
  logic [2:0] adc_asel;
  logic adc_cs_n, adc_rd_n, adc_sh, adc_intr_n;
  logic [9:0] adc_db, vin_code = '0;
  logic enc_a = 0, enc_b = 0, enc_i = 0, index_active_high = 1;
  logic [15:0] dig_in = '0, dig_pos = '0;
  logic [12:0] dig_out;
  logic [7:0] pwm;

  int checks = 0, failures = 0;
  int adc_conversions, adc_errors;

  // mechanism counters
  int n_ws [6];
  int n_map_switch = 0, n_alias = 0, n_rd_masked = 0, n_speed = 0, n_pos = 0, n_index = 0;
  int n_dir_pos = 0, n_dir_neg = 0, n_pwm = 0, n_uart_wr = 0, n_uart_rd = 0, n_int0 = 0, n_int1 = 0;

  dsp_motor_controller dut (.*);

  adc1061_model u_adc (
    .cs_n(adc_cs_n), .rd_n(adc_rd_n), .sh(adc_sh), .vin_code, .db(adc_db),
    .intr_n(adc_intr_n), .conversions(adc_conversions), .protocol_errors(adc_errors)
  );

  // UART register model: eight byte registers behind the chip's pins.
  logic [7:0] uart_regs [8];
  initial foreach (uart_regs[i]) uart_regs[i] = 8'h00;
  always @(posedge clk) if (!uart_cs_n && !uart_wr_n) uart_regs[uart_a] <= uart_wdata;
  assign uart_rdata = uart_regs[uart_a];

  always #10 clk = ~clk;

  // CLKOUT1: rises every 4th clock; the next clock edge is an instruction-cycle edge.
  int ph = 0;
  logic c1q = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    dsp_clkout1 <= (((ph + 1) % 4) < 2);
    c1q <= dsp_clkout1;
  end
  wire next_is_edge = dsp_clkout1 && !c1q;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  typedef enum int {SP_PROG, SP_DATA, SP_IO} space_e;

  task automatic bus(input space_e sp, input logic [15:0] a, input logic r, input logic [15:0] wd,
                     output logic [15:0] rd, output int ws);
    bit fin = 0;
    ws = 0;
    rd = '0;
    // start right after an instruction-cycle edge
    do @(negedge clk); while (!next_is_edge);
    @(negedge clk);
    dsp_addr = a; dsp_rw = r; dsp_wdata = wd; dsp_strb_n = 0;
    dsp_ps_n = (sp != SP_PROG); dsp_ds_n = (sp != SP_DATA); dsp_is_n = (sp != SP_IO);
    while (!fin) begin
      @(negedge clk);
      if (next_is_edge) begin
        if (dsp_ready) begin fin = 1; rd = dsp_rdata; end
        else ws++;
        if (ws > 10) fin = 1;
      end
    end
    @(negedge clk);
    dsp_strb_n = 1; dsp_ps_n = 1; dsp_ds_n = 1; dsp_is_n = 1; dsp_rw = 1;
    if (ws < 6) n_ws[ws]++;
  endtask

  task automatic rd_chk(input space_e sp, input logic [15:0] a, input logic [15:0] e, input int ews, input string m);
    logic [15:0] v;
    int ws;
    bus(sp, a, 1'b1, '0, v, ws);
    chk(v == e, $sformatf("%s: read %h expected %h", m, v, e));
    chk(ws == ews, $sformatf("%s: %0d wait-states, expected %0d", m, ws, ews));
  endtask

  task automatic wr_chk(input space_e sp, input logic [15:0] a, input logic [15:0] d, input int ews, input string m);
    logic [15:0] v;
    int ws;
    bus(sp, a, 1'b0, d, v, ws);
    chk(ws == ews, $sformatf("%s: %0d wait-states, expected %0d", m, ws, ews));
  endtask

  task automatic enc_period(input int q, input bit positive);
    if (positive) begin
      enc_a = 1; repeat (q) @(negedge clk); enc_b = 1; repeat (q) @(negedge clk);
      enc_a = 0; repeat (q) @(negedge clk); enc_b = 0; repeat (q) @(negedge clk);
    end else begin
      enc_b = 1; repeat (q) @(negedge clk); enc_a = 1; repeat (q) @(negedge clk);
      enc_b = 0; repeat (q) @(negedge clk); enc_a = 0; repeat (q) @(negedge clk);
    end
  endtask

  // ADC read masking: during the sample phase RD must stay high.
  always @(negedge clk) if (rst_n && !adc_cs_n && !adc_sh && dsp_rw && !dsp_strb_n) begin
    if (adc_rd_n) n_rd_masked++;
    else begin failures++; $display("FAIL ADC RD asserted while sampling"); end
  end

  task automatic adc_convert(input logic [2:0] ch, input logic [9:0] code);
    realtime t_fall, t_rise;
    int t = 0;
    logic [15:0] v;
    int ws;
    wr_chk(SP_IO, 16'(OPORT_DIGOUT), {13'h0a5a, ch}, 0, "select ADC channel");
    chk(adc_asel == ch && dig_out == 13'h0a5a, "ADC select and digital out");
    vin_code = code;
    fork
      begin
        wr_chk(SP_IO, 16'(OPORT_ADCSTART), 16'h1234, 0, "ADC start");
        // a read of another port while the ADC samples: its RD stays masked
        rd_chk(SP_IO, 16'(IPORT_DIGIN), dig_in, 0, "digital input during conversion");
      end
      begin
        @(negedge adc_cs_n); t_fall = $realtime;
        @(posedge adc_cs_n); t_rise = $realtime;
      end
    join
    // selected from the first clock of the start strobe (one clock after a
    // cycle edge) to the sixth cycle edge: start cycle + 5 cycles = 480 ns,
    // less that first clock
    chk(t_rise - t_fall == 460.0, $sformatf("ADC selected %0.1f ns, expected 460", t_rise - t_fall));
    while (dsp_int0_n && t < 200) begin @(negedge clk); t++; end
    chk(!dsp_int0_n, "ADC interrupt");
    if (!dsp_int0_n) n_int0++;
    rd_chk(SP_IO, 16'(IPORT_ADC), {6'b0, code}, WS_ADC, "ADC data");
    @(negedge clk);
    chk(dsp_int0_n, "ADC interrupt cleared by the read");
  endtask

  task automatic pwm_measure(input int ch, input int load, input int data);
    int hi = 0, per = 0;
    @(negedge clk);
    while (pwm[ch]) @(negedge clk);
    while (!pwm[ch]) @(negedge clk);
    while (pwm[ch]) begin hi++; per++; @(negedge clk); end
    while (!pwm[ch]) begin per++; @(negedge clk); end
    chk(hi == data * 2 * (load + 1), $sformatf("PWM%0d high %0d clocks, expected %0d", ch, hi, data * 2 * (load + 1)));
    chk(per == 256 * 2 * (load + 1), $sformatf("PWM%0d period %0d clocks", ch, per));
    n_pwm++;
  endtask

  initial begin
    logic [15:0] v, v2;
    int ws;
    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (8) @(negedge clk);

    // ---- memory, XF = 1: EPROM program, SRAM1 data ----
    rd_chk(SP_PROG, 16'h0000, 16'h0000, WS_EPROM, "EPROM vector");
    rd_chk(SP_PROG, 16'h8123, 16'h0000, WS_EPROM, "EPROM high address");
    wr_chk(SP_DATA, 16'h4000, 16'hbeef, 0, "SRAM1 write through upper copy");
    wr_chk(SP_DATA, 16'h0400, 16'h1357, 0, "SRAM1 write");
    rd_chk(SP_DATA, 16'h0400, 16'h1357, 0, "SRAM1 read");
    rd_chk(SP_DATA, 16'hc400, 16'h1357, 0, "SRAM1 alias C400h");
    n_alias++;
    // loader copies code to SRAM1 at 20h via the upper copy, then clears XF
    for (int i = 0; i < 8; i++) wr_chk(SP_DATA, 16'h4020 + 16'(i), 16'ha000 + 16'(i), 0, "load code");
    dsp_xf = 0; n_map_switch++;
    for (int i = 0; i < 8; i++) rd_chk(SP_PROG, 16'h0020 + 16'(i), 16'ha000 + 16'(i), 0, "fetch from SRAM1");
    rd_chk(SP_PROG, 16'h0000, 16'hbeef, 0, "SRAM1 vector after switch");
    wr_chk(SP_DATA, 16'h0400, 16'h2468, 0, "SRAM2 write");
    rd_chk(SP_DATA, 16'h8400, 16'h2468, 0, "SRAM2 alias 8400h");
    rd_chk(SP_PROG, 16'h0400, 16'h1357, 0, "SRAM1 kept its word");
    dsp_xf = 1; n_map_switch++;
    rd_chk(SP_DATA, 16'h0400, 16'h1357, 0, "SRAM1 data again");
    rd_chk(SP_PROG, 16'h0020, 16'h0000, WS_EPROM, "EPROM again");

    // ---- digital I/O ----
    dig_in = 16'h5aa5; dig_pos = 16'h00c3;
    repeat (2) @(negedge clk);
    rd_chk(SP_IO, 16'(IPORT_DIGIN), 16'h5aa5, 0, "digital input");
    rd_chk(SP_IO, 16'(IPORT_DIGPOS), 16'h00c3, 0, "digital position");
    rd_chk(SP_IO, 16'h0004, 16'h0000, 0, "unused port 4");

    // ---- ADC on four channels ----
    adc_convert(3'd0, 10'd17);
    adc_convert(3'd1, 10'd512);
    adc_convert(3'd2, 10'd1023);
    adc_convert(3'd3, 10'd300);
    chk(adc_conversions == 4, $sformatf("%0d ADC conversions", adc_conversions));
    chk(adc_errors == 0, "ADC read during sampling");

    // ---- PWM: load 1 (48.8 kHz), duties 20/40/60/80 % ----
    wr_chk(SP_IO, 16'(OPORT_PWMDIV), 16'd1, 0, "PWM divider");
    wr_chk(SP_IO, 16'(OPORT_PWM10), 16'h6633, 0, "PWM1,0");
    wr_chk(SP_IO, 16'(OPORT_PWM32), 16'hcd9a, 0, "PWM3,2");
    wr_chk(SP_IO, 16'(OPORT_PWM54), 16'h6633, 0, "PWM5,4");
    wr_chk(SP_IO, 16'(OPORT_PWM76), 16'hcd9a, 0, "PWM7,6");
    pwm_measure(0, 1, 'h33);
    pwm_measure(3, 1, 'hcd);
    pwm_measure(6, 1, 'h9a);
    // 19.5 kHz, the torque drive's rate
    wr_chk(SP_IO, 16'(OPORT_PWMDIV), 16'd4, 0, "PWM divider 19.5 kHz");
    pwm_measure(1, 4, 'h66);

    // ---- S/P/D: 80 ns units, index, 20 positive periods, then negative ----
    wr_chk(SP_IO, 16'(OPORT_SPDDIV), 16'd1, 0, "S/P/D divider");
    enc_i = 1; repeat (8) @(negedge clk); enc_i = 0; repeat (4) @(negedge clk);
    n_index++;
    rd_chk(SP_IO, 16'(IPORT_POSDIR), 16'h0000, 0, "position after index");
    repeat (20) enc_period(25, 1);
    repeat (6) @(negedge clk);
    // 100 clocks rise to rise, 4 clocks per unit: 25, within one count
    bus(SP_IO, 16'(IPORT_SPDTIME), 1'b1, '0, v, ws);
    chk(v >= 16'd24 && v <= 16'd26, $sformatf("speed time %0d, expected 25", v));
    n_speed++;
    rd_chk(SP_IO, 16'(IPORT_POSDIR), 16'd20, 0, "position 20, direction positive");
    n_pos += 20; n_dir_pos++;
    repeat (4) enc_period(50, 0);
    repeat (6) @(negedge clk);
    // software reads twice and compares
    bus(SP_IO, 16'(IPORT_SPDTIME), 1'b1, '0, v, ws);
    bus(SP_IO, 16'(IPORT_SPDTIME), 1'b1, '0, v2, ws);
    chk(v == v2 && v >= 16'd49 && v <= 16'd51, $sformatf("speed time %0d/%0d, expected 50", v, v2));
    n_speed++;
    rd_chk(SP_IO, 16'(IPORT_POSDIR), 16'h8000 | 16'd24, 0, "position 24, direction negative");
    n_pos += 4; n_dir_neg++;

    // ---- UART: five wait-states, data on D7..D0 ----
    wr_chk(SP_IO, 16'd15, 16'hff5a, WS_UART, "UART scratch write");
    n_uart_wr++;
    rd_chk(SP_IO, 16'd15, 16'h005a, WS_UART, "UART scratch read");
    n_uart_rd++;
    wr_chk(SP_IO, 16'd11, 16'h0083, WS_UART, "UART LCR write");
    rd_chk(SP_IO, 16'd11, 16'h0083, WS_UART, "UART LCR read");
    uart_intr = 1;
    @(negedge clk);
    chk(!dsp_int1_n, "UART interrupt to INT1");
    if (!dsp_int1_n) n_int1++;
    uart_intr = 0;

    // ---- every mechanism seen ----
    chk(n_ws[0] > 0, "zero-wait-state accesses");
    chk(n_ws[1] > 0, "one-wait-state accesses");
    chk(n_ws[2] > 0, "two-wait-state accesses");
    chk(n_ws[5] > 0, "five-wait-state accesses");
    chk(n_map_switch >= 2 && n_alias > 0, "memory map switch and aliasing");
    chk(n_rd_masked > 0, "ADC RD masked during sampling");
    chk(n_int0 == 4 && n_int1 == 1, "interrupts");
    chk(n_speed >= 2 && n_pos > 0 && n_index > 0 && n_dir_pos > 0 && n_dir_neg > 0, "S/P/D mechanisms");
    chk(n_pwm >= 4 && n_uart_wr > 0 && n_uart_rd > 0, "PWM and UART");
    $display("mechanisms: ws0=%0d ws1=%0d ws2=%0d ws5=%0d map_switch=%0d rd_masked=%0d adc=%0d pwm=%0d speed=%0d pos=%0d index=%0d dir+=%0d dir-=%0d uart=%0d/%0d int0=%0d int1=%0d",
             n_ws[0], n_ws[1], n_ws[2], n_ws[5], n_map_switch, n_rd_masked, adc_conversions, n_pwm,
             n_speed, n_pos, n_index, n_dir_pos, n_dir_neg, n_uart_wr, n_uart_rd, n_int0, n_int1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
