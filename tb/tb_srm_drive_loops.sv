// Workload testbench: the I/O side of the two drive algorithms run on the
// controller, a torque loop and the speed measurement of a speed loop, for a
// four-phase switched reluctance motor with an 8-bit absolute encoder.
//
// Motor model (testbench only): rotor position p, 256 counts per revolution,
// on the low byte of the digital position input; its least significant bit
// drives encoder line A (one A period = 2 counts = 2.8125 degrees). Each phase
// current is a first-order lag towards (PWM level) * IMAX with a 200 us time
// constant, and the analog multiplexer is modelled by presenting the current of
// the selected channel to the ADC. PWM0..3 drive phases A..D, ADC channels 0..3
// sense them.
//
// Torque loop, as the DSP software would run it, through the bus model:
// read position (port 3), look up the phase, select its ADC channel, start a
// conversion, wait for the interrupt, read the result, i_err = i_des - i_act,
// d = K1 * i_err + K2 limited to 0..255, write the duty to the active phase
// (0 to the others), poll the UART line status. PWM at 19.5 kHz (load 4).
// Checks: the loop's I/O time (bus accesses plus ADC conversion) stays below
// the 8 us the whole loop may take; the regulated current (mean of the last
// 50 samples) stays within 5 % of the command when the supply (IMAX) rises by
// 60 %; the active phase follows
// the rotor.
//
// Speed measurement: at +-500 and +-1000 rpm the software reads the
// rise-to-rise time twice (1 us units), turns it into rpm, takes the sign from
// the change of position, and must be within 4 % of the model's speed.
module tb_srm_drive_loops;
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
  logic [9:0] adc_db, vin_code;
  logic enc_a, enc_b = 0, enc_i = 0, index_active_high = 1;
  logic [15:0] dig_in = '0, dig_pos;
  logic [12:0] dig_out;
  logic [7:0] pwm;
  int adc_conversions, adc_errors;

  int checks = 0, failures = 0;

  dsp_motor_controller dut (.*);

  adc1061_model u_adc (
    .cs_n(adc_cs_n), .rd_n(adc_rd_n), .sh(adc_sh), .vin_code, .db(adc_db),
    .intr_n(adc_intr_n), .conversions(adc_conversions), .protocol_errors(adc_errors)
  );

  // UART: line status register reads "no data" (bit 0 clear).
  assign uart_rdata = 8'h60;

  always #10 clk = ~clk;

  int ph = 0;
  logic c1q = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    dsp_clkout1 <= (((ph + 1) % 4) < 2);
    c1q <= dsp_clkout1;
  end
  wire next_is_edge = dsp_clkout1 && !c1q;

  // ---- motor model ----
  real imax = 1000.0;
  real cur [4] = '{0.0, 0.0, 0.0, 0.0};
  localparam real ALPHA = 20.0e-9 / 200.0e-6;   // clock / time constant
  int  step_clks = 0;                           // 0: rotor stands still
  bit  forward = 1;
  logic [7:0] rotor = 8'd5;
  int  step_cnt = 0;

  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) cur[k] = cur[k] + ((pwm[k] ? imax : 0.0) - cur[k]) * ALPHA;
    if (step_clks > 0) begin
      step_cnt++;
      if (step_cnt >= step_clks) begin
        step_cnt = 0;
        rotor = forward ? rotor + 8'd1 : rotor - 8'd1;
      end
    end
  end
  assign dig_pos  = {8'h00, rotor};
  assign enc_a    = rotor[0];
  assign vin_code = (adc_asel < 4) ? 10'($rtoi(cur[adc_asel[1:0]] > 1023.0 ? 1023.0 : cur[adc_asel[1:0]])) : 10'd0;

  initial begin
    #60_000_000;
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
                     output logic [15:0] rd);
    bit fin = 0;
    int ws = 0;
    rd = '0;
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
  endtask

  task automatic io_out(input int port, input logic [15:0] v);
    logic [15:0] d;
    bus(SP_IO, 16'(port), 1'b0, v, d);
  endtask

  task automatic io_in(input int port, output logic [15:0] v);
    bus(SP_IO, 16'(port), 1'b1, '0, v);
  endtask

  // Phase look-up: 6 rotor poles, 4 phases -> 24 strokes per revolution.
  function automatic int phase_of(input logic [7:0] p);
    return ((int'(p) * 24) / 256) % 4;
  endfunction

  // Torque loop constants: K1 = 4, K2 = 0.4 * 256.
  localparam int K2 = 102;
  int last_phase = -1, phase_switches = 0, max_io_ns = 0;

  task automatic torque_loop(input int i_des, output int i_act, output int phase);
    logic [15:0] v;
    int err, d, t0, t = 0;
    logic [15:0] w10, w32;
    t0 = int'($time);
    io_in(IPORT_DIGPOS, v);                         // 1. position
    phase = phase_of(v[7:0]);                       // 2. phase to fire
    chk(phase == phase_of(rotor), "phase look-up follows the rotor");
    io_out(OPORT_DIGOUT, 16'(phase));               // 3. select channel, convert
    io_out(OPORT_ADCSTART, 16'h0000);
    while (dsp_int0_n && t < 400) begin @(negedge clk); t++; end
    io_in(IPORT_ADC, v);
    i_act = int'(v[9:0]);
    err = i_des - i_act;                            // 4. error current
    d = 4 * err + K2;                               // 5. duty cycle
    if (d < 0) d = 0;
    if (d > 255) d = 255;
    w10 = 16'h0000; w32 = 16'h0000;                 // 6. output
    case (phase)
      0: w10[7:0]  = 8'(d);
      1: w10[15:8] = 8'(d);
      2: w32[7:0]  = 8'(d);
      default: w32[15:8] = 8'(d);
    endcase
    io_out(OPORT_PWM10, w10);
    io_out(OPORT_PWM32, w32);
    io_in(13, v);                                   // 7. host command? (LSR)
    if (int'($time) - t0 > max_io_ns) max_io_ns = int'($time) - t0;
    if (phase != last_phase) phase_switches++;
    last_phase = phase;
  endtask

  // Runs the loop; i_avg is the mean measured current of the last 50 loops
  // (the samples carry the PWM ripple).
  task automatic run_torque(input int loops, input int i_des, output int i_avg);
    int ph_i, i_act, sum = 0;
    for (int n = 0; n < loops; n++) begin
      torque_loop(i_des, i_act, ph_i);
      if (n >= loops - 50) sum += i_act;
    end
    i_avg = sum / 50;
  endtask

  // Speed from rise-to-rise time in 1 us units: one A period is 2.8125 deg.
  task automatic measure_speed(input int rpm_model, output int rpm_meas);
    logic [15:0] t1, t2, p1, p2;
    real period_s;
    int guard = 0;
    io_in(IPORT_DIGPOS, p1);
    // let two full A periods pass after the speed was set
    repeat (4 * step_clks + 100) @(negedge clk);
    do begin
      io_in(IPORT_SPDTIME, t1);
      io_in(IPORT_SPDTIME, t2);
      guard++;
    end while (t1 != t2 && guard < 10);
    io_in(IPORT_DIGPOS, p2);
    period_s = real'(t1) * 1.0e-6;
    rpm_meas = (t1 == 0) ? 0 : $rtoi(60.0 * 2.8125 / 360.0 / period_s);
    // polarity from the change of position (modulo 256)
    if (8'(p2[7:0] - p1[7:0]) >= 8'd128) rpm_meas = -rpm_meas;
  endtask

  task automatic speed_case(input int rpm);
    int meas, err;
    // counts per second = rpm/60*256; clocks per count = 50e6 / that
    step_clks = $rtoi(50.0e6 / (real'(rpm < 0 ? -rpm : rpm) / 60.0 * 256.0));
    forward = (rpm > 0);
    step_cnt = 0;
    measure_speed(rpm, meas);
    err = (meas - rpm) * 100;
    chk(err <= 4 * (rpm < 0 ? -rpm : rpm) && err >= -4 * (rpm < 0 ? -rpm : rpm),
        $sformatf("speed %0d rpm measured as %0d rpm", rpm, meas));
  endtask

  initial begin
    int i_last, i_des;
    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (8) @(negedge clk);

    io_out(OPORT_PWMDIV, 16'd4);     // 19.5 kHz
    io_out(OPORT_SPDDIV, 16'd24);    // 1 us time units

    // ---- torque drive, rotor held, supply raised as in a 50 V -> 80 V test ----
    i_des = 400;
    run_torque(150, i_des, i_last);
    chk(i_last > i_des * 95 / 100 && i_last < i_des * 105 / 100,
        $sformatf("current %0d, command %0d at IMAX 1000", i_last, i_des));
    imax = 1600.0;
    run_torque(150, i_des, i_last);
    chk(i_last > i_des * 95 / 100 && i_last < i_des * 105 / 100,
        $sformatf("current %0d, command %0d at IMAX 1600", i_last, i_des));
    chk(max_io_ns < 8000, $sformatf("torque loop I/O took %0d ns, more than the 8 us loop", max_io_ns));
    $display("torque loop I/O time: %0d ns, current %0d for command %0d at IMAX 1600", max_io_ns, i_last, i_des);

    // ---- torque drive while the rotor turns slowly: phases are sequenced ----
    step_clks = 1000;                // 20 us per count
    forward = 1;
    phase_switches = 0;
    run_torque(600, i_des, i_last);
    chk(phase_switches >= 4, $sformatf("%0d phase switches while turning", phase_switches));
    $display("phase switches while turning: %0d", phase_switches);

    // ---- speed measurement for the speed drive ----
    speed_case(500);
    speed_case(1000);
    speed_case(-1000);
    speed_case(-500);
    chk(adc_errors == 0, "ADC read during sampling");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
