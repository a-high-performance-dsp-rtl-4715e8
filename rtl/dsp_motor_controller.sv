// Peripheral and glue logic of a DSP based motor drive controller.
//
// A 50 MHz fixed point DSP (80 ns instruction cycle) runs the control loop.
// Everything it would otherwise do in interrupt-driven software sits here in
// hardware, mapped into its 16-word I/O space:
//   input  0 digital in        output 0 digital out [15:3], ADC select [2:0]
//   input  1 S/P/D speed time  output 1..4 PWM channel pairs (odd:even bytes)
//   input  2 S/P/D pos, dir    output 5 ADC start (any value)
//   input  3 digital position  output 6 S/P/D divider
//   input  5 ADC data (1 ws)   output 7 PWM divider
//   ports 8..15: UART registers (5 wait-states)
// plus the external memory: a 64K x 16 EPROM (2 wait-states) and two
// 16K x 16 SRAM banks (no wait-states), switched between program and data
// space by the DSP's XF flag (memory_select).
//
// Ports: the DSP bus (addr, write data, read data, PS/DS/IS selects, strobe,
// R/W, XF, CLKOUT1 in; READY and the two interrupts out), the UART chip pins,
// the ADC chip and analog multiplexer pins, the encoder lines, 32 digital input
// bits, 13 digital outputs and 8 PWM outputs. The DSP, UART and ADC are
// separate chips outside this logic.
//
// Timing: one clock, clk = 50 MHz. A toggle flip-flop gives the 25 MHz
// reference as a clock enable; the instruction-cycle enable cyc_en is the
// rising edge of CLKOUT1, seen on clk. An external access is the time the
// strobe is active with one of PS/DS/IS; READY is sampled by the DSP at each
// cyc_en and the access ends at the first cyc_en with READY high. The shared
// tri-state data bus of the board is a read multiplexer here.
module dsp_motor_controller
  import motor_ctrl_pkg::*;
#(
  parameter string EPROM_INIT = ""
) (
  input  logic        clk,
  input  logic        rst_n,

  // DSP bus
  input  logic        dsp_clkout1,
  input  logic [15:0] dsp_addr,
  input  logic [15:0] dsp_wdata,
  output logic [15:0] dsp_rdata,
  input  logic        dsp_ps_n,
  input  logic        dsp_ds_n,
  input  logic        dsp_is_n,
  input  logic        dsp_strb_n,
  input  logic        dsp_rw,
  input  logic        dsp_xf,
  output logic        dsp_ready,
  output logic        dsp_int0_n,
  output logic        dsp_int1_n,

  // UART chip
  output logic        uart_cs_n,
  output logic [2:0]  uart_a,
  output logic        uart_rd_n,
  output logic        uart_wr_n,
  output logic [7:0]  uart_wdata,
  input  logic [7:0]  uart_rdata,
  input  logic        uart_intr,

  // ADC chip and analog multiplexer
  output logic [2:0]  adc_asel,
  output logic        adc_cs_n,
  output logic        adc_rd_n,
  output logic        adc_sh,
  input  logic [9:0]  adc_db,
  input  logic        adc_intr_n,

  // Encoder (S/P/D) and digital I/O
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic        enc_i,
  input  logic        index_active_high,
  input  logic [15:0] dig_in,
  input  logic [15:0] dig_pos,
  output logic [12:0] dig_out,
  output logic [7:0]  pwm
);

  // Clock enables
  logic ce25, clk25;
  logic clkout1_q, cyc_en;

  clk_div2 u_clk_div2 (.clk, .rst_n, .clk25, .ce25);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clkout1_q <= 1'b0;
    else        clkout1_q <= dsp_clkout1;
  end
  assign cyc_en = dsp_clkout1 && !clkout1_q;

  // Decoding
  logic [7:0] iport, oport, owr;
  logic       strobe;
  logic       eprom_cs_n, sram1_cs_n, sram2_cs_n;
  logic       access;

  assign strobe = !dsp_strb_n;
  assign access = strobe && (!dsp_ps_n || !dsp_ds_n || !dsp_is_n);

  io_decoder u_io_decoder (
    .is_n(dsp_is_n), .rw(dsp_rw), .addr(dsp_addr[3:0]), .iport, .oport
  );
  assign owr = oport & {8{strobe}};

  memory_select u_memory_select (
    .xf(dsp_xf), .ps_n(dsp_ps_n), .ds_n(dsp_ds_n),
    .eprom_cs_n, .sram1_cs_n, .sram2_cs_n
  );

  // Wait-states
  logic done, uart_sel, uartwt1;

  uart_interface u_uart_interface (
    .clk, .rst_n, .cyc_en, .is_n(dsp_is_n), .addr(dsp_addr[3:0]), .rw(dsp_rw),
    .strb_n(dsp_strb_n), .done, .uart_cs_n, .uart_a, .uart_rd_n, .uart_wr_n,
    .uart_sel, .uartwt1
  );
  assign uart_wdata = dsp_wdata[7:0];
  assign dsp_int1_n = !uart_intr;

  wait_state_gen u_wait_state_gen (
    .clk, .rst_n, .cyc_en, .access,
    .ws2_req (!eprom_cs_n),
    .ws1_req (iport[IPORT_ADC] || uartwt1),
    .hold_req(uart_sel),
    .ready   (dsp_ready),
    .done
  );

  // Memory
  logic [15:0] eprom_data, sram1_data, sram2_data;

  eprom #(.INIT_FILE(EPROM_INIT)) u_eprom (
    .addr(dsp_addr), .cs_n(eprom_cs_n), .rdata(eprom_data)
  );
  sram_bank u_sram1 (
    .clk, .cs_n(sram1_cs_n), .rw(dsp_rw), .strb_n(dsp_strb_n),
    .addr(dsp_addr[13:0]), .wdata(dsp_wdata), .rdata(sram1_data)
  );
  sram_bank u_sram2 (
    .clk, .cs_n(sram2_cs_n), .rw(dsp_rw), .strb_n(dsp_strb_n),
    .addr(dsp_addr[13:0]), .wdata(dsp_wdata), .rdata(sram2_data)
  );

  // ADC
  logic adc_sampling;

  adc_control u_adc_control (
    .clk, .rst_n, .cyc_en, .start(owr[OPORT_ADCSTART]), .read_sel(iport[IPORT_ADC]),
    .rw(dsp_rw), .adc_cs_n, .adc_rd_n, .adc_sh, .sampling(adc_sampling)
  );
  assign dsp_int0_n = adc_intr_n;

  // Digital I/O
  logic [15:0] din_word, pos_word, dout;

  digital_io u_digital_io (
    .clk, .rst_n, .din_pins(dig_in), .pos_pins(dig_pos),
    .din_rd(iport[IPORT_DIGIN]), .pos_rd(iport[IPORT_DIGPOS]),
    .out_we(owr[OPORT_DIGOUT]), .wdata(dsp_wdata),
    .din_word, .pos_word, .dout
  );
  assign dig_out  = dout[15:3];
  assign adc_asel = dout[2:0];

  // S/P/D
  logic [15:0] speed_time;
  logic [11:0] position;
  logic        direction;

  spd_input u_spd_input (
    .clk, .rst_n, .ce25, .div_we(owr[OPORT_SPDDIV]), .wdata(dsp_wdata),
    .enc_a, .enc_b, .enc_i, .index_active_high, .speed_time, .position, .direction
  );

  // PWM
  logic [7:0] pcnt;

  pwm_output u_pwm_output (
    .clk, .rst_n, .ce25, .div_we(owr[OPORT_PWMDIV]),
    .pair_we(owr[OPORT_PWM76:OPORT_PWM10]), .wdata(dsp_wdata), .pcnt, .pwm
  );

  // Read data
  read_data_mux u_read_data_mux (
    .rw(dsp_rw), .eprom_cs_n, .sram1_cs_n, .sram2_cs_n, .iport, .uart_sel,
    .eprom_data, .sram1_data, .sram2_data, .din_word, .speed_time, .position,
    .direction, .pos_word, .adc_data(adc_db), .uart_data(uart_rdata),
    .rdata(dsp_rdata)
  );

  // An ADC read must not overlap the sampling phase, where RD is masked.
  a_no_read_while_sampling: assert property (
    @(posedge clk) disable iff (!rst_n) !(access && iport[IPORT_ADC] && adc_sampling && !adc_rd_n)
  );

endmodule
