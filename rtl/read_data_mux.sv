// Read-data return path to the DSP.
//
// On the board every memory and input port drives a shared tri-state data
// bus. Here that bus is a multiplexer: during a read it returns the word of
// the one device that is selected, and 0 when none is.
//   EPROM, SRAM1, SRAM2          full 16-bit words
//   input port 0 / 3             digital input / digital position latch
//   input port 1                 S/P/D speed time
//   input port 2                 {direction, 000, position[11:0]}
//   input port 5                 {000000, ADC data[9:0]}
//   UART (ports 8..15)           {00000000, UART data[7:0]}
// Bits that the board leaves floating read as 0. Ports 4, 6 and 7 read 0.
// Combinational.
module read_data_mux
  import motor_ctrl_pkg::*;
(
  input  logic        rw,
  input  logic        eprom_cs_n,
  input  logic        sram1_cs_n,
  input  logic        sram2_cs_n,
  input  logic [7:0]  iport,
  input  logic        uart_sel,
  input  logic [15:0] eprom_data,
  input  logic [15:0] sram1_data,
  input  logic [15:0] sram2_data,
  input  logic [15:0] din_word,
  input  logic [15:0] speed_time,
  input  logic [11:0] position,
  input  logic        direction,
  input  logic [15:0] pos_word,
  input  logic [9:0]  adc_data,
  input  logic [7:0]  uart_data,
  output logic [15:0] rdata
);

  always_comb begin
    rdata = '0;
    if (rw) begin
      if (!eprom_cs_n)                 rdata = eprom_data;
      else if (!sram1_cs_n)            rdata = sram1_data;
      else if (!sram2_cs_n)            rdata = sram2_data;
      else if (iport[IPORT_DIGIN])     rdata = din_word;
      else if (iport[IPORT_SPDTIME])   rdata = speed_time;
      else if (iport[IPORT_POSDIR])    rdata = {direction, 3'b000, position};
      else if (iport[IPORT_DIGPOS])    rdata = pos_word;
      else if (iport[IPORT_ADC])       rdata = {6'b0, adc_data};
      else if (uart_sel)               rdata = {8'b0, uart_data};
    end
  end

endmodule
