// Shared constants and types of the motor drive controller peripheral logic.
//
// The controller is the glue and peripheral logic around a 16-bit fixed point
// DSP with a 16-word I/O space. This package holds the I/O port map, the number
// of wait-states each device needs, and the load value of the ADC sample
// counter. The port numbers and wait-state counts follow the board's port
// tables; the bus-cycle encoding of the types below is this design's own.
package motor_ctrl_pkg;

  // Input ports (DSP IN instruction), lower eight decoded ports.
  localparam int unsigned IPORT_DIGIN   = 0;  // general purpose digital input
  localparam int unsigned IPORT_SPDTIME = 1;  // S/P/D rise-to-rise time
  localparam int unsigned IPORT_POSDIR  = 2;  // S/P/D position [11:0], direction [15]
  localparam int unsigned IPORT_DIGPOS  = 3;  // digital position input
  localparam int unsigned IPORT_ADC     = 5;  // ADC conversion result [9:0]

  // Output ports (DSP OUT instruction).
  localparam int unsigned OPORT_DIGOUT   = 0;  // digital out [15:3], ADC select [2:0]
  localparam int unsigned OPORT_PWM10    = 1;  // PWM1 [15:8], PWM0 [7:0]
  localparam int unsigned OPORT_PWM32    = 2;
  localparam int unsigned OPORT_PWM54    = 3;
  localparam int unsigned OPORT_PWM76    = 4;
  localparam int unsigned OPORT_ADCSTART = 5;  // any value starts a conversion
  localparam int unsigned OPORT_SPDDIV   = 6;  // S/P/D divider load value
  localparam int unsigned OPORT_PWMDIV   = 7;  // PWM divider load value [7:0]

  // Ports 8..15 (address bit 3 set) belong to the UART.
  localparam int unsigned UART_PORT_BASE = 8;

  // Wait-states per external access.
  localparam int unsigned WS_EPROM = 2;
  localparam int unsigned WS_ADC   = 1;
  localparam int unsigned WS_UART  = 5;

  // UART wait counter: counts from zero up to this value, then asks for one
  // more wait-state through the one-wait-state stage.
  localparam logic [3:0] UART_WAIT_TOP = 4'd3;

  // ADC sample/chip-select counter load value (instruction cycles).
  localparam logic [3:0] ADC_SAMPLE_LOAD = 4'd5;

  // Memory mapping mode, selected by the DSP's external flag XF.
  typedef enum logic {
    MAP_RAM_BOOT = 1'b0,  // XF = 0: SRAM1 program, SRAM2 data, EPROM off
    MAP_EPROM    = 1'b1   // XF = 1: EPROM program, SRAM1 data, SRAM2 off
  } mem_map_e;

  // One bus request as seen by the peripheral logic (active-low selects as
  // on the DSP pins; rw = 1 for a read).
  typedef struct packed {
    logic [15:0] addr;
    logic [15:0] wdata;
    logic        ps_n;
    logic        ds_n;
    logic        is_n;
    logic        strb_n;
    logic        rw;
  } dsp_bus_t;

endpackage
