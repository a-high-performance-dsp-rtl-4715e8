// Behavioural model (testbench only, not synthesizable) of the register side
// of a 16550-type UART, with the chip's CPU-side pins: chip select, 3-bit
// register address, active-low read and write strobes, 8-bit data in and out,
// and the interrupt output (active high).
//
// Modelled: receive buffer with a 16-entry FIFO, transmit holding register
// (each write is counted and kept), line control with the divisor-latch access
// bit, divisor latch, interrupt enable (received data available only), FIFO
// control, modem control and scratch registers, and line status bits DR (0),
// OE (1), THRE (5) and TEMT (6). Reading the line status clears OE.
// Not modelled: the serial line itself, parity, break, modem status inputs.
//
// The host side is the task host_send: it waits one character time at the
// programmed baud rate (10 bit times, baud = 1.8432 MHz / (16 * divisor)) and
// then puts the byte into the receive FIFO. A register is read or written at
// the falling edge of its strobe while the chip is selected, after a short
// settling delay.
module uart16550_model (
  input  logic       cs_n,
  input  logic [2:0] a,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       intr,
  output int         tx_count,
  output logic [7:0] tx_last,
  output int         overruns,
  output int         max_fill
);

  localparam real XTAL_HZ = 1.8432e6;

  logic [7:0] rx_fifo [$];
  logic [7:0] lcr = 8'h00, ier = 8'h00, fcr = 8'h00, mcr = 8'h00, scr = 8'h00;
  logic [7:0] dll = 8'h01, dlm = 8'h00;
  logic       oe = 1'b0;

  initial begin
    dout = 8'h00;
    tx_count = 0;
    tx_last = 8'h00;
    overruns = 0;
    max_fill = 0;
  end

  wire dlab = lcr[7];
  wire dr   = rx_fifo.size() != 0;
  wire [7:0] lsr = {1'b0, 1'b1, 1'b1, 3'b000, oe, dr};

  assign intr = ier[0] && dr;

  always @(negedge rd_n) begin
    #2ns;
    if (!cs_n) begin
      case (a)
        3'd0: if (dlab) dout = dll;
              else if (dr) dout = rx_fifo.pop_front();
              else dout = 8'h00;
        3'd1: dout = dlab ? dlm : ier;
        3'd2: dout = {fcr[0] ? 2'b11 : 2'b00, 3'b000, intr_pending(), 1'b0, !intr_pending()};
        3'd3: dout = lcr;
        3'd4: dout = mcr;
        3'd5: begin dout = lsr; oe = 1'b0; end
        3'd6: dout = 8'h00;
        default: dout = scr;
      endcase
    end
  end

  function automatic bit intr_pending();
    return ier[0] && dr;
  endfunction

  always @(negedge wr_n) begin
    #2ns;
    if (!cs_n) begin
      case (a)
        3'd0: if (dlab) dll = din;
              else begin tx_count++; tx_last = din; end
        3'd1: if (dlab) dlm = din; else ier = din;
        3'd2: begin fcr = din; if (din[1]) rx_fifo.delete(); end
        3'd3: lcr = din;
        3'd4: mcr = din;
        3'd7: scr = din;
        default: ;
      endcase
    end
  end

  function automatic real char_time_ns();
    int div;
    div = (int'(dlm) << 8) | int'(dll);
    if (div == 0) div = 1;
    return 10.0 * 16.0 * real'(div) / XTAL_HZ * 1.0e9;
  endfunction

  task automatic host_send(input logic [7:0] b);
    #(char_time_ns() * 1.0ns);
    if (rx_fifo.size() >= 16) begin
      oe = 1'b1;
      overruns++;
    end else begin
      rx_fifo.push_back(b);
      if (rx_fifo.size() > max_fill) max_fill = rx_fifo.size();
    end
  endtask

endmodule
