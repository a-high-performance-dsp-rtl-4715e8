// I/O port decoder for the lower eight input and output ports.
//
// Two 3-to-8 decoders split the DSP's I/O space: with the I/O select active
// and address bit 3 low, address bits 2..0 select one input port on a read
// (rw = 1) or one output port on a write (rw = 0). Ports 8..15 (A3 = 1) belong
// to the UART and are decoded by uart_interface. The selects do not include
// the bus strobe; each port register combines its select with the strobe.
//
// Combinational. Selects are active high (the board's decoders drive active
// low lines).
module io_decoder (
  input  logic       is_n,
  input  logic       rw,
  input  logic [3:0] addr,
  output logic [7:0] iport,
  output logic [7:0] oport
);

  logic en;
  assign en = !is_n && !addr[3];

  always_comb begin
    iport = '0;
    oport = '0;
    if (en) begin
      if (rw) iport[addr[2:0]] = 1'b1;
      else    oport[addr[2:0]] = 1'b1;
    end
  end

endmodule
