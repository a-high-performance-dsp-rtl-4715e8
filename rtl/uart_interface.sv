// Glue between the DSP bus and the 16550-type UART chip.
//
// The UART occupies I/O ports 8..15: it is chip-selected whenever the I/O
// space is selected and address bit 3 is set, and sees address bits 2..0 as
// its register address. Its read and write strobes are the DSP's strobe
// combined with R/W. Only data bits 7..0 connect to the UART.
//
// The UART is slow, so a 4-bit counter stretches each access to five
// wait-states. The counter is held at zero while the UART is not selected. The
// select is registered once at an instruction-cycle edge; from then on the
// counter counts up once per instruction cycle until it reaches three, where
// it stops and raises uartwt1. uartwt1 asks the wait-state generator for one
// more wait-state, after which READY goes high. While the UART is selected
// uart_sel holds READY low. Cycle count: READY is sampled low at five edges.
// The counter also clears when the access completes (done), so that two UART
// accesses in a row each take five wait-states; the registered select is this
// design's choice for reaching the stated count of five.
module uart_interface
  import motor_ctrl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cyc_en,
  input  logic       is_n,
  input  logic [3:0] addr,
  input  logic       rw,
  input  logic       strb_n,
  input  logic       done,
  output logic       uart_cs_n,
  output logic [2:0] uart_a,
  output logic       uart_rd_n,
  output logic       uart_wr_n,
  output logic       uart_sel,
  output logic       uartwt1
);

  logic       sel_q;
  logic [3:0] cnt_q;

  assign uart_sel  = !is_n && addr[3];
  assign uart_cs_n = !uart_sel;
  assign uart_a    = addr[2:0];
  assign uart_rd_n = !(rw && !strb_n);
  assign uart_wr_n = !(!rw && !strb_n);
  assign uartwt1   = (cnt_q == UART_WAIT_TOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= 1'b0;
      cnt_q <= '0;
    end else if (!uart_sel) begin
      sel_q <= 1'b0;
      cnt_q <= '0;
    end else if (cyc_en) begin
      if (done) begin
        sel_q <= 1'b0;
        cnt_q <= '0;
      end else begin
        sel_q <= 1'b1;
        if (sel_q && cnt_q != UART_WAIT_TOP) cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
