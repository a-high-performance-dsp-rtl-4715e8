// One 16K x 16 static RAM bank (SRAM1 or SRAM2).
//
// On the board a bank is four 16K x 4 chips sharing address and control; it
// is written here as one array of 2**AW words. The bank sees only the low AW
// address bits, so in the data space the upper copies of the address range
// reach the same words. Reads are asynchronous (the chips need no
// wait-states); a write happens on each clock edge at which the bank is
// selected with rw = 0 and the strobe active, so a write held over several
// clocks just writes the same word again.
//
// Interface: cs_n, rw (1 = read), strb_n, addr, wdata, rdata. rdata shows the
// addressed word whether or not the bank is selected; the read multiplexer
// picks it only when cs_n is low. The array is not reset.
module sram_bank #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          cs_n,
  input  logic          rw,
  input  logic          strb_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!cs_n && !rw && !strb_n) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
