// 64K x 16 program EPROM.
//
// Read-only array holding the loader and application code. Reads are
// asynchronous; the wait-state generator adds the two wait-states the slow
// part needs. Its contents are software: the array is cleared to zero and,
// when INIT_FILE names a hex file (one 16-bit word per line, $readmemh
// format), filled from it.
//
// Interface: addr, cs_n (only used by the read multiplexer), rdata.
module eprom #(
  parameter int unsigned AW        = 16,
  parameter int unsigned DW        = 16,
  parameter string       INIT_FILE = ""
) (
  input  logic [AW-1:0] addr,
  input  logic          cs_n,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rdata = cs_n ? '0 : mem[addr];

endmodule
