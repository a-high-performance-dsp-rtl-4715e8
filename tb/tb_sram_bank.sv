// Testbench for sram_bank: random writes and reads against a reference
// array; writes with the bank deselected or the strobe inactive must not
// change anything.
module tb_sram_bank;
  localparam int AW = 14;
  logic clk = 0;
  logic cs_n = 1, rw = 1, strb_n = 1;
  logic [AW-1:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [2**AW];
  bit          valid [2**AW];
  int checks = 0, failures = 0;

  sram_bank dut (.clk, .cs_n, .rw, .strb_n, .addr, .wdata, .rdata);

  always #10 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(0, 255) * 61);
      wdata = 16'($urandom);
      case ($urandom_range(0, 3))
        0: begin cs_n = 0; rw = 0; strb_n = 0; ref_mem[addr] = wdata; valid[addr] = 1; end
        1: begin cs_n = 1; rw = 0; strb_n = 0; end
        2: begin cs_n = 0; rw = 0; strb_n = 1; end
        default: begin cs_n = 0; rw = 1; strb_n = 0; end
      endcase
      @(negedge clk);
      {cs_n, rw, strb_n} = 3'b111;
      if (valid[addr]) begin
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++;
          $display("FAIL addr %h: read %h expected %h", addr, rdata, ref_mem[addr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
