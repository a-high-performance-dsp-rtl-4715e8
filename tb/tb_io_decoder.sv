// Testbench for io_decoder: exhaustive over I/O select, R/W and A3..A0,
// compared with the port map (A3 = 0 decodes ports 0..7; reads select input
// ports, writes output ports).
module tb_io_decoder;
  logic is_n, rw;
  logic [3:0] addr;
  logic [7:0] iport, oport;
  int checks = 0, failures = 0;

  io_decoder dut (.is_n, .rw, .addr, .iport, .oport);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_i, exp_o;
    for (int k = 0; k < 64; k++) begin
      {is_n, rw, addr} = 6'(k);
      #1;
      exp_i = 8'h00;
      exp_o = 8'h00;
      if (is_n == 1'b0 && addr < 8) begin
        if (rw) exp_i = 8'h01 << addr;
        else    exp_o = 8'h01 << addr;
      end
      checks++;
      if (iport !== exp_i || oport !== exp_o) begin
        failures++;
        $display("FAIL is_n=%0b rw=%0b addr=%0d: iport=%b oport=%b", is_n, rw, addr, iport, oport);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
