// Testbench for uart_interface: address decode (ports 8..15 only), register
// address, RD/WR strobes, and the wait counter: uartwt1 must rise at the 4th
// instruction-cycle edge after the access starts (select registered once,
// then counting 0 -> 3), stay high while the access lasts, and drop when the
// access completes or the UART is deselected. A bus model with the
// wait-state rule (READY one edge after uartwt1) must see five wait-states.
module tb_uart_interface;
  logic clk = 0, rst_n = 0, cyc_en;
  logic is_n = 1, rw = 1, strb_n = 1, done = 0;
  logic [3:0] addr = '0;
  logic uart_cs_n, uart_rd_n, uart_wr_n, uart_sel, uartwt1;
  logic [2:0] uart_a;
  int checks = 0, failures = 0;
  int phase = 0;

  uart_interface dut (.clk, .rst_n, .cyc_en, .is_n, .addr, .rw, .strb_n, .done,
                      .uart_cs_n, .uart_a, .uart_rd_n, .uart_wr_n, .uart_sel, .uartwt1);

  always #10 clk = ~clk;
  always @(posedge clk) phase <= (phase + 1) % 4;
  assign cyc_en = (phase == 3);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // One UART access with a READY model: READY rises at the edge after the
  // first edge at which uartwt1 was already high.
  task automatic uart_access(input logic [3:0] a, input logic r);
    int lows = 0, edge_wt1 = -1, e = 0;
    bit fin = 0, stage1 = 0;
    @(negedge clk);
    while (phase != 0) @(negedge clk);
    is_n = 0; addr = a; rw = r; strb_n = 0;
    #1;
    chk(uart_cs_n == 0 && uart_a == a[2:0], "select and address");
    chk(uart_rd_n == !r && uart_wr_n == r, "read/write strobes");
    while (!fin) begin
      @(negedge clk);
      if (phase == 3) begin
        // values before this cycle edge
        if (stage1) begin done = 1; fin = 1; end
        else begin
          lows++;
          if (uartwt1) begin stage1 = 1; if (edge_wt1 < 0) edge_wt1 = e; end
        end
        e++;
      end
      if (e > 20) fin = 1;
    end
    @(posedge clk);
    #1;
    done = 0;
    chk(edge_wt1 == 4, $sformatf("uartwt1 first seen before edge %0d, expected 4", edge_wt1));
    chk(lows == 5, $sformatf("%0d wait-states, expected 5", lows));
    chk(uartwt1 == 0, "counter cleared at completion");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // ports 0..7 must not select the UART
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      is_n = 0; addr = 4'(k); strb_n = 0;
      #1;
      chk(uart_cs_n == 1 && uart_sel == 0, "port below 8 selects UART");
    end
    is_n = 1; strb_n = 1;
    @(negedge clk);
    chk(uart_cs_n == 1, "UART selected without IS");
    uart_access(4'd8, 1);
    uart_access(4'd11, 0);   // back to back, select stays active
    uart_access(4'd13, 1);
    @(negedge clk);
    is_n = 1; strb_n = 1;
    // deselect in the middle of counting clears the counter
    @(negedge clk);
    while (phase != 0) @(negedge clk);
    is_n = 0; addr = 4'd15; strb_n = 0;
    repeat (20) @(negedge clk);
    chk(uartwt1 == 1, "uartwt1 held during a long access");
    is_n = 1; strb_n = 1;
    @(negedge clk);
    chk(uartwt1 == 0, "counter forced to zero when deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
