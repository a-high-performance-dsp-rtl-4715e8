// Testbench for wait_state_gen: a bus model samples READY at each
// instruction-cycle edge (every 4th clock); the number of low samples per
// access must be 0 for a fast device, 1 for a one-wait-state request, 2 for the
// EPROM request, and, for a held device whose counter raises ws1_req after N
// edges, N + 1. Back-to-back accesses must each get their full count.
module tb_wait_state_gen;
  logic clk = 0, rst_n = 0, cyc_en;
  logic access = 0, ws2_req = 0, ws1_req = 0, hold_req = 0;
  logic ready, done;
  int checks = 0, failures = 0;
  int phase = 0;

  wait_state_gen dut (.clk, .rst_n, .cyc_en, .access, .ws2_req, .ws1_req, .hold_req, .ready, .done);

  always #10 clk = ~clk;
  always @(posedge clk) begin
    phase  <= (phase + 1) % 4;
  end
  assign cyc_en = (phase == 3);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 fast, 1 one ws, 2 two ws, 3 held with counter of hold_edges
  task automatic do_access(input int kind, input int hold_edges, input int expected, input string name);
    int lows = 0, edges = 0;
    bit fin = 0;
    @(negedge clk);
    while (phase != 0) @(negedge clk);
    access   = 1;
    ws1_req  = (kind == 1);
    ws2_req  = (kind == 2);
    hold_req = (kind == 3);
    while (!fin) begin
      @(posedge clk);
      if (cyc_en) begin
        if (ready) fin = 1;
        else begin
          lows++;
          edges++;
          if (kind == 3 && edges >= hold_edges) begin
            @(negedge clk);
            ws1_req = 1;
          end
        end
      end
      if (lows > 20) fin = 1;
    end
    checks++;
    if (lows != expected) begin
      failures++;
      $display("FAIL %s: %0d wait-states, expected %0d", name, lows, expected);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) begin
      do_access(0, 0, 0, "zero");
      do_access(1, 0, 1, "one");
      do_access(2, 0, 2, "two");
      do_access(2, 0, 2, "two again");
      do_access(3, 4, 5, "held 4");
      do_access(1, 0, 1, "one after held");
      do_access(3, 1, 2, "held 1");
    end
    @(negedge clk);
    access = 0; ws1_req = 0; ws2_req = 0; hold_req = 0;
    #1;
    checks++;
    if (!ready) begin failures++; $display("FAIL: READY low while idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
