// Workload testbench: downloading a program through the serial port and
// starting it from SRAM1, the way the board's start-up loader does.
//
// A bus model plays the DSP running the loader out of the EPROM (XF = 1).
// Each loader instruction is modelled as a program fetch from the EPROM, which
// must take two wait-states; each UART register access must take five, each
// SRAM access none. The loader initialises the UART (38.4 kBaud, 8N1, FIFOs
// on, interrupts off), then polls the line status and decodes the host's
// commands:
//   'A' addr_hi addr_lo count  w0_hi w0_lo ...  load count words at addr
//   'G'                                         run from SRAM1 at 20h
// The host sends its bytes back to back through the UART model, at one
// character per 10 bit times. Words are stored with data writes through an
// upper copy of SRAM1 (4000h + address), since data addresses below 400h are
// the DSP's own memory. On 'G' the loader clears XF; the two words behind the
// flag change are still fetched from the EPROM, then fetches come from SRAM1.
//
// Checks: every downloaded word is found at its program address with no
// wait-states; data space then reaches SRAM2, not SRAM1; the loader keeps up
// with the line (no FIFO overrun, never more than one character waiting); the
// UART interrupt reaches INT1 once enabled; transmit writes reach the UART.
module tb_serial_loader;
  import motor_ctrl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dsp_clkout1 = 0;
  logic [15:0] dsp_addr = '0, dsp_wdata = '0, dsp_rdata;
  logic dsp_ps_n = 1, dsp_ds_n = 1, dsp_is_n = 1, dsp_strb_n = 1, dsp_rw = 1, dsp_xf = 1;
  logic dsp_ready, dsp_int0_n, dsp_int1_n;
  logic uart_cs_n, uart_rd_n, uart_wr_n, uart_intr;
  logic [2:0] uart_a;
  logic [7:0] uart_wdata, uart_rdata;
  logic [2:0] adc_asel;
  logic adc_cs_n, adc_rd_n, adc_sh;
  logic adc_intr_n = 1;
  logic [9:0] adc_db = '0;
  logic enc_a = 0, enc_b = 0, enc_i = 0, index_active_high = 1;
  logic [15:0] dig_in = '0, dig_pos = '0;
  logic [12:0] dig_out;
  logic [7:0] pwm;
  int tx_count, overruns, max_fill;
  logic [7:0] tx_last;

  int checks = 0, failures = 0;

  dsp_motor_controller dut (.*);

  uart16550_model u_uart (
    .cs_n(uart_cs_n), .a(uart_a), .rd_n(uart_rd_n), .wr_n(uart_wr_n),
    .din(uart_wdata), .dout(uart_rdata), .intr(uart_intr),
    .tx_count, .tx_last, .overruns, .max_fill
  );

  always #10 clk = ~clk;

  int ph = 0;
  logic c1q = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    dsp_clkout1 <= (((ph + 1) % 4) < 2);
    c1q <= dsp_clkout1;
  end
  wire next_is_edge = dsp_clkout1 && !c1q;

  initial begin
    #80_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  typedef enum int {SP_PROG, SP_DATA, SP_IO} space_e;

  task automatic bus(input space_e sp, input logic [15:0] a, input logic r, input logic [15:0] wd,
                     output logic [15:0] rd, output int ws);
    bit fin = 0;
    ws = 0;
    rd = '0;
    do @(negedge clk); while (!next_is_edge);
    @(negedge clk);
    dsp_addr = a; dsp_rw = r; dsp_wdata = wd; dsp_strb_n = 0;
    dsp_ps_n = (sp != SP_PROG); dsp_ds_n = (sp != SP_DATA); dsp_is_n = (sp != SP_IO);
    while (!fin) begin
      @(negedge clk);
      if (next_is_edge) begin
        if (dsp_ready) begin fin = 1; rd = dsp_rdata; end
        else ws++;
        if (ws > 10) fin = 1;
      end
    end
    @(negedge clk);
    dsp_strb_n = 1; dsp_ps_n = 1; dsp_ds_n = 1; dsp_is_n = 1; dsp_rw = 1;
  endtask

  // ---- loader, as bus cycles ----
  logic [15:0] pc = 16'h0000;      // loader program counter in the EPROM
  int eprom_fetches = 0, eprom_bad_ws = 0, uart_accesses = 0, uart_bad_ws = 0;

  task automatic fetch(input int n);
    logic [15:0] d;
    int ws;
    for (int k = 0; k < n; k++) begin
      bus(SP_PROG, pc, 1'b1, '0, d, ws);
      eprom_fetches++;
      if (ws != WS_EPROM) eprom_bad_ws++;
      pc = (pc == 16'h00ff) ? 16'h0020 : pc + 16'd1;  // stays inside the loader
    end
  endtask

  task automatic uart_rd(input int r, output logic [7:0] v);
    logic [15:0] d;
    int ws;
    fetch(1);                                        // the IN instruction
    bus(SP_IO, 16'(UART_PORT_BASE + r), 1'b1, '0, d, ws);
    uart_accesses++;
    if (ws != WS_UART) uart_bad_ws++;
    v = d[7:0];
  endtask

  task automatic uart_wr(input int r, input logic [7:0] v);
    logic [15:0] d;
    int ws;
    fetch(2);                                        // LACK, SACL
    fetch(1);                                        // OUT
    bus(SP_IO, 16'(UART_PORT_BASE + r), 1'b0, {8'h00, v}, d, ws);
    uart_accesses++;
    if (ws != WS_UART) uart_bad_ws++;
  endtask

  // Polls the line status until a character is there, then reads it.
  task automatic receive(output logic [7:0] b);
    logic [7:0] lsr;
    do begin
      uart_rd(5, lsr);
      fetch(2);                                      // BIT, BBZ
    end while (!lsr[0]);
    uart_rd(0, b);
    fetch(3);                                        // LAC, ANDK, RET
  endtask

  // ---- host side ----
  localparam int NBLK = 2;
  localparam logic [15:0] BLK_ADDR [NBLK] = '{16'h4020, 16'h4100};
  localparam int BLK_LEN [NBLK] = '{40, 25};
  logic [15:0] image [NBLK][64];
  int chars_sent = 0;
  realtime t_first, t_last_char;

  task automatic host_download();
    for (int b = 0; b < NBLK; b++) begin
      u_uart.host_send("A");
      u_uart.host_send(BLK_ADDR[b][15:8]);
      u_uart.host_send(BLK_ADDR[b][7:0]);
      u_uart.host_send(8'(BLK_LEN[b]));
      chars_sent += 4;
      for (int i = 0; i < BLK_LEN[b]; i++) begin
        u_uart.host_send(image[b][i][15:8]);
        u_uart.host_send(image[b][i][7:0]);
        chars_sent += 2;
      end
    end
    u_uart.host_send("G");
    chars_sent++;
    t_last_char = $realtime;
  endtask

  int words_stored = 0, sram_bad_ws = 0, blocks = 0;

  task automatic loader();
    logic [7:0] c, hi, lo, n;
    logic [15:0] d, addr;
    int ws;
    bit go = 0;
    fetch(1);                                        // reset vector: B init
    uart_wr(3, 8'b1000_0011);                        // DLAB = 1
    uart_wr(1, 8'd0);                                // DLM
    uart_wr(0, 8'd3);                                // DLL: 1.8432 MHz / 16 / 3 = 38400
    uart_wr(3, 8'b0000_0011);                        // 8N1, DLAB = 0
    uart_wr(2, 8'b0000_0001);                        // FIFOs on
    uart_wr(1, 8'h00);                               // interrupts off
    uart_wr(4, 8'b0000_0011);                        // DTR, RTS
    uart_wr(7, 8'h5a);
    uart_rd(7, c);
    chk(c == 8'h5a, $sformatf("UART scratch register read back %h", c));
    while (!go) begin
      receive(c);
      fetch(4);                                      // compare with 'A' and 'G'
      if (c == "A") begin
        receive(hi);
        receive(lo);
        receive(n);
        addr = {hi, lo};
        blocks++;
        for (int i = 0; i < int'(n); i++) begin
          receive(hi);
          receive(lo);
          fetch(4);                                  // build the word, store it
          bus(SP_DATA, addr, 1'b0, {hi, lo}, d, ws);
          if (ws != 0) sram_bad_ws++;
          words_stored++;
          addr++;
          fetch(3);                                  // count, branch
        end
      end else if (c == "G") begin
        fetch(1);                                    // RXF
        fetch(2);                                    // B 20h: still from the EPROM
        @(negedge clk) dsp_xf = 1'b0;
        go = 1;
      end
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [7:0] c;
    int ws, bad;
    realtime t_loaded;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) image[b][i] = 16'($urandom);
    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (8) @(negedge clk);

    fork
      loader();
      begin
        // the host starts once the loader has set the baud rate
        wait (u_uart.dll == 8'd3 && u_uart.lcr == 8'b0000_0011);
        t_first = $realtime;
        host_download();
      end
    join
    t_loaded = $realtime;

    chk(blocks == NBLK, $sformatf("%0d blocks loaded", blocks));
    chk(words_stored == BLK_LEN[0] + BLK_LEN[1], $sformatf("%0d words stored", words_stored));
    chk(eprom_bad_ws == 0, $sformatf("%0d of %0d EPROM fetches without two wait-states",
                                     eprom_bad_ws, eprom_fetches));
    chk(uart_bad_ws == 0, $sformatf("%0d of %0d UART accesses without five wait-states",
                                    uart_bad_ws, uart_accesses));
    chk(sram_bad_ws == 0, $sformatf("%0d SRAM1 data writes with wait-states", sram_bad_ws));
    chk(overruns == 0, $sformatf("%0d receive overruns", overruns));
    chk(max_fill <= 1, $sformatf("up to %0d characters waited in the FIFO", max_fill));
    chk(uart_intr == 1'b0 && dsp_int1_n == 1'b1, "UART interrupt stays off while disabled");
    // the loader finishes within a few microseconds of the last character
    chk(t_loaded - t_last_char < 20_000.0,
        $sformatf("loader done %0t after the last character", t_loaded - t_last_char));
    $display("download: %0d characters in %0.1f us, %0d EPROM fetches, %0d UART accesses",
             chars_sent, (t_loaded - t_first) / 1000.0, eprom_fetches, uart_accesses);

    // ---- running from SRAM1 ----
    bad = 0;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < BLK_LEN[b]; i++) begin
        bus(SP_PROG, 16'(BLK_ADDR[b][13:0] + 14'(i)), 1'b1, '0, d, ws);
        checks++;
        if (d != image[b][i] || ws != 0) begin
          failures++;
          bad++;
          if (bad < 5)
            $display("FAIL program %h: %h (%0d wait-states), expected %h", BLK_ADDR[b][13:0] + 14'(i),
                     d, ws, image[b][i]);
        end
      end
    // data space now reaches SRAM2: a write there leaves the program alone
    bus(SP_DATA, 16'h4020, 1'b0, ~image[0][0], d, ws);
    bus(SP_DATA, 16'h4020, 1'b1, '0, d, ws);
    chk(d == ~image[0][0] && ws == 0, $sformatf("SRAM2 data word %h", d));
    bus(SP_PROG, 16'h0020, 1'b1, '0, d, ws);
    chk(d == image[0][0], $sformatf("program word at 20h %h after the SRAM2 write", d));

    // ---- the application: interrupt-driven receive, and a transmit ----
    uart_wr(1, 8'h01);                               // received-data interrupt on
    fork u_uart.host_send("k"); join_none
    ws = 0;
    while (dsp_int1_n && ws < 20_000) begin @(negedge clk); ws++; end
    chk(!dsp_int1_n, "UART interrupt reaches INT1");
    uart_rd(0, c);
    chk(c == "k", $sformatf("character %h read in the interrupt", c));
    repeat (4) @(negedge clk);
    chk(dsp_int1_n, "INT1 released after the read");
    uart_wr(0, "K");
    chk(tx_count == 1 && tx_last == "K", $sformatf("%0d characters sent, last %h", tx_count, tx_last));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
