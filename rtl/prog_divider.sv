// Programmable frequency divider.
//
// A load register and a down counter. The counter runs on the 25 MHz
// reference (enable ce); when it reaches zero it reloads the register's value
// on the next count and goes on counting, so it passes through zero once every
// LOAD+1 counts. The output tick is high for the one clock in which the
// counter is zero and ce is high: its rate is f(ce) / (LOAD + 1). A load value
// of 0 is not meant to be used; here it gives a tick on every ce.
//
// The register can be written at any time (load_we for one clock); the new
// value is used at the next reload. Used with W = 16 by the S/P/D speed timer
// and with W = 8 by the PWM waveform generator.
module prog_divider #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         load_we,
  input  logic [W-1:0] load_val,
  output logic         tick
);

  logic [W-1:0] load_q;
  logic [W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       load_q <= '0;
    else if (load_we) load_q <= load_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (ce) begin
      if (cnt_q == '0) cnt_q <= load_q;
      else             cnt_q <= cnt_q - 1'b1;
    end
  end

  assign tick = ce && (cnt_q == '0);

endmodule
