// Divide-by-two of the 50 MHz system clock.
//
// A toggle flip-flop makes the 25 MHz reference that the S/P/D and PWM
// dividers count. Inside this design the reference is not used as a clock:
// ce25 is a one-clock enable, high on every second 50 MHz cycle (the cycle in
// which clk25 is high), so all logic stays on one clock.
//
// Interface: clk (50 MHz), rst_n (active low, asynchronous). Outputs clk25
// (the toggle flip-flop's level) and ce25 (enable). After reset clk25 is 0 and
// ce25 first rises one clock later.
module clk_div2 (
  input  logic clk,
  input  logic rst_n,
  output logic clk25,
  output logic ce25
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk25 <= 1'b0;
    else        clk25 <= ~clk25;
  end

  assign ce25 = clk25;

endmodule
