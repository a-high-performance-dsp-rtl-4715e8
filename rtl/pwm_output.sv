// Eight-channel PWM output generator.
//
// Waveform generator: an 8-bit programmable divider (prog_divider) on the
// 25 MHz reference clocks a free-running 8-bit up counter, PCNT, which wraps
// from 255 to 0 and so forms a sawtooth. The PWM repetition rate is
// 25 MHz / (256 * (LOAD + 1)), 48.8 kHz at LOAD = 1 down to 381 Hz at 255.
//
// Channels: each has an 8-bit data register and a magnitude comparator; the
// output is PCNT < DATA. A channel is high from the start of the period until
// PCNT reaches DATA, so the duty cycle is DATA / 256 (0 is reachable, 1 is
// not). Registers are written in pairs from one 16-bit word: pair_we[k]
// writes channel 2k from wdata[7:0] and channel 2k+1 from wdata[15:8]. A write
// takes effect immediately. div_we writes the divider from wdata[7:0].
module pwm_output #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned WIDTH    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce25,
  input  logic                  div_we,
  input  logic [CHANNELS/2-1:0] pair_we,
  input  logic [15:0]           wdata,
  output logic [WIDTH-1:0]      pcnt,
  output logic [CHANNELS-1:0]   pwm
);

  logic tick;
  logic [WIDTH-1:0] duty_q [CHANNELS];

  prog_divider #(.W(WIDTH)) u_div (
    .clk, .rst_n, .ce(ce25), .load_we(div_we), .load_val(wdata[WIDTH-1:0]), .tick
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pcnt <= '0;
    else if (tick) pcnt <= pcnt + 1'b1;
  end

  for (genvar k = 0; k < CHANNELS / 2; k++) begin : g_pair
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        duty_q[2*k]   <= '0;
        duty_q[2*k+1] <= '0;
      end else if (pair_we[k]) begin
        duty_q[2*k]   <= wdata[WIDTH-1:0];
        duty_q[2*k+1] <= wdata[8 +: WIDTH];
      end
    end
  end

  for (genvar c = 0; c < CHANNELS; c++) begin : g_cmp
    assign pwm[c] = (pcnt < duty_q[c]);
  end

endmodule
