// Digital input latches and digital output register.
//
// Two 16-bit input words: the general purpose input (input port 0) and the
// digital position input (input port 3), for encoders that give a parallel
// position word. Each goes through a latch that follows its pins and holds
// while its port is being read, so a read sees one stable word. One 16-bit
// output register (output port 0): bits 15..3 are general purpose outputs,
// bits 2..0 select the ADC input channel.
//
// Interface: din_rd / pos_rd are the port read selects, out_we writes dout
// from wdata for one clock. Reads need no wait-states. dout resets to 0.
module digital_io (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] din_pins,
  input  logic [15:0] pos_pins,
  input  logic        din_rd,
  input  logic        pos_rd,
  input  logic        out_we,
  input  logic [15:0] wdata,
  output logic [15:0] din_word,
  output logic [15:0] pos_word,
  output logic [15:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_word <= '0;
      pos_word <= '0;
      dout     <= '0;
    end else begin
      if (!din_rd) din_word <= din_pins;
      if (!pos_rd) pos_word <= pos_pins;
      if (out_we)  dout     <= wdata;
    end
  end

endmodule
