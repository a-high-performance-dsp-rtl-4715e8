// Speed / position / direction (S/P/D) decoder for a quadrature encoder.
//
// Inputs are the encoder's A and B pulse trains (90 degrees apart) and its
// once-per-revolution index I. Three independent parts keep values the DSP
// can read at any time:
//
//  Speed. A 16-bit programmable divider (prog_divider) on the 25 MHz
//  reference sets the time unit, (LOAD+1) * 40 ns. A toggle flip-flop flips at
//  every rise of A. While it is 1 the 16-bit timer counts divider ticks; while
//  it is 0 the timer is held at zero. When the toggle falls, the timer value
//  is copied into the speed register (input port 1). So every other
//  rise-to-rise period of A is measured, and the register holds the last one,
//  in time units. Software turns the time into speed. The timer wraps at 2**16.
//
//  Position. A 12-bit counter counts up at every fall of A and is cleared
//  while the index is active; index_active_high chooses the index polarity
//  (a jumper on the board). A latch copy of the counter is read on input port
//  2, bits 11..0.
//
//  Direction. B is latched at every rise of A: 0 when A leads B (positive
//  direction), 1 when B leads A. It is bit 15 of input port 2.
//
// The encoder lines are synchronised to the 50 MHz clock and their edges
// detected there; on the board the lines clock the flip-flops directly. Divider
// writes: div_we for one clock with the load value on wdata[DIV_W-1:0].
module spd_input #(
  parameter int unsigned DIV_W = 16,
  parameter int unsigned TMR_W = 16,
  parameter int unsigned POS_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce25,
  input  logic             div_we,
  input  logic [15:0]      wdata,
  input  logic             enc_a,
  input  logic             enc_b,
  input  logic             enc_i,
  input  logic             index_active_high,
  output logic [TMR_W-1:0] speed_time,
  output logic [POS_W-1:0] position,
  output logic             direction
);

  logic a_s, b_s, i_s, a_d;
  logic a_rise, a_fall, index_act;
  logic tick;
  logic tog_q;
  logic [TMR_W-1:0] tmr_q;
  logic [POS_W-1:0] pos_cnt_q;

  sync2 u_sync_a (.clk, .rst_n, .d(enc_a), .q(a_s));
  sync2 u_sync_b (.clk, .rst_n, .d(enc_b), .q(b_s));
  sync2 u_sync_i (.clk, .rst_n, .d(enc_i), .q(i_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_d <= 1'b0;
    else        a_d <= a_s;
  end

  assign a_rise    = a_s && !a_d;
  assign a_fall    = !a_s && a_d;
  assign index_act = (i_s == index_active_high);

  prog_divider #(.W(DIV_W)) u_div (
    .clk, .rst_n, .ce(ce25), .load_we(div_we), .load_val(wdata[DIV_W-1:0]), .tick
  );

  // Toggle flip-flop, timer and speed register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_q      <= 1'b0;
      tmr_q      <= '0;
      speed_time <= '0;
    end else begin
      if (a_rise) tog_q <= !tog_q;
      if (!tog_q)    tmr_q <= '0;
      else if (tick) tmr_q <= tmr_q + 1'b1;
      if (a_rise && tog_q) speed_time <= tmr_q;
    end
  end

  // Position counter and its latch, direction flip-flop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_cnt_q <= '0;
      position  <= '0;
      direction <= 1'b0;
    end else begin
      if (index_act)   pos_cnt_q <= '0;
      else if (a_fall) pos_cnt_q <= pos_cnt_q + 1'b1;
      position <= pos_cnt_q;
      if (a_rise) direction <= b_s;
    end
  end

endmodule
