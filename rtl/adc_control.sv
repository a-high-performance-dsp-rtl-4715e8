// ADC conversion control.
//
// Any write to output port 5 starts a conversion: while the start strobe is
// active a 4-bit down counter is loaded with SAMPLE_LOAD (5); after it, the
// counter counts down once per instruction cycle (cyc_en) to zero and holds.
// While the count is nonzero (five instruction cycles, 400 ns at 80 ns per
// cycle) the ADC is chip-selected and in sample mode, and its read line is
// masked so that DSP bus activity cannot look like an ADC read. Then the ADC
// is deselected and put in hold; it finishes the conversion on its own and
// interrupts the DSP, which reads the result from input port 5 (the read
// select chip-selects the ADC again, and RD follows R/W).
//
// The "idle" node is the NOR of counter bits 2..0, as on the board:
//   adc_cs_n = !read_sel && idle
//   adc_rd_n = !(rw && idle)
//   adc_sh   = idle            (0 = sample, 1 = hold)
// The counter loads synchronously here; on the board the load is asynchronous.
module adc_control
  import motor_ctrl_pkg::*;
#(
  parameter logic [3:0] SAMPLE_LOAD = ADC_SAMPLE_LOAD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cyc_en,
  input  logic start,
  input  logic read_sel,
  input  logic rw,
  output logic adc_cs_n,
  output logic adc_rd_n,
  output logic adc_sh,
  output logic sampling
);

  logic [3:0] cnt_q;
  logic       idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt_q <= '0;
    else if (start)              cnt_q <= SAMPLE_LOAD;
    else if (cyc_en && !idle)    cnt_q <= cnt_q - 1'b1;
  end

  assign idle     = (cnt_q[2:0] == 3'b000);
  assign sampling = !idle;
  assign adc_cs_n = !read_sel && idle;
  assign adc_rd_n = !(rw && idle);
  assign adc_sh   = idle;

endmodule
