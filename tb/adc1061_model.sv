// Behavioural model of a 10-bit half-flash ADC with sample/hold control, for
// simulation only (not synthesizable logic).
//
// The input voltage is given as the code it converts to (vin_code). While the
// part is chip-selected with S/H low it samples; when S/H goes high it holds
// the sample and, CONV_NS later, presents the result and pulls intr_n low. A
// read (cs_n and rd_n low) clears the interrupt. db always shows the last
// result. protocol_errors counts reads attempted while sampling.
module adc1061_model #(
  parameter int CONV_NS       = 1200,
  parameter int MIN_SAMPLE_NS = 100
) (
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       sh,
  input  logic [9:0] vin_code,
  output logic [9:0] db,
  output logic       intr_n,
  output int         conversions,
  output int         protocol_errors
);

  logic [9:0] sample = '0;
  bit         sampled = 0;

  initial begin
    db = '0;
    intr_n = 1'b1;
    conversions = 0;
    protocol_errors = 0;
  end

  realtime t_sample = 0;

  always @(cs_n, sh, vin_code) begin
    if (!cs_n && !sh) begin
      if (!sampled) t_sample = $realtime;
      sample  = vin_code;
      sampled = 1;
    end
  end

  // A sample shorter than MIN_SAMPLE_NS (a glitch) starts no conversion.
  always @(posedge sh) begin
    if (sampled && ($realtime - t_sample) >= MIN_SAMPLE_NS) begin
      sampled = 0;
      #(CONV_NS);
      db = sample;
      intr_n = 1'b0;
      conversions++;
    end else begin
      sampled = 0;
    end
  end

  always @(negedge rd_n or negedge cs_n) begin
    if (!cs_n && !rd_n) begin
      if (!sh) protocol_errors++;
      else     intr_n = 1'b1;
    end
  end

endmodule
