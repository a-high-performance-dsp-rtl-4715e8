// READY (wait-state) generator.
//
// The DSP samples READY at the end of every instruction cycle of an external
// access; each sample of 0 adds one wait-state. READY is high unless a slow
// device is selected. Two register stages, updated at instruction-cycle edges
// (cyc_en), count the wait-states:
//   ws1_req  sets stage 1 at the next edge            -> one wait-state
//   ws2_req  sets stage 2, which sets stage 1 an edge later -> two
//   hold_req keeps READY low with no stage set; the device's own counter
//            raises ws1_req when it is nearly done (the UART uses this to get
//            five wait-states)
// READY = !(access && slow) || stage1. Both stages clear at the edge where an
// access completes (done), so back-to-back accesses each get their full count.
//
// Devices: EPROM two wait-states, ADC read one, UART five, everything else
// none. The stage structure follows the board; the exact gates and the
// clearing of the stages are this design's own.
module wait_state_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic cyc_en,
  input  logic access,
  input  logic ws2_req,
  input  logic ws1_req,
  input  logic hold_req,
  output logic ready,
  output logic done
);

  logic stage1_q, stage2_q;
  logic slow;

  assign slow  = ws2_req || ws1_req || hold_req;
  assign ready = !(access && slow) || stage1_q;
  assign done  = cyc_en && access && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1_q <= 1'b0;
      stage2_q <= 1'b0;
    end else if (cyc_en) begin
      if (done || !access) begin
        stage1_q <= 1'b0;
        stage2_q <= 1'b0;
      end else begin
        stage2_q <= ws2_req;
        stage1_q <= ws1_req || stage2_q;
      end
    end
  end

endmodule
