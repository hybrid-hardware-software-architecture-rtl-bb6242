// ready_unit: handshake flags towards the processor.
//
// ready_to_receive is high while the input buffer is empty and the network
// is idle: the processor may then send a new set of weights and inputs.
// ready_to_send is high while the output buffer is full: the processor may
// collect the results. Both flags are decoded from registered buffer counts
// and the engine's state register, so they follow the buffers in the same
// cycle and never show a stale value after a buffer changes. An interrupt
// line combines them under two enable bits, and rise_rtr / rise_rts pulse for
// one cycle after each rising edge of the flags.
// The two flags follow the original system; the interrupt, its enables and the
// edge pulses are this design's choices.
module ready_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic in_empty,
  input  logic nn_busy,
  input  logic out_full,
  input  logic irq_en_rtr,
  input  logic irq_en_rts,
  output logic ready_to_receive,
  output logic ready_to_send,
  output logic rise_rtr,
  output logic rise_rts,
  output logic irq
);

  logic rtr_q, rts_q;

  assign ready_to_receive = in_empty && !nn_busy;
  assign ready_to_send    = out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rtr_q    <= 1'b0;
      rts_q    <= 1'b0;
      rise_rtr <= 1'b0;
      rise_rts <= 1'b0;
    end else begin
      rtr_q    <= ready_to_receive;
      rts_q    <= ready_to_send;
      rise_rtr <= ready_to_receive && !rtr_q;
      rise_rts <= ready_to_send && !rts_q;
    end
  end

  assign irq = (irq_en_rtr && ready_to_receive) || (irq_en_rts && ready_to_send);

endmodule
