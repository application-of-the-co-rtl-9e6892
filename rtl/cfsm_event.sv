// cfsm_event: one-place event buffer between a CFSM that emits an event and a
// CFSM that detects it.
//
// In the co-design FSM model a sender emits an event and carries on without
// waiting; the event is kept for the receiver until the receiver detects it,
// or until the sender emits the same event again and overwrites it. This
// block is that storage, for one sender/receiver pair: a "present" flag and
// the event's value. It also gives every event at least one clock of
// reaction delay, since an event emitted in cycle t is seen in cycle t+1.
//
// Interface and timing
//   emit/emit_val   sender: pulse emit for one cycle to post an event.
//   present/val     receiver: the buffered event, valid while present = 1.
//   detect          receiver: pulse for one cycle to consume the event.
//   overwritten     one-cycle pulse, the cycle after an event that was still
//                   unread was replaced by a new one.
// Emit and detect in the same cycle: the old event is consumed and the new
// one is kept (no overwrite). Reset empties the buffer.
// The one-place depth and the overwrite rule follow the model's description;
// the port names and the same-cycle rule are this design's choices.
module cfsm_event #(
  parameter int unsigned VAL_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             emit,
  input  logic [VAL_W-1:0] emit_val,
  input  logic             detect,
  output logic             present,
  output logic [VAL_W-1:0] val,
  output logic             overwritten
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      present     <= 1'b0;
      val         <= '0;
      overwritten <= 1'b0;
    end else begin
      overwritten <= emit && present && !detect;
      if (emit) begin
        present <= 1'b1;
        val     <= emit_val;
      end else if (detect) begin
        present <= 1'b0;
      end
    end
  end

endmodule
