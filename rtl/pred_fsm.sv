// pred_fsm: next state of the prediction bits kept with each BTB entry.
//
// With BITS = 1 the state is the last outcome of the branch: it becomes 1 when
// the branch is taken and 0 when it is not, and it is also the prediction.
// With BITS = 2 the state is a saturating counter: 0 strong not-taken, 1 weak
// not-taken, 2 weak taken, 3 strong taken.  A taken outcome increments it up to
// 3, a not-taken outcome decrements it down to 0, and the branch is predicted
// taken when the counter is 2 or 3 (its upper bit).  For any other BITS the same
// saturating rule applies with the maximum 2**BITS - 1.  Both schemes and their
// state numbering are the ones of the pipeline description.  Combinational.
module pred_fsm #(
  parameter int unsigned BITS = 2
) (
  input  logic [BITS-1:0] state,
  input  logic            taken,
  output logic [BITS-1:0] next_state,
  output logic            predict_taken
);
  always_comb begin
    if (taken) next_state = (state == '1) ? state : state + 1'b1;
    else       next_state = (state == '0) ? state : state - 1'b1;
  end

  assign predict_taken = state[BITS-1];
endmodule
