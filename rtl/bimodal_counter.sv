// bimodal_counter: next-state and decode logic of the two-bit bimodal
// branch counter.
//
// The counter moves one state toward "taken" (adds one) when the resolved
// branch was taken and one state toward "not taken" (subtracts one) when it
// was not, saturating at 00 (strongly not taken) and 11 (strongly taken).
// The first (upper) bit is the predicted direction. All of this is the
// predictor's original definition. Purely combinational: the state itself is
// stored in the BTB entry.
//
// Ports
//   state_i   current counter state
//   taken_i   outcome of the resolved branch
//   next_o    state after the update
//   taken_o   prediction of state_i (1 = taken)
//   strong_o  state_i is a strong state (00 or 11)
module bimodal_counter
  import spe_bp_pkg::*;
(
  input  ctr_t state_i,
  input  logic taken_i,
  output ctr_t next_o,
  output logic taken_o,
  output logic strong_o
);

  always_comb begin
    next_o = state_i;
    if (taken_i && state_i != CTR_STRONG_T)
      next_o = ctr_t'(state_i + 2'd1);
    else if (!taken_i && state_i != CTR_STRONG_NT)
      next_o = ctr_t'(state_i - 2'd1);
  end

  assign taken_o  = ctr_taken(state_i);
  assign strong_o = ctr_strong(state_i);

endmodule
