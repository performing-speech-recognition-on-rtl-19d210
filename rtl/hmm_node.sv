// hmm_node: one Viterbi node, equations (2) and (3) for one state.
//
// A state j can be reached from itself (self loop) or from the state before
// it. The node adds the transition costs to the previous frame's path costs,
// keeps the cheaper candidate, and adds the state's observation cost:
//   delta = min(self_cost + self_trans, prev_cost + prev_trans) + b
//   psi   = 1 if the "previous" candidate won, 0 for the self loop.
// Ties go to the self loop. All arithmetic saturates (hmm_pkg::cost_add), so
// an impossible path (COST_INF) stays impossible. Purely combinational.
module hmm_node
  import hmm_pkg::*;
(
  input  cost_t self_cost,
  input  cost_t self_trans,
  input  cost_t prev_cost,
  input  cost_t prev_trans,
  input  cost_t b,
  output cost_t delta,
  output logic  psi
);
  cost_t c_self, c_prev;
  always_comb begin
    c_self = cost_add(self_cost, self_trans);
    c_prev = cost_add(prev_cost, prev_trans);
    psi    = c_prev < c_self;
    delta  = cost_add(psi ? c_prev : c_self, b);
  end
endmodule
