// hmm_processor: the three Viterbi nodes of one left-to-right HMM.
//
// Every node depends only on the previous frame's path costs, so all three
// states of an HMM are updated in the same cycle; one HMM is processed per
// cycle. Node 0 chooses between its self loop and entry from the best model
// exit supplied by the language model block (plus the HMM's entry cost);
// nodes 1 and 2 choose between their self loop and the state before. The
// outputs, new path costs and the three predecessor bits, are registered
// (latency 1). The exit cost of the model's last state plus its exit
// transition is also registered for the language model block. Three nodes per
// HMM follow the published design; the registered output is this design's choice.
module hmm_processor
  import hmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  tri_cost_t prev,      // scaled path costs of frame t-1
  input  cost_t     lm_cost,   // scaled best model exit of frame t-1
  input  cost_t     a_entry,   // entry (between-HMM) cost of this HMM
  input  trans_t    trans,
  input  tri_cost_t b,         // observation costs of frame t
  output logic      out_valid,
  output tri_cost_t delta,
  output logic [2:0] psi,
  output cost_t     exit_cost  // delta.s2 + a2x
);
  tri_cost_t d;
  logic [2:0] p;

  hmm_node u_n0 (.self_cost(prev.s0), .self_trans(trans.a00),
                 .prev_cost(lm_cost), .prev_trans(a_entry),
                 .b(b.s0), .delta(d.s0), .psi(p[0]));
  hmm_node u_n1 (.self_cost(prev.s1), .self_trans(trans.a11),
                 .prev_cost(prev.s0), .prev_trans(trans.a01),
                 .b(b.s1), .delta(d.s1), .psi(p[1]));
  hmm_node u_n2 (.self_cost(prev.s2), .self_trans(trans.a22),
                 .prev_cost(prev.s1), .prev_trans(trans.a12),
                 .b(b.s2), .delta(d.s2), .psi(p[2]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      delta     <= '0;
      psi       <= '0;
      exit_cost <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        delta     <= d;
        psi       <= p;
        exit_cost <= cost_add(d.s2, trans.a2x);
      end
    end
  end
endmodule
