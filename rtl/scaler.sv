// scaler: keeps path costs in range and prunes unlikely paths.
//
// Costs grow every frame. While the decoder writes a file's new path costs
// (observe port) the scaler tracks their minimum; at the end of the pass the
// minimum is stored for that file. When the costs are read back in the next
// frame (apply port, combinational) the stored minimum is subtracted, so the
// best path restarts at 0, and any cost more than PRUNE_TH above the best is
// replaced by COST_INF, removing that path. The best model exit cost is
// rescaled the same way. `pruned` flags which of the three states were cut.
// Subtracting the frame minimum and the beam threshold are this design's
// reading of "scales the probabilities, removing those corresponding to the
// least likely paths".
module scaler
  import hmm_pkg::*;
#(
  parameter cost_t PRUNE_TH = cost_t'(250 <<< COST_FRAC)
) (
  input  logic       clk,
  input  logic       rst_n,
  // observe: new path costs as the HMM processor produces them
  input  logic       obs_valid,
  input  logic       obs_first,   // first HMM of a pass
  input  tri_cost_t  obs_delta,
  input  logic       pass_done,   // latch the minimum for pass_file
  input  logic [1:0] pass_file,
  // apply: path costs of the previous frame being read back
  input  logic [1:0] file,
  input  tri_cost_t  din,
  input  cost_t      lm_in,
  output tri_cost_t  dout,
  output cost_t      lm_out,
  output logic [2:0] pruned
);
  cost_t run_min, run_min_next;
  cost_t min_q [FILES];

  function automatic cost_t cmin(cost_t a, cost_t b);
    return (a < b) ? a : b;
  endfunction

  always_comb begin
    run_min_next = cmin(cmin(obs_delta.s0, obs_delta.s1), obs_delta.s2);
    if (!obs_first) run_min_next = cmin(run_min_next, run_min);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_min <= COST_INF;
      for (int f = 0; f < FILES; f++) min_q[f] <= '0;
    end else begin
      if (obs_valid) run_min <= run_min_next;
      if (pass_done) min_q[pass_file] <= run_min;
    end
  end

  function automatic cost_t rescale(cost_t x, cost_t m, output logic cut);
    logic signed [COST_W:0] d;
    cut = 1'b0;
    if (x == COST_INF) return COST_INF;
    d = $signed({x[COST_W-1], x}) - $signed({m[COST_W-1], m});
    if (d > $signed({PRUNE_TH[COST_W-1], PRUNE_TH})) begin
      cut = 1'b1;
      return COST_INF;
    end
    if (d < $signed({COST_NEG[COST_W-1], COST_NEG})) return COST_NEG;
    return d[COST_W-1:0];
  endfunction

  cost_t m_sel;
  logic  lm_cut;
  always_comb begin
    m_sel   = (file < 2'(FILES)) ? min_q[file] : '0;
    dout.s0 = rescale(din.s0, m_sel, pruned[0]);
    dout.s1 = rescale(din.s1, m_sel, pruned[1]);
    dout.s2 = rescale(din.s2, m_sel, pruned[2]);
    lm_out  = rescale(lm_in, m_sel, lm_cut);
  end
endmodule
