// init_switch: initialisation and switching block of the Viterbi decoder.
//
// It routes the observation costs of the file being decoded (one of FILES
// observation probability units) and that file's rescaled previous path costs
// and best model exit to the HMM processor, together with the HMM's
// transition and entry costs. At the first frame of an observation sequence
// it initialises instead: every previous path cost becomes COST_INF and the
// best exit becomes 0, so only the first state of each HMM can start, at the
// HMM's entry cost. Outputs are registered (latency 1).
module init_switch
  import hmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       first,           // first frame of the sequence
  input  logic [1:0] file,
  input  tri_cost_t  b_all [FILES],   // observation costs from each unit
  input  tri_cost_t  prev_scaled,
  input  cost_t      lm_scaled,
  input  trans_t     trans_in,
  input  cost_t      entry_in,
  output logic       out_valid,
  output tri_cost_t  prev,
  output cost_t      lm_cost,
  output tri_cost_t  b,
  output trans_t     trans,
  output cost_t      a_entry
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prev      <= '0;
      lm_cost   <= '0;
      b         <= '0;
      trans     <= '0;
      a_entry   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (first) begin
          prev    <= '{COST_INF, COST_INF, COST_INF};
          lm_cost <= '0;
        end else begin
          prev    <= prev_scaled;
          lm_cost <= lm_scaled;
        end
        b       <= (file < 2'(FILES)) ? b_all[file] : '0;
        trans   <= trans_in;
        a_entry <= entry_in;
      end
    end
  end
endmodule
