// prob_buffer: holds the fixed-point observation costs b_j(O_t) of every
// state of every HMM for one speech file, until the Viterbi decoder takes
// them.
//
// Costs arrive one at a time (one every ELEMS cycles) and are written to
// (page, hmm, state). The buffer has two pages: the observation probability
// unit fills one page with frame t+1 while the decoder reads frame t from the
// other. The decoder reads all three states of one HMM per cycle; read data
// is registered (latency 1). Storage is one array per state so that a whole
// HMM is read at once. The double page is this design's choice; the published design
// says only that probabilities are buffered until all HMMs are done.
module prob_buffer
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49,
  localparam int MW = (N_HMM > 1) ? $clog2(N_HMM) : 1,
  localparam int LW = $clog2(2 * N_HMM)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wr_page,
  input  logic [MW-1:0] wr_hmm,
  input  logic [1:0]    wr_state,
  input  cost_t         wr_cost,
  input  logic          rd_en,
  input  logic          rd_page,
  input  logic [MW-1:0] rd_hmm,
  output tri_cost_t     rd_data
);
  cost_t mem0 [2*N_HMM];
  cost_t mem1 [2*N_HMM];
  cost_t mem2 [2*N_HMM];

  // Page p, HMM m lives at entry p*N_HMM + m.
  logic [LW-1:0] wa_lin, ra_lin;
  assign wa_lin = LW'(wr_page ? N_HMM : 0) + LW'(wr_hmm);
  assign ra_lin = LW'(rd_page ? N_HMM : 0) + LW'(rd_hmm);

  always_ff @(posedge clk) begin
    if (we) begin
      case (wr_state)
        2'd0:    mem0[wa_lin] <= wr_cost;
        2'd1:    mem1[wa_lin] <= wr_cost;
        default: mem2[wa_lin] <= wr_cost;
      endcase
    end
    if (rd_en) begin
      rd_data.s0 <= mem0[ra_lin];
      rd_data.s1 <= mem1[ra_lin];
      rd_data.s2 <= mem2[ra_lin];
    end
  end
endmodule
