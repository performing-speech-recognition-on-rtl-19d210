// lm_block: language model block of the Viterbi decoder.
//
// Without an explicit language model, every HMM's first state may be entered
// from the exit of whichever HMM had the cheapest exit in the previous frame.
// While a file's pass runs, this block tracks the minimum exit cost and which
// HMM produced it (ties keep the lower index); at the end of the pass both
// are stored for that file and used during the file's next pass. It also
// holds the between-HMM (entry) cost of each HMM in a small distributed RAM,
// loaded through the write port and read with one cycle of latency.
// The single shared predecessor and the distributed RAM follow the published design;
// how the entry cost is applied (added to the best exit) is this design's.
module lm_block
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49,
  localparam int MW = (N_HMM > 1) ? $clog2(N_HMM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // entry cost RAM
  input  logic          ent_we,
  input  logic [MW-1:0] ent_waddr,
  input  cost_t         ent_wdata,
  input  logic          ent_rd_en,
  input  logic [MW-1:0] ent_raddr,
  output cost_t         ent_rdata,
  // observe model exits
  input  logic          obs_valid,
  input  logic          obs_first,
  input  logic [MW-1:0] obs_hmm,
  input  cost_t         obs_exit,
  input  logic          pass_done,
  input  logic [1:0]    pass_file,
  // best exit of the file's previous frame
  input  logic [1:0]    file,
  output cost_t         best_cost,
  output logic [MW-1:0] best_hmm,
  // best exit of the pass just completed (valid with pass_done)
  output logic [MW-1:0] run_hmm_q
);
  cost_t         ent_mem [N_HMM];
  cost_t         run_cost;
  logic [MW-1:0] run_hmm;
  cost_t         best_cost_q [FILES];
  logic [MW-1:0] best_hmm_q  [FILES];

  always_ff @(posedge clk) begin
    if (ent_we) ent_mem[ent_waddr] <= ent_wdata;
    if (ent_rd_en) ent_rdata <= ent_mem[ent_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cost <= COST_INF;
      run_hmm  <= '0;
      for (int f = 0; f < FILES; f++) begin
        best_cost_q[f] <= COST_INF;
        best_hmm_q[f]  <= '0;
      end
    end else begin
      if (obs_valid && (obs_first || obs_exit < run_cost)) begin
        run_cost <= obs_exit;
        run_hmm  <= obs_hmm;
      end
      if (pass_done) begin
        best_cost_q[pass_file] <= run_cost;
        best_hmm_q[pass_file]  <= run_hmm;
      end
    end
  end

  assign run_hmm_q = run_hmm;
  assign best_cost = (file < 2'(FILES)) ? best_cost_q[file] : COST_INF;
  assign best_hmm  = (file < 2'(FILES)) ? best_hmm_q[file]  : '0;
endmodule
