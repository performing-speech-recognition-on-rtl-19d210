// delta_buffer: stores the path costs of every state of every HMM for all
// FILES speech files between frames, so the three files can be interleaved
// in one decoder. Entry file*N_HMM + hmm holds the three states of one HMM.
// Simple dual-port RAM: one write and one registered read (latency 1) per
// cycle. The published design gives its purpose; the organisation is this design's.
module delta_buffer
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49,
  localparam int MW = (N_HMM > 1) ? $clog2(N_HMM) : 1,
  localparam int AW = $clog2(FILES * N_HMM)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [1:0]    wr_file,
  input  logic [MW-1:0] wr_hmm,
  input  tri_cost_t     wr_data,
  input  logic          rd_en,
  input  logic [1:0]    rd_file,
  input  logic [MW-1:0] rd_hmm,
  output tri_cost_t     rd_data
);
  tri_cost_t mem [FILES * N_HMM];
  logic [AW-1:0] wa, ra;
  assign wa = AW'(wr_file) * AW'(N_HMM) + AW'(wr_hmm);
  assign ra = AW'(rd_file) * AW'(N_HMM) + AW'(rd_hmm);

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wr_data;
    if (rd_en) rd_data <= mem[ra];
  end
endmodule
