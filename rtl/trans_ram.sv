// trans_ram: on-chip RAM holding the within-HMM transition costs (negative
// log transition probabilities) of every HMM: self loops and forward
// transitions of the three states and the exit transition of the last
// state. Loaded by the host through the write port; read one HMM per cycle
// with registered output (latency 1), as a block RAM would be. Storing these
// on chip follows the published design; the word layout (hmm_pkg::trans_t) is this
// design's.
module trans_ram
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49,
  localparam int MW = (N_HMM > 1) ? $clog2(N_HMM) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [MW-1:0] waddr,
  input  trans_t        wdata,
  input  logic          rd_en,
  input  logic [MW-1:0] raddr,
  output trans_t        rdata
);
  trans_t mem [N_HMM];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end
endmodule
