// fp_to_fixed: converts a state's floating-point negative log probability
// into the signed fixed-point cost used by the Viterbi decoder.
//
// The cost has COST_FRAC fractional bits; the conversion rounds half away
// from zero and saturates to [COST_NEG, COST_INF] (hmm_pkg::fp_to_cost).
// Latency 1; the tag travels alongside. The published design states that the result
// is converted to fixed point; the format and rounding are this design's.
module fp_to_fixed
  import hmm_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  fp_t              x,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output cost_t            cost
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      cost      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        cost    <= fp_to_cost(x);
      end
    end
  end
endmodule
