// fp_mul: pipelined single-precision floating-point multiplier.
//
// The observation probability unit uses two of these: one as the squarer
// ((O - mu)^2, both operands tied together) and one to multiply by the
// precomputed weight 1/(2 sigma^2). The significand product is a 24x24-bit
// multiply, matching the 24-bit multipliers of the original hardware.
// Latency 1, throughput 1. Rounding is to nearest-even, denormal results
// flush to zero and overflow saturates to infinity (this design's choice).
module fp_mul
  import hmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a,
  input  fp_t  b,
  output logic out_valid,
  output fp_t  y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= fp_mul(a, b);
    end
  end
endmodule
