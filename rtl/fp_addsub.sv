// fp_addsub: pipelined single-precision floating-point adder/subtractor.
//
// In the observation probability unit it forms O - mu, the difference between
// an observation element and the state's mean. One operation is accepted
// every cycle; the result appears one cycle after the operands (latency 1,
// throughput 1). `sub` selects a - b instead of a + b by flipping b's sign.
// The operator itself (alignment with guard, round and sticky bits,
// normalisation, round to nearest-even) is hmm_pkg::fp_add; denormals flush
// to zero. The published design fixes only the function of this unit; the format
// and the single pipeline stage are this design's choice.
module fp_addsub
  import hmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic sub,
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
      if (in_valid) y <= fp_add(a, {b[31] ^ sub, b[30:0]});
    end
  end
endmodule
