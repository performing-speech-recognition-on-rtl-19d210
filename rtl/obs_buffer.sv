// obs_buffer: holds one observation vector of VEC_LEN floating-point
// elements for one speech file.
//
// The observation is read from the board RAM only once per frame. While it
// arrives (`load` high, element `idx`) it is written here and passed straight
// through to the datapath, so the first state of a frame needs no extra
// pass. For every later state of the frame the stored vector is replayed by
// `idx`. Index VEC_LEN returns the constant 1.0: the per-state constant of
// the log-Gaussian is handled as a fortieth element whose "observation" is
// 1.0, whose mean is 0 and whose weight is the constant itself. The read is
// combinational (a small distributed RAM); the write is clocked.
module obs_buffer
  import hmm_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  logic [5:0] idx,
  input  fp_t        din,
  output fp_t        dout
);
  fp_t mem [VEC_LEN];

  always_ff @(posedge clk) begin
    if (load && idx < 6'(VEC_LEN)) mem[idx] <= din;
  end

  always_comb begin
    if (idx >= 6'(VEC_LEN)) dout = FP_ONE;
    else if (load)          dout = din;
    else                    dout = mem[idx];
  end
endmodule
