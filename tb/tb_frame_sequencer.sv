// tb_frame_sequencer: runs 3 frames with 2 HMMs and checks, cycle by cycle,
// the model address (state*40+element), the observation reads (file f during
// state f, 39 elements, consecutive addresses from 0), the one-cycle-delayed
// qualifiers, the frame length of 3*N*40 cycles and the end of the run.
module tb_frame_sequencer;
  import hmm_pkg::*;
  localparam int N = 2, T = 3, FB = 3 * N * 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_frames = T;
  logic running, model_rd_en, obs_rd_en, beat_valid, beat_sof, obs_valid;
  logic [18:0] model_addr, obs_addr;
  logic [1:0] obs_file;
  int checks = 0, failures = 0;

  frame_sequencer #(.N_HMM(N)) dut (.clk, .rst_n, .start, .num_frames, .running,
    .model_rd_en, .model_addr, .obs_rd_en, .obs_addr, .beat_valid, .beat_sof,
    .obs_valid, .obs_file);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int obs_n, prev_rd, prev_obs, prev_addr, prev_file;
    obs_n = 0; prev_rd = 0; prev_obs = 0; prev_addr = 0; prev_file = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int c = 0; c < T * FB + 5; c++) begin
      int t, k, s, e;
      bit exp_rd, exp_obs;
      t = c / FB; k = c % FB; s = k / 40; e = k % 40;
      exp_rd  = c < T * FB;
      exp_obs = exp_rd && s < 3 && e < 39;
      // outputs of this cycle, sampled before the edge
      checks++;
      if (model_rd_en != exp_rd || running != exp_rd) failures++;
      if (exp_rd) begin
        checks++;
        if (model_addr != 19'(k)) failures++;
      end
      checks++;
      if (obs_rd_en != exp_obs) failures++;
      if (exp_obs) begin
        checks++;
        if (obs_addr != 19'((t * 3 + s) * 39 + e) || obs_addr != 19'(obs_n)) failures++;
        obs_n++;
      end
      // qualifiers of the previous cycle's reads
      checks++;
      if (beat_valid != prev_rd[0] || obs_valid != prev_obs[0] ||
          beat_sof != (prev_rd[0] && prev_addr == 0) ||
          (prev_obs[0] && obs_file != 2'(prev_file))) begin
        failures++;
        if (failures < 5) $display("FAIL qualifiers at %0d", c);
      end
      prev_rd = exp_rd; prev_obs = exp_obs; prev_addr = k; prev_file = s;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
