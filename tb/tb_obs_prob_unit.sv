// tb_obs_prob_unit: streams three back-to-back frames of model data (4 HMMs,
// 12 states, 40 elements each) with the observation during the first state,
// as the sequencer does. Values are multiples of 1/4 and 1/8 so every float
// operation is exact and the expected fixed-point costs can be computed with
// real numbers. After each frame_done the finished page is read back (while
// the next frame is already being computed into the other page) and every
// cost is compared. frame_done must repeat every 3*N*40 cycles and follow the
// frame's last beat by the pipeline latency.
module tb_obs_prob_unit;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 4, NS = 3 * N, T = 3, LAT = 6;
  logic clk = 0, rst_n = 0;
  logic model_valid = 0, obs_valid = 0, frame_done, ready_page, rd_en = 0;
  model_beat_t model = '0;
  logic [31:0] obs = 0;
  logic [1:0] rd_hmm = 0;
  tri_cost_t rd_data;
  real mean_v [NS][40], wgt_v [NS][40], obs_v [T][39];
  longint expc [T][NS];
  int checks = 0, failures = 0, frames_seen = 0;
  longint cyc = 0, last_beat_cyc [T], done_cyc [T];

  obs_prob_unit #(.N_HMM(N)) dut (.clk, .rst_n, .model_valid, .model, .obs_valid, .obs,
    .frame_done, .ready_page, .rd_en, .rd_hmm, .rd_data);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int e = 0; e < 39; e++) begin
        mean_v[s][e] = real'(int'($urandom % 17) - 8) / 4.0;
        wgt_v[s][e]  = real'(1 + $urandom % 8) / 8.0;
      end
      mean_v[s][39] = 0.0;
      wgt_v[s][39]  = real'($urandom % 400) / 4.0;
    end
    for (int t = 0; t < T; t++) begin
      for (int e = 0; e < 39; e++) obs_v[t][e] = real'(int'($urandom % 17) - 8) / 4.0;
      for (int s = 0; s < NS; s++) begin
        real acc;
        acc = wgt_v[s][39];
        for (int e = 0; e < 39; e++)
          acc += (obs_v[t][e] - mean_v[s][e]) * (obs_v[t][e] - mean_v[s][e]) * wgt_v[s][e];
        expc[t][s] = longint'(acc * 256.0);
      end
    end
  end

  // stimulus: contiguous frames
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++)
      for (int s = 0; s < NS; s++)
        for (int e = 0; e < 40; e++) begin
          @(negedge clk);
          model_valid = 1;
          model.sof  = (s == 0 && e == 0);
          model.mean = r2f(mean_v[s][e]);
          model.wgt  = r2f(wgt_v[s][e]);
          obs_valid  = (s == 0 && e < 39);
          obs        = obs_valid ? r2f(obs_v[t][e]) : $urandom;
          if (s == NS - 1 && e == 39) last_beat_cyc[t] = cyc;
        end
    @(negedge clk);
    model_valid = 0; obs_valid = 0;
  end

  // read back each finished frame
  initial begin
    @(posedge rst_n);
    for (int t = 0; t < T; t++) begin
      @(posedge clk);
      while (!frame_done) @(posedge clk);
      done_cyc[t] = cyc;
      checks++;
      if (done_cyc[t] - last_beat_cyc[t] != LAT) begin
        failures++;
        $display("FAIL latency %0d", done_cyc[t] - last_beat_cyc[t]);
      end
      if (t > 0) begin
        checks++;
        if (done_cyc[t] - done_cyc[t-1] != NS * 40) failures++;
      end
      for (int m = 0; m < N; m++) begin
        @(negedge clk);
        rd_en = 1; rd_hmm = 2'(m);
        @(negedge clk);
        rd_en = 0;
        for (int j = 0; j < 3; j++) begin
          cost_t g;
          g = (j == 0) ? rd_data.s0 : (j == 1) ? rd_data.s1 : rd_data.s2;
          checks++;
          if (longint'(g) != expc[t][3*m+j]) begin
            failures++;
            $display("FAIL frame %0d hmm %0d state %0d: got %0d exp %0d", t, m, j, g, expc[t][3*m+j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
