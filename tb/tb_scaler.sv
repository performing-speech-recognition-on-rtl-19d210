// tb_scaler: for each of three files a pass of random path costs is observed
// and the minimum latched; then read-back costs are checked to be rescaled by
// that file's minimum, pruned to COST_INF beyond the threshold, and COST_INF
// kept as is. The best-exit cost is rescaled the same way.
module tb_scaler;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  localparam cost_t TH = 1000;
  logic clk = 0, rst_n = 0;
  logic obs_valid = 0, obs_first = 0, pass_done = 0;
  logic [1:0] pass_file = 0, file = 0;
  tri_cost_t obs_delta = '0, din = '0, dout;
  cost_t lm_in = 0, lm_out;
  logic [2:0] pruned;
  longint mins [3];
  int checks = 0, failures = 0, n_pruned = 0;

  scaler #(.PRUNE_TH(TH)) dut (.clk, .rst_n, .obs_valid, .obs_first, .obs_delta, .pass_done,
    .pass_file, .file, .din, .lm_in, .dout, .lm_out, .pruned);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint resc(longint x, longint m);
    if (x == INF) return INF;
    if (x - m > longint'(TH)) return INF;
    return x - m;
  endfunction

  function automatic cost_t rc();
    if ($urandom % 6 == 0) return COST_INF;
    return cost_t'(int'($urandom % 3000) - 500);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int f = 0; f < 3; f++) begin
        longint mn;
        mn = INF;
        for (int m = 0; m < 20; m++) begin
          @(negedge clk);
          obs_valid = 1; obs_first = (m == 0);
          obs_delta = '{rc(), rc(), rc()};
          if (obs_delta.s0 < mn) mn = obs_delta.s0;
          if (obs_delta.s1 < mn) mn = obs_delta.s1;
          if (obs_delta.s2 < mn) mn = obs_delta.s2;
        end
        @(negedge clk);
        obs_valid = 0; pass_done = 1; pass_file = 2'(f);
        @(negedge clk);
        pass_done = 0;
        mins[f] = mn;
      end
      for (int k = 0; k < 60; k++) begin
        longint e0, e1, e2, el;
        @(negedge clk);
        file = 2'($urandom % 3);
        din = '{rc(), rc(), rc()};
        lm_in = rc();
        #1;
        e0 = resc(din.s0, mins[file]); e1 = resc(din.s1, mins[file]);
        e2 = resc(din.s2, mins[file]); el = resc(lm_in, mins[file]);
        checks++;
        if (longint'(dout.s0) != e0 || longint'(dout.s1) != e1 || longint'(dout.s2) != e2 ||
            longint'(lm_out) != el) begin
          failures++;
          if (failures < 5) $display("FAIL file %0d min %0d: %0d->%0d exp %0d", file, mins[file], din.s0, dout.s0, e0);
        end
        checks++;
        if (pruned[0] != (din.s0 != COST_INF && e0 == INF)) failures++;
        if (pruned[0]) n_pruned++;
      end
    end
    checks++;
    if (n_pruned == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
