// tb_lm_block: loads the entry-cost RAM and reads it back; observes passes
// of random model exit costs for the three files and checks that each file's
// stored best exit (cost and HMM, lower index on ties) is the minimum of its
// last pass.
module tb_lm_block;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic ent_we = 0, ent_rd_en = 0, obs_valid = 0, obs_first = 0, pass_done = 0;
  logic [3:0] ent_waddr = 0, ent_raddr = 0, obs_hmm = 0, best_hmm, run_hmm_q;
  cost_t ent_wdata = 0, ent_rdata, obs_exit = 0, best_cost;
  logic [1:0] pass_file = 0, file = 0;
  cost_t ent_ref [N];
  longint bc [3];
  int bh [3];
  int checks = 0, failures = 0;

  lm_block #(.N_HMM(N)) dut (.clk, .rst_n, .ent_we, .ent_waddr, .ent_wdata, .ent_rd_en,
    .ent_raddr, .ent_rdata, .obs_valid, .obs_first, .obs_hmm, .obs_exit, .pass_done,
    .pass_file, .file, .best_cost, .best_hmm, .run_hmm_q);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      ent_we = 1; ent_waddr = 4'(m); ent_wdata = cost_t'($urandom % 10000); ent_ref[m] = ent_wdata;
    end
    @(negedge clk); ent_we = 0;
    for (int m = 0; m < N; m++) begin
      @(negedge clk); ent_rd_en = 1; ent_raddr = 4'(m);
      @(negedge clk); ent_rd_en = 0;
      checks++; if (ent_rdata != ent_ref[m]) failures++;
    end
    for (int round = 0; round < 10; round++) begin
      for (int f = 0; f < 3; f++) begin
        longint mc; int mh;
        mc = INF + 1; mh = 0;
        for (int m = 0; m < N; m++) begin
          @(negedge clk);
          obs_valid = 1; obs_first = (m == 0); obs_hmm = 4'(m);
          obs_exit = ($urandom % 5 == 0) ? COST_INF : cost_t'($urandom % 50);  // ties likely
          if (round == 0) obs_exit = 7;  // all equal: lowest index must win
          if (longint'(obs_exit) < mc) begin mc = obs_exit; mh = m; end
        end
        @(negedge clk);
        obs_valid = 0; pass_done = 1; pass_file = 2'(f);
        #1 checks++; if (run_hmm_q != 4'(mh)) failures++;
        @(negedge clk);
        pass_done = 0;
        bc[f] = mc; bh[f] = mh;
      end
      for (int f = 0; f < 3; f++) begin
        file = 2'(f);
        #1 checks++;
        if (longint'(best_cost) != bc[f] || best_hmm != 4'(bh[f])) begin
          failures++;
          $display("FAIL file %0d: %0d/%0d exp %0d/%0d", f, best_cost, best_hmm, bc[f], bh[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
