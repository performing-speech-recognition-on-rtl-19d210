// tb_viterbi_decoder: the testbench plays the three observation probability
// units. For each of T frames it holds random observation costs per file,
// raises the three frame requests a few cycles apart (so requests queue while
// the decoder is busy), answers the decoder's reads one cycle later, and
// collects the output records. Each file's predecessor bits and best-exit
// HMM are compared with a reference decoder (tb_util_pkg::vref), and each
// pass must take N consecutive record cycles. Pruning, entries from another
// model's exit, forward transitions and queued requests must all occur.
module tb_viterbi_decoder;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 6, T = 12;
  localparam cost_t TH = 4000;
  logic clk = 0, rst_n = 0, seq_start = 0;
  logic [2:0] req = 0;
  logic b_rd_en;
  logic [2:0] b_rd_hmm;
  tri_cost_t b_all [3];
  logic trans_we = 0, ent_we = 0;
  logic [2:0] trans_waddr = 0, ent_waddr = 0;
  trans_t trans_wdata = '0;
  cost_t ent_wdata = 0;
  logic psi_valid, busy;
  psi_rec_t psi;

  longint bmat [3][][3];
  int got [3][N];
  int checks = 0, failures = 0, passes = 0, queued = 0, n_rec = 0;
  longint first_rec_cyc [3], cyc = 0;
  vref rf;

  viterbi_decoder #(.N_HMM(N), .PRUNE_TH(TH)) dut (.clk, .rst_n, .seq_start, .req,
    .b_rd_en, .b_rd_hmm, .b_all, .trans_we, .trans_waddr, .trans_wdata, .ent_we,
    .ent_waddr, .ent_wdata, .psi_valid, .psi, .busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // observation probability unit read port model
  always @(posedge clk)
    if (b_rd_en)
      for (int f = 0; f < 3; f++)
        b_all[f] <= '{cost_t'(bmat[f][b_rd_hmm][2]), cost_t'(bmat[f][b_rd_hmm][1]),
                      cost_t'(bmat[f][b_rd_hmm][0])};

  // queued requests: a request raised while the decoder is busy
  always @(posedge clk) if (req != 0 && busy) queued++;

  // collect and check records
  always @(posedge clk) begin
    if (rst_n && psi_valid) begin
      int f;
      f = int'(psi.file);
      if (!psi.is_pred) begin
        if (psi.hmm == 0) first_rec_cyc[f] = cyc;
        got[f][psi.hmm] = int'(psi.bits);
      end else begin
        rf.step(f, bmat[f]);
        passes++;
        checks++;
        if (int'(psi.hmm) != rf.pred_out || int'(psi.frame) != rf.fr[f] - 1) begin
          failures++;
          $display("FAIL file %0d frame %0d: pred %0d exp %0d", f, psi.frame, psi.hmm, rf.pred_out);
        end
        checks++;
        if (cyc - first_rec_cyc[f] != N) failures++;
        for (int m = 0; m < N; m++) begin
          checks++;
          if (got[f][m] != rf.psi_out[m]) begin
            failures++;
            $display("FAIL file %0d frame %0d hmm %0d: psi %b exp %b", f, psi.frame, m, got[f][m], rf.psi_out[m]);
          end
        end
      end
    end
  end

  initial begin
    rf = new(N, longint'(TH));
    for (int f = 0; f < 3; f++) begin
      bmat[f] = new[N];
      b_all[f] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      trans_we = 1; trans_waddr = 3'(m);
      for (int k = 0; k < 6; k++) rf.tr[m][k] = longint'($urandom % 1500);
      trans_wdata = '{cost_t'(rf.tr[m][0]), cost_t'(rf.tr[m][1]), cost_t'(rf.tr[m][2]),
                      cost_t'(rf.tr[m][3]), cost_t'(rf.tr[m][4]), cost_t'(rf.tr[m][5])};
      ent_we = 1; ent_waddr = 3'(m); rf.ent[m] = longint'($urandom % 1500);
      ent_wdata = cost_t'(rf.ent[m]);
    end
    @(negedge clk);
    trans_we = 0; ent_we = 0; seq_start = 1;
    @(negedge clk);
    seq_start = 0;
    for (int t = 0; t < T; t++) begin
      int target;
      for (int f = 0; f < 3; f++)
        for (int m = 0; m < N; m++)
          for (int s = 0; s < 3; s++)
            bmat[f][m][s] = longint'($urandom % ((f == 1) ? 9000 : 3000)) - 200;
      target = passes + 3;
      for (int f = 0; f < 3; f++) begin
        @(negedge clk); req = 3'(1 << f);
        @(negedge clk); req = 0;
      end
      while (passes < target) @(posedge clk);
      repeat (3) @(posedge clk);
    end
    $display("mechanisms: pruned=%0d entries=%0d forward=%0d queued=%0d",
             rf.n_pruned, rf.n_entries, rf.n_forward, queued);
    checks++; if (rf.n_pruned == 0) failures++;
    checks++; if (rf.n_entries <= 3 * N) failures++;   // more than the first frame's
    checks++; if (rf.n_forward == 0) failures++;
    checks++; if (queued == 0) failures++;
    checks++; if (passes != 3 * T) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
