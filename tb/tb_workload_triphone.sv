// tb_workload_triphone: the end-to-end test of tb_hmm_recognizer_top at the
// size of the biphone/triphone model set: 634 three-state HMMs, three files,
// five frames (76080 cycles per frame). Same checks as the monophone test:
// every predecessor and best-exit word against a reference decoder, the
// frame period, and the occurrence of each mechanism.
module tb_workload_triphone;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 634, T = 5, NS = 3 * N, FB = NS * 40;
  localparam longint TH = 250 * 256;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] num_frames = T;
  logic obs_rd_en, model_rd_en, psi_we;
  logic [18:0] obs_addr, model_addr, psi_addr;
  logic [31:0] obs_rdata = 0, mean_rdata = 0, wgt_rdata = 0, psi_wdata;
  logic trans_we = 0, ent_we = 0;
  logic [9:0] trans_waddr = 0, ent_waddr = 0;
  trans_t trans_wdata = '0;
  cost_t ent_wdata = 0;

  real mean_v [NS][40], wgt_v [NS][40], obs_v [T][3][39];
  logic [31:0] obs_mem [T*3*39];
  logic [31:0] mean_mem [NS*40], wgt_mem [NS*40];
  logic [31:0] psi_mem [int];
  int checks = 0, failures = 0;
  longint cyc = 0, start_cyc, done_cyc, fd_cyc [$];
  int hw_pruned = 0, queued = 0, page_swaps = 0, first_passes = 0;
  vref rf;

  hmm_recognizer_top #(.N_HMM(N)) dut (
    .clk, .rst_n, .start, .num_frames, .done,
    .obs_rd_en, .obs_addr, .obs_rdata,
    .model_rd_en, .model_addr, .mean_rdata, .wgt_rdata,
    .psi_we, .psi_addr, .psi_wdata,
    .trans_we, .trans_waddr, .trans_wdata, .ent_we, .ent_waddr, .ent_wdata);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (T * FB + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // board RAM banks
  always @(posedge clk) begin
    if (obs_rd_en) obs_rdata <= obs_mem[obs_addr];
    if (model_rd_en) begin
      mean_rdata <= mean_mem[model_addr];
      wgt_rdata  <= wgt_mem[model_addr];
    end
    if (rst_n && psi_we) psi_mem[int'(psi_addr)] = psi_wdata;
  end

  // mechanism and timing probes
  logic page_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.frame_done[0]) fd_cyc.push_back(cyc);
    if (dut.g_opu[0].u_opu.ready_page != page_q) page_swaps++;
    page_q <= dut.g_opu[0].u_opu.ready_page;
    if (dut.u_dec.t0.v && !dut.u_dec.t0.first_frame) hw_pruned += $countones(dut.u_dec.pruned);
    if (dut.u_dec.t0.v && dut.u_dec.t0.first_frame && dut.u_dec.t0.first_hmm) first_passes++;
    if (dut.frame_done != 0 && dut.u_dec.busy) queued++;
  end

  initial begin
    rf = new(N, TH);
    for (int s = 0; s < NS; s++) begin
      for (int e = 0; e < 39; e++) begin
        mean_v[s][e] = real'(int'($urandom % 33) - 16) / 4.0;
        wgt_v[s][e]  = real'(1 + $urandom % 8) / 8.0;
      end
      mean_v[s][39] = 0.0;
      wgt_v[s][39]  = real'($urandom % 400) / 4.0;
      for (int e = 0; e < 40; e++) begin
        mean_mem[s*40+e] = r2f(mean_v[s][e]);
        wgt_mem[s*40+e]  = r2f(wgt_v[s][e]);
      end
    end
    for (int t = 0; t < T; t++)
      for (int f = 0; f < 3; f++)
        for (int e = 0; e < 39; e++) begin
          obs_v[t][f][e] = real'(int'($urandom % 33) - 16) / 4.0;
          obs_mem[(t*3+f)*39+e] = r2f(obs_v[t][f][e]);
        end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      trans_we = 1; trans_waddr = 10'(m);
      for (int k = 0; k < 6; k++) rf.tr[m][k] = longint'($urandom % 768);
      trans_wdata = '{cost_t'(rf.tr[m][0]), cost_t'(rf.tr[m][1]), cost_t'(rf.tr[m][2]),
                      cost_t'(rf.tr[m][3]), cost_t'(rf.tr[m][4]), cost_t'(rf.tr[m][5])};
      ent_we = 1; ent_waddr = 10'(m); rf.ent[m] = longint'($urandom % 1280);
      ent_wdata = cost_t'(rf.ent[m]);
    end
    @(negedge clk);
    trans_we = 0; ent_we = 0;
    start = 1; start_cyc = cyc;
    @(negedge clk);
    start = 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    done_cyc = cyc;
    repeat (3) @(posedge clk);

    // timing
    $display("run of %0d frames: %0d cycles (%0d per frame of 3 files)", T, done_cyc - start_cyc, FB);
    checks++;
    if (done_cyc - start_cyc < longint'(T * FB) || done_cyc - start_cyc > longint'(T * FB + 3 * (N + 6) + 200)) failures++;
    checks++;
    if (fd_cyc.size() != T) failures++;
    for (int i = 1; i < fd_cyc.size(); i++) begin
      checks++;
      if (fd_cyc[i] - fd_cyc[i-1] != FB) failures++;
    end

    // reference decode
    for (int t = 0; t < T; t++)
      for (int f = 0; f < 3; f++) begin
        longint b [][3];
        int base;
        b = new[N];
        for (int m = 0; m < N; m++)
          for (int j = 0; j < 3; j++) begin
            real acc;
            int  s;
            s   = 3 * m + j;
            acc = wgt_v[s][39];
            for (int e = 0; e < 39; e++)
              acc += (obs_v[t][f][e] - mean_v[s][e]) * (obs_v[t][f][e] - mean_v[s][e]) * wgt_v[s][e];
            b[m][j] = longint'(acc * 256.0);
          end
        rf.step(f, b);
        base = (t * 3 + f) * (N + 1);
        for (int m = 0; m < N; m++) begin
          checks++;
          if (!psi_mem.exists(base + m) || psi_mem[base + m] != 32'(rf.psi_out[m])) begin
            failures++;
            if (failures < 8) $display("FAIL frame %0d file %0d hmm %0d", t, f, m);
          end
        end
        checks++;
        if (!psi_mem.exists(base + N) || psi_mem[base + N] != {1'b1, 15'h0, 16'(rf.pred_out)}) begin
          failures++;
          $display("FAIL best exit frame %0d file %0d", t, f);
        end
      end
    checks++;
    if (psi_mem.size() != T * 3 * (N + 1)) failures++;

    $display("mechanisms: pruned=%0d (ref %0d) entries=%0d forward=%0d queued=%0d page_swaps=%0d first_frame_passes=%0d",
             hw_pruned, rf.n_pruned, rf.n_entries, rf.n_forward, queued, page_swaps, first_passes);
    checks++; if (hw_pruned == 0) failures++;
    checks++; if (rf.n_entries <= 3 * N) failures++;
    checks++; if (rf.n_forward == 0) failures++;
    checks++; if (queued == 0) failures++;
    checks++; if (page_swaps == 0) failures++;
    checks++; if (first_passes != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
