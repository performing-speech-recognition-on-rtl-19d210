// viterbi_decoder: Viterbi decoder core shared by the FILES speech files.
//
// Five parts, as in the original design: the initialisation and switching
// block (init_switch), the scaler, the language model block (lm_block), the
// HMM processor (three nodes, one HMM per cycle) and the path cost buffer
// (delta_buffer), plus the transition cost RAM (trans_ram).
//
// Each observation probability unit pulses req[f] when its probability
// buffer holds a complete frame for file f. Requests are queued and served
// one file at a time, lowest file index first ("taking turns"). A pass over
// file f reads, for HMM m = 0..N_HMM-1, one per cycle: the three observation
// costs (rd_en/rd_hmm to the units, data back on b_all after one cycle), the
// previous path costs, the transition and entry costs. The pipeline is
//   c0 issue reads -> c1 scaler + init/switch -> c2 HMM processor
//   -> c3 write path costs, update minimum and best exit, emit psi record.
// One cycle after the last HMM the pass ends: the scaler and language model
// block latch the file's minimum and best exit, an is_pred record naming the
// best exit HMM is emitted, and the file's frame counter advances. A pass
// takes N_HMM + 4 cycles. `seq_start` restarts all files at frame 0, where
// the init/switch block initialises the paths.
module viterbi_decoder
  import hmm_pkg::*;
#(
  parameter int    N_HMM    = 49,
  parameter cost_t PRUNE_TH = cost_t'(250 <<< COST_FRAC),
  localparam int   MW = (N_HMM > 1) ? $clog2(N_HMM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          seq_start,
  input  logic [FILES-1:0] req,
  output logic          b_rd_en,
  output logic [MW-1:0] b_rd_hmm,
  input  tri_cost_t     b_all [FILES],
  // table loading
  input  logic          trans_we,
  input  logic [MW-1:0] trans_waddr,
  input  trans_t        trans_wdata,
  input  logic          ent_we,
  input  logic [MW-1:0] ent_waddr,
  input  cost_t         ent_wdata,
  // output records
  output logic          psi_valid,
  output psi_rec_t      psi,
  output logic          busy
);
  typedef struct packed {
    logic               v;
    logic               first_hmm;
    logic               last_hmm;
    logic               first_frame;
    logic [1:0]         file;
    logic [MW-1:0]      hmm;
    logic [FRAME_W-1:0] frame;
  } tag_t;

  // ---------------- arbitration and issue ------------------------------
  logic [FILES-1:0]   pending;
  logic               issuing;
  logic [1:0]         cur_file;
  logic [MW-1:0]      m_cnt;
  logic [FRAME_W-1:0] frame_cnt [FILES];
  logic               pass_done;
  logic [1:0]         pick;
  tag_t               t0, t1, t2;

  always_comb begin
    pick = 2'd0;
    for (int f = FILES - 1; f >= 0; f--)
      if (pending[f]) pick = 2'(f);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      issuing  <= 1'b0;
      busy     <= 1'b0;
      cur_file <= '0;
      m_cnt    <= '0;
      for (int f = 0; f < FILES; f++) frame_cnt[f] <= '0;
    end else if (seq_start) begin
      pending  <= '0;
      issuing  <= 1'b0;
      busy     <= 1'b0;
      for (int f = 0; f < FILES; f++) frame_cnt[f] <= '0;
    end else begin
      pending <= pending | req;
      if (!busy && pending != '0) begin
        busy          <= 1'b1;
        issuing       <= 1'b1;
        cur_file      <= pick;
        m_cnt         <= '0;
        pending[pick] <= req[pick];
      end
      if (issuing) begin
        m_cnt <= m_cnt + 1'b1;
        if (m_cnt == MW'(N_HMM - 1)) issuing <= 1'b0;
      end
      if (pass_done) begin
        busy <= 1'b0;
        frame_cnt[t2.file] <= frame_cnt[t2.file] + 1'b1;
      end
    end
  end

  assign b_rd_en  = issuing;
  assign b_rd_hmm = m_cnt;

  // ---------------- memories -------------------------------------------
  tri_cost_t d_rd;
  trans_t    tr_rd;
  cost_t     ent_rd;
  logic      p_valid;
  tri_cost_t p_delta;
  logic [2:0] p_psi;
  cost_t     p_exit;

  delta_buffer #(.N_HMM(N_HMM)) u_dbuf (
    .clk(clk), .we(p_valid), .wr_file(t2.file), .wr_hmm(t2.hmm), .wr_data(p_delta),
    .rd_en(issuing), .rd_file(cur_file), .rd_hmm(m_cnt), .rd_data(d_rd)
  );

  trans_ram #(.N_HMM(N_HMM)) u_tram (
    .clk(clk), .we(trans_we), .waddr(trans_waddr), .wdata(trans_wdata),
    .rd_en(issuing), .raddr(m_cnt), .rdata(tr_rd)
  );

  // ---------------- c1: scaler and init/switch --------------------------
  tri_cost_t     sc_prev;
  cost_t         sc_lm, lm_best;
  logic [MW-1:0] lm_run_hmm;
  logic [2:0]    pruned;

  lm_block #(.N_HMM(N_HMM)) u_lm (
    .clk(clk), .rst_n(rst_n),
    .ent_we(ent_we), .ent_waddr(ent_waddr), .ent_wdata(ent_wdata),
    .ent_rd_en(issuing), .ent_raddr(m_cnt), .ent_rdata(ent_rd),
    .obs_valid(p_valid), .obs_first(t2.first_hmm), .obs_hmm(t2.hmm), .obs_exit(p_exit),
    .pass_done(pass_done), .pass_file(t2.file),
    .file(t0.file), .best_cost(lm_best), .best_hmm(), .run_hmm_q(lm_run_hmm)
  );

  scaler #(.PRUNE_TH(PRUNE_TH)) u_scale (
    .clk(clk), .rst_n(rst_n),
    .obs_valid(p_valid), .obs_first(t2.first_hmm), .obs_delta(p_delta),
    .pass_done(pass_done), .pass_file(t2.file),
    .file(t0.file), .din(d_rd), .lm_in(lm_best),
    .dout(sc_prev), .lm_out(sc_lm), .pruned(pruned)
  );

  logic      is_valid;
  tri_cost_t is_prev, is_b;
  cost_t     is_lm, is_entry;
  trans_t    is_trans;

  init_switch u_init (
    .clk(clk), .rst_n(rst_n), .in_valid(t0.v), .first(t0.first_frame), .file(t0.file),
    .b_all(b_all), .prev_scaled(sc_prev), .lm_scaled(sc_lm),
    .trans_in(tr_rd), .entry_in(ent_rd),
    .out_valid(is_valid), .prev(is_prev), .lm_cost(is_lm), .b(is_b),
    .trans(is_trans), .a_entry(is_entry)
  );

  // ---------------- c2: HMM processor -----------------------------------
  hmm_processor u_proc (
    .clk(clk), .rst_n(rst_n), .in_valid(is_valid),
    .prev(is_prev), .lm_cost(is_lm), .a_entry(is_entry), .trans(is_trans), .b(is_b),
    .out_valid(p_valid), .delta(p_delta), .psi(p_psi), .exit_cost(p_exit)
  );

  // ---------------- tags and c3 outputs ----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0 <= '0; t1 <= '0; t2 <= '0;
      pass_done <= 1'b0;
      psi_valid <= 1'b0;
      psi       <= '0;
    end else begin
      t0.v           <= issuing;
      t0.first_hmm   <= m_cnt == '0;
      t0.last_hmm    <= m_cnt == MW'(N_HMM - 1);
      t0.first_frame <= frame_cnt[cur_file] == '0;
      t0.file        <= cur_file;
      t0.hmm         <= m_cnt;
      t0.frame       <= frame_cnt[cur_file];
      t1 <= t0;
      t2 <= t1;
      pass_done <= p_valid && t2.last_hmm;
      if (p_valid) begin
        psi_valid <= 1'b1;
        psi       <= '{is_pred: 1'b0, file: t2.file, frame: t2.frame,
                       hmm: HMM_W'(t2.hmm), bits: p_psi};
      end else if (pass_done) begin
        psi_valid <= 1'b1;
        psi       <= '{is_pred: 1'b1, file: t2.file, frame: t2.frame,
                       hmm: HMM_W'(lm_run_hmm), bits: 3'b000};
      end else begin
        psi_valid <= 1'b0;
      end
    end
  end

  // A file's next frame must not be requested before its pass has begun.
  assert property (@(posedge clk) disable iff (!rst_n)
    (pending & req) == '0);
endmodule
