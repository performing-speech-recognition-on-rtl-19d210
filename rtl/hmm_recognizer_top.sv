// hmm_recognizer_top: continuous-HMM speech recogniser decoding FILES (three)
// speech files at once.
//
// Three observation probability units compute -ln b_j(O_t) for all
// STATES*N_HMM states of their file, in floating point, from the
// observation, mean and weight data read from the board RAM one element per
// cycle. The units share one model stream: unit 0 uses it as read, unit 1
// through a ELEMS-cycle delay line and unit 2 through two, because the three
// files' observations are read one after another. When a unit has finished a
// frame it asks the Viterbi decoder, which serves the files in turn and
// writes, for every HMM and frame, the predecessor bits of its three states,
// plus the best exit HMM of each frame, to the host's RAM bank. The host
// backtracks through these to find the recognised phone sequence.
//
// Board RAM banks (32-bit words, read data one cycle after the read):
//   obs bank    : observation element e of file f, frame t at (t*3+f)*39+e
//   mean bank   : mean of element e of global state s at s*40+e (element 39: 0)
//   weight bank : 1/(2 sigma^2) at the same address (element 39: C_j)
//   psi bank    : write-only; record for HMM m (m = N_HMM: best exit) of
//                 file f at frame t at (t*3+f)*(N_HMM+1)+m. Data bit 31 marks
//                 a best-exit record with the HMM index in bits 15:0;
//                 otherwise bits 2:0 are the predecessor bits of states 0..2.
// Transition and entry costs are loaded into on-chip RAM before `start`.
// `done` rises when every file's last frame has been decoded and stays high
// until the next `start`. A frame of all three files takes
// STATES*N_HMM*ELEMS cycles, i.e. 5880 cycles for 49 HMMs.
module hmm_recognizer_top
  import hmm_pkg::*;
#(
  parameter int    N_HMM    = 49,
  parameter cost_t PRUNE_TH = cost_t'(250 <<< COST_FRAC),
  localparam int   MW = (N_HMM > 1) ? $clog2(N_HMM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [FRAME_W-1:0] num_frames,
  output logic               done,
  // observation bank
  output logic               obs_rd_en,
  output logic [RAM_AW-1:0]  obs_addr,
  input  fp_t                obs_rdata,
  // mean and weight banks (same address)
  output logic               model_rd_en,
  output logic [RAM_AW-1:0]  model_addr,
  input  fp_t                mean_rdata,
  input  fp_t                wgt_rdata,
  // predecessor bank
  output logic               psi_we,
  output logic [RAM_AW-1:0]  psi_addr,
  output logic [31:0]        psi_wdata,
  // on-chip table loading
  input  logic               trans_we,
  input  logic [MW-1:0]      trans_waddr,
  input  trans_t             trans_wdata,
  input  logic               ent_we,
  input  logic [MW-1:0]      ent_waddr,
  input  cost_t              ent_wdata
);
  localparam int BEAT_W = $bits(model_beat_t);

  logic       running, beat_valid, beat_sof, obs_valid;
  logic [1:0] obs_file;

  frame_sequencer #(.N_HMM(N_HMM)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(start && !running), .num_frames(num_frames),
    .running(running),
    .model_rd_en(model_rd_en), .model_addr(model_addr),
    .obs_rd_en(obs_rd_en), .obs_addr(obs_addr),
    .beat_valid(beat_valid), .beat_sof(beat_sof),
    .obs_valid(obs_valid), .obs_file(obs_file)
  );

  // model stream and its delayed copies
  model_beat_t beat [FILES];
  logic        bvalid [FILES];

  assign beat[0]   = '{sof: beat_sof, mean: mean_rdata, wgt: wgt_rdata};
  assign bvalid[0] = beat_valid;

  for (genvar f = 1; f < FILES; f++) begin : g_delay
    model_delay #(.W(BEAT_W), .DEPTH(ELEMS)) u_dly (
      .clk(clk), .rst_n(rst_n),
      .in_valid(bvalid[f-1]), .din(beat[f-1]),
      .out_valid(bvalid[f]), .dout(beat[f])
    );
  end

  // observation probability units
  logic [FILES-1:0] frame_done;
  logic             b_rd_en;
  logic [MW-1:0]    b_rd_hmm;
  tri_cost_t        b_all [FILES];

  for (genvar f = 0; f < FILES; f++) begin : g_opu
    logic unused_page;
    obs_prob_unit #(.N_HMM(N_HMM)) u_opu (
      .clk(clk), .rst_n(rst_n),
      .model_valid(bvalid[f]), .model(beat[f]),
      .obs_valid(obs_valid && obs_file == 2'(f)), .obs(obs_rdata),
      .frame_done(frame_done[f]), .ready_page(unused_page),
      .rd_en(b_rd_en), .rd_hmm(b_rd_hmm), .rd_data(b_all[f])
    );
  end

  // Viterbi decoder
  logic     psi_valid, dec_busy;
  psi_rec_t psi;

  viterbi_decoder #(.N_HMM(N_HMM), .PRUNE_TH(PRUNE_TH)) u_dec (
    .clk(clk), .rst_n(rst_n), .seq_start(start && !running), .req(frame_done),
    .b_rd_en(b_rd_en), .b_rd_hmm(b_rd_hmm), .b_all(b_all),
    .trans_we(trans_we), .trans_waddr(trans_waddr), .trans_wdata(trans_wdata),
    .ent_we(ent_we), .ent_waddr(ent_waddr), .ent_wdata(ent_wdata),
    .psi_valid(psi_valid), .psi(psi), .busy(dec_busy)
  );

  // predecessor records to the host bank
  logic [FRAME_W-1:0]    n_frames;
  logic [FRAME_W+1:0]    passes_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psi_we      <= 1'b0;
      psi_addr    <= '0;
      psi_wdata   <= '0;
      done        <= 1'b0;
      n_frames    <= '0;
      passes_left <= '0;
    end else begin
      psi_we <= psi_valid;
      if (psi_valid) begin
        psi_addr  <= RAM_AW'((32'(psi.frame) * FILES + 32'(psi.file)) * (N_HMM + 1)
                             + (psi.is_pred ? 32'(N_HMM) : 32'(psi.hmm)));
        psi_wdata <= psi.is_pred ? {1'b1, 15'h0, psi.hmm} : {29'h0, psi.bits};
      end
      if (start && !running) begin
        done        <= 1'b0;
        n_frames    <= num_frames;
        passes_left <= (FRAME_W+2)'(32'(num_frames) * FILES);
      end else if (psi_valid && psi.is_pred) begin
        passes_left <= passes_left - 1'b1;
        if (passes_left == 1) done <= 1'b1;
      end
    end
  end

  logic unused;
  assign unused = ^{n_frames, dec_busy};
endmodule
