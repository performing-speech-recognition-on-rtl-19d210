// frame_sequencer: generates the board RAM reads that feed the three
// observation probability units.
//
// For every frame t = 0..num_frames-1 it walks all STATES*N_HMM states and,
// within each, the ELEMS elements, issuing one model read (mean and weight
// banks share the address) per cycle: model address = state*ELEMS + element,
// so a frame is exactly STATES*N_HMM*ELEMS cycles and frames follow each
// other without a gap. During the first three states of a frame it also
// reads the observation vectors of the three files, one after another
// (file f during state f, elements 0..VEC_LEN-1); observation address =
// (t*FILES + f)*VEC_LEN + element. The board RAM answers one cycle after the
// read, so the beat qualifiers (beat_valid, beat_sof, obs_valid, obs_file)
// are delayed one cycle to line up with the returned data. Reading each
// observation once per frame and one element of each kind per cycle follow
// the published design; the address layouts are this design's.
module frame_sequencer
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [FRAME_W-1:0] num_frames,
  output logic               running,
  output logic               model_rd_en,
  output logic [RAM_AW-1:0]  model_addr,
  output logic               obs_rd_en,
  output logic [RAM_AW-1:0]  obs_addr,
  output logic               beat_valid,
  output logic               beat_sof,
  output logic               obs_valid,
  output logic [1:0]         obs_file
);
  localparam int FRAME_BEATS = STATES * N_HMM * ELEMS;

  logic [FRAME_W-1:0] t_cnt, n_frames;
  logic [RAM_AW-1:0]  beat;      // model address within the frame
  logic [1:0]         s_lo;      // state index while below FILES
  logic [5:0]         e_cnt;

  assign model_rd_en = running;
  assign model_addr  = beat;
  assign obs_rd_en   = running && beat < RAM_AW'(FILES * ELEMS) && e_cnt < 6'(VEC_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      t_cnt    <= '0;
      n_frames <= '0;
      beat     <= '0;
      s_lo     <= '0;
      e_cnt    <= '0;
      obs_addr <= '0;
    end else if (!running) begin
      if (start && num_frames != '0) begin
        running  <= 1'b1;
        n_frames <= num_frames;
        t_cnt    <= '0;
        beat     <= '0;
        s_lo     <= '0;
        e_cnt    <= '0;
        obs_addr <= '0;
      end
    end else begin
      if (obs_rd_en) obs_addr <= obs_addr + 1'b1;
      if (e_cnt == 6'(ELEMS - 1)) begin
        e_cnt <= '0;
        if (s_lo != 2'(FILES)) s_lo <= s_lo + 1'b1;
      end else begin
        e_cnt <= e_cnt + 1'b1;
      end
      if (beat == RAM_AW'(FRAME_BEATS - 1)) begin
        beat  <= '0;
        s_lo  <= '0;
        t_cnt <= t_cnt + 1'b1;
        if (t_cnt == n_frames - 1'b1) running <= 1'b0;
      end else begin
        beat <= beat + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_valid <= 1'b0;
      beat_sof   <= 1'b0;
      obs_valid  <= 1'b0;
      obs_file   <= '0;
    end else begin
      beat_valid <= model_rd_en;
      beat_sof   <= model_rd_en && beat == '0;
      obs_valid  <= obs_rd_en;
      obs_file   <= s_lo;
    end
  end
endmodule
