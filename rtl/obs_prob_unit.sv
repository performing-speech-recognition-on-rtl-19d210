// obs_prob_unit: computes the observation costs -ln b_j(O_t) of every state
// of every HMM for one speech file, in floating point, one element per cycle.
//
// For each state the cost is
//   C_j + sum_{i<39} (O_i - mu_ji)^2 * w_ji,   w_ji = 1/(2 sigma_ji^2),
//   C_j = (39/2) ln(2 pi) + sum_i ln sigma_ji,
// i.e. the negated log of an uncorrelated multivariate Gaussian. C_j and w_ji
// are precomputed and stored with the means. C_j is fed as the fortieth
// element: its mean is 0, its weight is C_j, and the observation buffer
// supplies 1.0, so the same datapath produces it.
//
// Pipeline: observation buffer -> subtractor -> squarer -> weight multiplier
// -> accumulator -> float-to-fixed -> probability buffer. Every stage takes a
// new element each cycle, so one state is finished every ELEMS cycles and a
// frame of 3*N_HMM states takes 3*N_HMM*ELEMS cycles. The model stream is a
// beat per cycle (`model_valid`, `model`); `model.sof` marks element 0 of the
// first state of a frame. During the first state the observation vector
// arrives on `obs_valid`/`obs` in step with the model data and is stored.
// Beats of a frame must be contiguous. States are ordered HMM-major (HMM m,
// state j = 0..2), elements 0..39 within a state.
//
// When the last state of a frame has been written, `frame_done` pulses and
// `ready_page` names the buffer page that now holds the complete frame; the
// decoder reads it through rd_en/rd_hmm (latency 1). The next frame goes to
// the other page. The pipeline structure follows the published design; the stage
// latencies (one cycle each) and the double page are this design's choice.
module obs_prob_unit
  import hmm_pkg::*;
#(
  parameter int N_HMM = 49,
  localparam int MW = (N_HMM > 1) ? $clog2(N_HMM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          model_valid,
  input  model_beat_t   model,
  input  logic          obs_valid,
  input  fp_t           obs,
  output logic          frame_done,
  output logic          ready_page,
  input  logic          rd_en,
  input  logic [MW-1:0] rd_hmm,
  output tri_cost_t     rd_data
);
  localparam int TAG_W = MW + 2;

  // ---------------- element / state counters -------------------------
  logic [5:0]    e_q, cur_e;
  logic [1:0]    j_q, cur_j;
  logic [MW-1:0] m_q, cur_m;

  always_comb begin
    if (model.sof) begin
      cur_e = '0; cur_j = '0; cur_m = '0;
    end else begin
      cur_e = e_q; cur_j = j_q; cur_m = m_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q <= '0; j_q <= '0; m_q <= '0;
    end else if (model_valid) begin
      if (cur_e == 6'(ELEMS - 1)) begin
        e_q <= '0;
        if (cur_j == 2'(STATES - 1)) begin
          j_q <= '0;
          m_q <= (cur_m == MW'(N_HMM - 1)) ? '0 : cur_m + 1'b1;
        end else begin
          j_q <= cur_j + 1'b1;
          m_q <= cur_m;
        end
      end else begin
        e_q <= cur_e + 1'b1;
        j_q <= cur_j;
        m_q <= cur_m;
      end
    end
  end

  // ---------------- observation operand ------------------------------
  fp_t o_elem;
  obs_buffer u_obs (
    .clk  (clk),
    .load (obs_valid),
    .idx  (cur_e),
    .din  (obs),
    .dout (o_elem)
  );

  // ---------------- stage 1: O - mu -----------------------------------
  fp_t             diff;
  logic            v1;
  fp_t             w1, w2;
  logic [TAG_W+1:0] t1, t2, t3;   // {first, last, hmm, state}
  fp_addsub u_sub (
    .clk(clk), .rst_n(rst_n), .in_valid(model_valid), .sub(1'b1),
    .a(o_elem), .b(model.mean), .out_valid(v1), .y(diff)
  );

  // ---------------- stage 2: square ----------------------------------
  fp_t  sq;
  logic v2;
  fp_mul u_sq (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .a(diff), .b(diff),
    .out_valid(v2), .y(sq)
  );

  // ---------------- stage 3: times weight ------------------------------
  fp_t  term;
  logic v3;
  fp_mul u_wmul (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .a(sq), .b(w2),
    .out_valid(v3), .y(term)
  );

  // weight and tag travel beside the arithmetic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w1 <= '0; w2 <= '0; t1 <= '0; t2 <= '0; t3 <= '0;
    end else begin
      w1 <= model.wgt;
      w2 <= w1;
      t1 <= {cur_e == 6'd0, cur_e == 6'(ELEMS - 1), cur_m, cur_j};
      t2 <= t1;
      t3 <= t2;
    end
  end

  // ---------------- stage 4: accumulate --------------------------------
  logic             sv;
  logic [TAG_W-1:0] stag;
  fp_t              ssum;
  fp_accumulator #(.TAG_W(TAG_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .in_valid(v3),
    .first(t3[TAG_W+1]), .last(t3[TAG_W]), .in_tag(t3[TAG_W-1:0]),
    .term(term), .sum_valid(sv), .sum_tag(stag), .sum(ssum)
  );

  // ---------------- stage 5: to fixed point ----------------------------
  logic             cv;
  logic [TAG_W-1:0] ctag;
  cost_t            cost;
  fp_to_fixed #(.TAG_W(TAG_W)) u_fix (
    .clk(clk), .rst_n(rst_n), .in_valid(sv), .in_tag(stag), .x(ssum),
    .out_valid(cv), .out_tag(ctag), .cost(cost)
  );

  // ---------------- probability buffer ---------------------------------
  logic wr_page;
  logic last_state;
  assign last_state = ctag[TAG_W-1:2] == MW'(N_HMM - 1) && ctag[1:0] == 2'(STATES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_page    <= 1'b0;
      ready_page <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= cv && last_state;
      if (cv && last_state) begin
        ready_page <= wr_page;
        wr_page    <= ~wr_page;
      end
    end
  end

  prob_buffer #(.N_HMM(N_HMM)) u_pbuf (
    .clk(clk), .we(cv), .wr_page(wr_page), .wr_hmm(ctag[TAG_W-1:2]),
    .wr_state(ctag[1:0]), .wr_cost(cost),
    .rd_en(rd_en), .rd_page(ready_page), .rd_hmm(rd_hmm), .rd_data(rd_data)
  );

  // A frame starts only where the previous one ended (beats are contiguous).
  assert property (@(posedge clk) disable iff (!rst_n)
    model_valid && model.sof |-> e_q == '0 && j_q == '0 && m_q == '0);

  // The observation arrives only during the first state of a frame.
  assert property (@(posedge clk) disable iff (!rst_n)
    obs_valid |-> model_valid && cur_m == '0 && cur_j == '0 && cur_e < 6'(VEC_LEN));
endmodule
