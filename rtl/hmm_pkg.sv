// hmm_pkg: types, constants and arithmetic shared by the continuous-HMM
// recogniser.
//
// Observation probabilities are computed in IEEE-754 single precision
// (24-bit significands, so every multiplier is a 24x24 array). The format
// follows the hardware's 24-bit multipliers; this design's simplifications
// are: denormals are flushed to zero, results round to nearest-even, NaN is
// never produced and overflow saturates to infinity.
//
// Viterbi path costs are negative natural logarithms held as signed fixed
// point numbers with COST_FRAC fractional bits (the width and the number of
// fractional bits are this design's choice). Cost arithmetic saturates to
// [COST_NEG, COST_INF]; COST_INF marks an impossible or pruned path and is
// absorbing under cost_add.
package hmm_pkg;

  localparam int VEC_LEN = 39;            // feature elements per observation
  localparam int ELEMS   = VEC_LEN + 1;   // plus the per-state constant term
  localparam int STATES  = 3;             // emitting states per HMM
  localparam int FILES   = 3;             // speech files decoded in parallel
  localparam int COST_W    = 32;
  localparam int COST_FRAC = 8;
  localparam int RAM_AW  = 19;            // word address of one 32-bit board RAM bank

  typedef logic [31:0]               fp_t;
  typedef logic signed [COST_W-1:0]  cost_t;

  localparam fp_t   FP_ONE   = 32'h3F80_0000;
  localparam cost_t COST_INF = 32'sh3FFF_FFFF;
  localparam cost_t COST_NEG = -32'sh4000_0000;

  // Within-HMM transition costs of one left-to-right 3-state model.
  typedef struct packed {
    cost_t a00;  // state 0 self loop
    cost_t a01;  // state 0 -> 1
    cost_t a11;
    cost_t a12;
    cost_t a22;
    cost_t a2x;  // state 2 -> model exit
  } trans_t;

  // One cost per emitting state of an HMM.
  typedef struct packed {
    cost_t s2;
    cost_t s1;
    cost_t s0;
  } tri_cost_t;

  // Model data beat streamed from the model RAM banks.
  typedef struct packed {
    logic sof;    // first element of the first state of a frame
    fp_t  mean;
    fp_t  wgt;    // 1/(2 sigma^2), or the state constant for element 39
  } model_beat_t;

  localparam int FRAME_W = 16;
  localparam int HMM_W   = 16;

  // One record of the decoder's output, written to the host's RAM bank.
  // is_pred = 0: predecessor bits psi of HMM `hmm` at `frame`: bit j set
  //              means state j was entered from the state before it (for
  //              state 0: from the exit of another or the same HMM), clear
  //              means it came from its own self loop.
  // is_pred = 1: `hmm` is the HMM whose exit was cheapest at `frame`; every
  //              state 0 entered from an exit at frame+1 came from it.
  typedef struct packed {
    logic               is_pred;
    logic [1:0]         file;
    logic [FRAME_W-1:0] frame;
    logic [HMM_W-1:0]   hmm;
    logic [2:0]         bits;
  } psi_rec_t;

  // ------------------------------------------------------------------
  // Saturating cost addition; COST_INF stays COST_INF.
  function automatic cost_t cost_add(cost_t a, cost_t b);
    logic signed [COST_W:0] s;
    if (a == COST_INF || b == COST_INF) return COST_INF;
    s = $signed({a[COST_W-1], a}) + $signed({b[COST_W-1], b});
    if (s >= $signed({COST_INF[COST_W-1], COST_INF})) return COST_INF;
    if (s <= $signed({COST_NEG[COST_W-1], COST_NEG})) return COST_NEG;
    return s[COST_W-1:0];
  endfunction

  // ------------------------------------------------------------------
  // Round a normalised significand m (bit 23 set) with guard g and
  // sticky rs; pack with sign and biased exponent e (may overflow).
  function automatic fp_t fp_pack(logic s, int e, logic [23:0] m, logic g, logic rs);
    logic [24:0] mr;
    int          er;
    er = e;
    mr = {1'b0, m};
    if (g && (rs || m[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0)   return 32'h0;
    if (er >= 255) return {s, 8'hFF, 23'h0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  // a + b
  function automatic fp_t fp_add(fp_t a, fp_t b);
    fp_t         x, y;
    logic [23:0] mx, my;
    logic [26:0] ex, ey, sh;
    logic [27:0] sum;
    int          d, er;
    logic        sticky;
    // flush denormal inputs to zero
    if (a[30:23] == 8'h0) a = 32'h0;
    if (b[30:23] == 8'h0) b = 32'h0;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    if (y[30:0] == 31'h0) return x;
    if (x[30:23] == 8'hFF) return x;
    mx = {1'b1, x[22:0]};
    my = {1'b1, y[22:0]};
    ex = {mx, 3'b000};
    ey = {my, 3'b000};
    d  = int'(x[30:23]) - int'(y[30:23]);
    if (d >= 27) begin
      sh = 27'd1;
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < d && ey[i]) sticky = 1'b1;
      sh = ey >> d;
      sh[0] = sh[0] | sticky;
    end
    er = int'(x[30:23]);
    if (x[31] == y[31]) sum = {1'b0, ex} + {1'b0, sh};
    else                sum = {1'b0, ex} - {1'b0, sh};
    if (sum == 28'h0) return 32'h0;
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      er  = er + 1;
    end else begin
      for (int i = 0; i < 26; i++)
        if (!sum[26]) begin
          sum = sum << 1;
          er  = er - 1;
        end
    end
    return fp_pack(x[31], er, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  // a * b
  function automatic fp_t fp_mul(fp_t a, fp_t b);
    logic [47:0] p;
    int          er;
    logic        s;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'h0 || b[30:23] == 8'h0) return 32'h0;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'h0};
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    er = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, er + 1, p[47:24], p[23], |p[22:0]);
    return fp_pack(s, er, p[46:23], p[22], |p[21:0]);
  endfunction

  // Float to saturated fixed-point cost, rounding half away from zero.
  function automatic cost_t fp_to_cost(fp_t a);
    logic [63:0] mag;
    int          sh;
    if (a[30:23] == 8'h0) return '0;
    sh = int'(a[30:23]) - 150 + COST_FRAC;  // value*2^FRAC = M * 2^sh
    if (sh > 8) begin
      mag = 64'h7FFF_FFFF;                   // beyond any cost
    end else if (sh >= 0) begin
      mag = {40'h0, 1'b1, a[22:0]} << sh;
    end else if (sh < -25) begin
      mag = 64'h0;
    end else begin
      mag = ({40'h0, 1'b1, a[22:0]} + (64'h1 << (-sh - 1))) >> (-sh);
    end
    if (a[31]) begin
      if (mag >= 64'h4000_0000) return COST_NEG;
      return -cost_t'(mag[COST_W-1:0]);
    end
    if (mag >= 64'h3FFF_FFFF) return COST_INF;
    return cost_t'(mag[COST_W-1:0]);
  endfunction

endpackage
