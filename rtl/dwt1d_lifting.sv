// dwt1d_lifting - one-dimensional rational 9/7 lifting DWT, deeply pipelined.
//
// Each clock the block takes one even/odd sample pair (x(2n), x(2n+1)) and
// produces one low-pass / high-pass coefficient pair. The four lifting steps of
// the 9/7 wavelet and the final scaling are computed in sequence:
//   d1[n] = x(2n+1) - floor(3/2   * (x(2n)  + x(2n+2)))        alpha = -3/2
//   s1[n] = x(2n)   - floor(1/16  * (d1[n-1] + d1[n]))          beta  = -1/16
//   d2[n] = d1[n]   + floor(4/5   * (s1[n]  + s1[n+1]))         gamma =  4/5
//   s2[n] = s1[n]   + floor(15/32 * (d2[n-1] + d2[n]))          delta = 15/32
//   low[n]  = floor(k   * s2[n])    k   = 4/5
//   high[n] = floor(1/k * d2[n])    1/k = 5/4
// where 4/5 is the 16-fraction-bit word 0xCCCC / 2^16. Every product is formed
// by a const_mult shift-add tree with a register after each adder level; each
// pre-add of two neighbours and each update add also ends in a register. The
// lifting structure, the rational coefficients, the 16-bit fixed-point form,
// multiplication by shifted additions and an 18-stage pipeline follow the
// document. The exact placement of the 18 register stages is this design's:
//   1 input register, 1 alpha pre-add, 1 alpha tree, 1 alpha update,
//   1 beta pre-add, (beta is a pure shift), 1 beta update,
//   1 gamma pre-add, 3 gamma tree, 1 gamma update,
//   1 delta pre-add, 2 delta tree, 1 delta update, 3 k tree  = 18.
// The high band (1 tree level for 1/k) is delayed to line up with the low band.
//
// Interface: in_valid/in_even/in_odd/in_tag in, out_valid/out_low/out_high/
// out_tag out. The datapath is free running; valid and tag only ride along a
// LATENCY-deep shift register. Pairs of one line must arrive on consecutive
// clocks, because neighbouring pairs are combined by register taps.
// Timing: LATENCY = 18. The output presented with the valid/tag of the pair
// given at clock t (seen at t + 18) is the coefficient pair of the pair given
// two clocks before t: coefficient n is complete once pair n+2 has been read,
// since the alpha and gamma steps look one pair ahead.
// Widths: outputs are W + GUARD_BITS wide, enough for any W-bit input
// (worst-case gain of the four steps is at most 8 for high and 6 for low,
// so every value stays within +/-2^18).
module dwt1d_lifting
  import dwt_pkg::*;
#(
  parameter int unsigned W     = 16,  // input sample width, signed
  parameter int unsigned TAG_W = 10   // side-band carried with valid
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [W-1:0]           in_even,
  input  logic signed [W-1:0]           in_odd,
  input  logic        [TAG_W-1:0]       in_tag,
  output logic                          out_valid,
  output logic signed [W+GUARD_BITS-1:0] out_low,
  output logic signed [W+GUARD_BITS-1:0] out_high,
  output logic        [TAG_W-1:0]       out_tag
);

  localparam int unsigned WI = W + GUARD_BITS;
  typedef logic signed [WI-1:0] word_t;

  localparam int unsigned LA = tree_levels(C_ALPHA);  // 1
  localparam int unsigned LB = tree_levels(C_BETA);   // 0
  localparam int unsigned LG = tree_levels(C_GAMMA);  // 3
  localparam int unsigned LD = tree_levels(C_DELTA);  // 2
  localparam int unsigned LK = tree_levels(C_K);      // 3
  localparam int unsigned LI = tree_levels(C_INVK);   // 1
  localparam int unsigned LATENCY = 9 + LA + LB + LG + LD + LK;

  // ---------------- input register ----------------
  word_t e1, o1, e1d, o1d;
  always_ff @(posedge clk) begin
    e1  <= WI'(in_even);
    o1  <= WI'(in_odd);
    e1d <= e1;
    o1d <= o1;
  end

  // ---------------- alpha step: d1 = o - 3/2 (e[n] + e[n+1]) ----------------
  word_t pa, e2, o2;
  always_ff @(posedge clk) begin
    pa <= e1d + e1;
    e2 <= e1d;
    o2 <= o1d;
  end

  word_t am, e3, o3;
  const_mult #(.C(C_ALPHA), .W_IN(WI), .W_OUT(WI)) u_alpha (.clk, .x(pa), .y(am));
  delay_line #(.W(WI), .N(LA)) u_da_e (.clk, .d(e2), .q(e3));
  delay_line #(.W(WI), .N(LA)) u_da_o (.clk, .d(o2), .q(o3));

  word_t d1, e4;
  always_ff @(posedge clk) begin
    d1 <= o3 - am;
    e4 <= e3;
  end

  // ---------------- beta step: s1 = e - 1/16 (d1[n-1] + d1[n]) --------------
  word_t d1d, pb, e5, d1_5;
  always_ff @(posedge clk) begin
    d1d  <= d1;
    pb   <= d1d + d1;
    e5   <= e4;
    d1_5 <= d1;
  end

  word_t bm, e6, d1_6;
  const_mult #(.C(C_BETA), .W_IN(WI), .W_OUT(WI)) u_beta (.clk, .x(pb), .y(bm));
  delay_line #(.W(WI), .N(LB)) u_db_e (.clk, .d(e5),   .q(e6));
  delay_line #(.W(WI), .N(LB)) u_db_d (.clk, .d(d1_5), .q(d1_6));

  word_t s1, d1_7;
  always_ff @(posedge clk) begin
    s1   <= e6 - bm;
    d1_7 <= d1_6;
  end

  // ---------------- gamma step: d2 = d1 + 4/5 (s1[n] + s1[n+1]) ------------
  word_t s1d, d1_7d, pg, s1_8, d1_8;
  always_ff @(posedge clk) begin
    s1d   <= s1;
    d1_7d <= d1_7;
    pg    <= s1d + s1;
    s1_8  <= s1d;
    d1_8  <= d1_7d;
  end

  word_t gm, s1_9, d1_9;
  const_mult #(.C(C_GAMMA), .W_IN(WI), .W_OUT(WI)) u_gamma (.clk, .x(pg), .y(gm));
  delay_line #(.W(WI), .N(LG)) u_dg_s (.clk, .d(s1_8), .q(s1_9));
  delay_line #(.W(WI), .N(LG)) u_dg_d (.clk, .d(d1_8), .q(d1_9));

  word_t d2, s1_10;
  always_ff @(posedge clk) begin
    d2    <= d1_9 + gm;
    s1_10 <= s1_9;
  end

  // ---------------- delta step: s2 = s1 + 15/32 (d2[n-1] + d2[n]) ----------
  word_t d2d, pd, s1_11, d2_11;
  always_ff @(posedge clk) begin
    d2d   <= d2;
    pd    <= d2d + d2;
    s1_11 <= s1_10;
    d2_11 <= d2;
  end

  word_t dm, s1_12, d2_12;
  const_mult #(.C(C_DELTA), .W_IN(WI), .W_OUT(WI)) u_delta (.clk, .x(pd), .y(dm));
  delay_line #(.W(WI), .N(LD)) u_dd_s (.clk, .d(s1_11), .q(s1_12));
  delay_line #(.W(WI), .N(LD)) u_dd_d (.clk, .d(d2_11), .q(d2_12));

  word_t s2, d2_13;
  always_ff @(posedge clk) begin
    s2    <= s1_12 + dm;
    d2_13 <= d2_12;
  end

  // ---------------- scaling: low = k s2, high = 1/k d2 ----------------------
  word_t lo, hi_i;
  const_mult #(.C(C_K),    .W_IN(WI), .W_OUT(WI)) u_k    (.clk, .x(s2),    .y(lo));
  const_mult #(.C(C_INVK), .W_IN(WI), .W_OUT(WI)) u_invk (.clk, .x(d2_13), .y(hi_i));
  delay_line #(.W(WI), .N(LK - LI)) u_dk_h (.clk, .d(hi_i), .q(out_high));
  assign out_low = lo;

  // ---------------- valid / tag side band -----------------------------------
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

  delay_line #(.W(TAG_W), .N(LATENCY)) u_dtag (.clk, .d(in_tag), .q(out_tag));

endmodule
