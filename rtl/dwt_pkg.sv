// dwt_pkg - constants shared by the rational 9/7 lifting DWT.
//
// The four lifting coefficients and the two scale factors are the rational
// 9/7 set: alpha = -3/2, beta = -1/16, gamma = 4/5, delta = 15/32, low-band
// scale k = 4/5 and high-band scale 1/k = 5/4. Each magnitude is held as an
// integer equal to the value times 2^16 (16 fraction bits), with the fraction
// digits of 4/5 cut after 16 bits (0xCCCC), as in the fixed-point column of the
// coefficient table this design follows. Signs are kept apart: a negative
// coefficient is applied by subtracting its magnitude product (sign-magnitude).
// The hardware multipliers never see a binary point; they add shifted copies of
// the operand for every set bit of the integer and drop the 16 fraction bits at
// the end.
package dwt_pkg;

  // number of fraction bits of every coefficient word
  localparam int unsigned COEF_FRAC = 16;

  // coefficient magnitudes, value * 2^16
  localparam int unsigned C_ALPHA = 32'h0001_8000;  // 3/2   (sign -)
  localparam int unsigned C_BETA  = 32'h0000_1000;  // 1/16  (sign -)
  localparam int unsigned C_GAMMA = 32'h0000_CCCC;  // 4/5   (sign +)
  localparam int unsigned C_DELTA = 32'h0000_7800;  // 15/32 (sign +)
  localparam int unsigned C_K     = 32'h0000_CCCC;  // k   = 4/5, low band
  localparam int unsigned C_INVK  = 32'h0001_4000;  // 1/k = 5/4, high band

  // guard bits the 1D datapath adds to its input width
  localparam int unsigned GUARD_BITS = 4;

  // extension of a line on each side needed by the four lifting steps
  localparam int unsigned EXT = 4;

  // number of set bits of a constant
  function automatic int unsigned popcount(int unsigned c);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += (c >> i) & 1;
    return n;
  endfunction

  // bit position of the k-th set bit (k counted from 0, lowest bit first)
  function automatic int unsigned setbit_pos(int unsigned c, int unsigned k);
    int unsigned n = 0;
    int unsigned pos = 0;
    for (int i = 0; i < 32; i++) begin
      if (((c >> i) & 1) != 0) begin
        if (n == k) pos = i;
        n++;
      end
    end
    return pos;
  endfunction

  // adder-tree depth (register stages) of a shift-add multiplier for c
  function automatic int unsigned tree_levels(int unsigned c);
    int unsigned n = popcount(c);
    int unsigned l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

endpackage
