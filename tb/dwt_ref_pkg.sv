// dwt_ref_pkg - reference model of the rational 9/7 lifting DWT for the
// testbenches. It works on whole lines with the boundary mirrored inside each
// lifting step (x(-i) = x(i), x(N-1+i) = x(N-1-i)), which is a different
// formulation from the hardware's (the hardware extends the line by four
// mirrored samples on each side and streams it through), so the two check
// each other. Coefficients are written out here as plain numbers rather than
// taken from the design's package.
package dwt_ref_pkg;

  localparam longint RA = 98304;   // 3/2   * 2^16
  localparam longint RB = 4096;    // 1/16  * 2^16
  localparam longint RG = 52428;   // 0xCCCC, 4/5 cut to 16 fraction bits
  localparam longint RD = 30720;   // 15/32 * 2^16
  localparam longint RK = 52428;   // k
  localparam longint RI = 81920;   // 1/k = 5/4 * 2^16

  // floor(v * c / 2^16)
  function automatic longint fmul(longint c, longint v);
    return (v * c) >>> 16;
  endfunction

  function automatic longint sat(longint v, int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // one line (even length n >= 2): lo[i], hi[i] for i < n/2
  function automatic void lift_line(input longint x[], input int n,
                                    output longint lo[], output longint hi[]);
    int m = n / 2;
    longint e[], o[], d1[], s1[], d2[], s2[];
    e = new[m]; o = new[m]; d1 = new[m]; s1 = new[m]; d2 = new[m]; s2 = new[m];
    lo = new[m]; hi = new[m];
    for (int i = 0; i < m; i++) begin
      e[i] = x[2*i];
      o[i] = x[2*i+1];
    end
    for (int i = 0; i < m; i++)
      d1[i] = o[i] - fmul(RA, e[i] + e[(i + 1 < m) ? i + 1 : m - 1]);
    for (int i = 0; i < m; i++)
      s1[i] = e[i] - fmul(RB, d1[(i > 0) ? i - 1 : 0] + d1[i]);
    for (int i = 0; i < m; i++)
      d2[i] = d1[i] + fmul(RG, s1[i] + s1[(i + 1 < m) ? i + 1 : m - 1]);
    for (int i = 0; i < m; i++)
      s2[i] = s1[i] + fmul(RD, d2[(i > 0) ? i - 1 : 0] + d2[i]);
    for (int i = 0; i < m; i++) begin
      lo[i] = fmul(RK, s2[i]);
      hi[i] = fmul(RI, d2[i]);
    end
  endfunction

  // full 2D transform of an n x n image held row-major in img (n*n words),
  // rows first, then columns, on the shrinking LL band, levels times; every
  // coefficient is saturated to w bits after each 1D pass.
  function automatic void dwt2d(ref longint img[], input int n, input int levels,
                                input int w);
    int len = n;
    longint line[], lo[], hi[];
    for (int l = 0; l < levels; l++) begin
      line = new[len];
      for (int r = 0; r < len; r++) begin
        for (int c = 0; c < len; c++) line[c] = img[r*n + c];
        lift_line(line, len, lo, hi);
        for (int c = 0; c < len/2; c++) begin
          img[r*n + c]         = sat(lo[c], w);
          img[r*n + len/2 + c] = sat(hi[c], w);
        end
      end
      for (int c = 0; c < len; c++) begin
        for (int r = 0; r < len; r++) line[r] = img[r*n + c];
        lift_line(line, len, lo, hi);
        for (int r = 0; r < len/2; r++) begin
          img[r*n + c]           = sat(lo[r], w);
          img[(len/2 + r)*n + c] = sat(hi[r], w);
        end
      end
      len = len / 2;
    end
  endfunction

endpackage
