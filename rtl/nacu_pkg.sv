// nacu_pkg: shared types, constants and the coefficient-table generator of
// the non-linear arithmetic unit (NACU).
//
// Numbers are two's-complement fixed point Q(IB).FB with N = 1 + IB + FB
// bits. The default is N = 16, IB = 4, FB = 11: the smallest integer part
// that lets a 16-bit sigmoid saturate to 1 within one output LSB
// (2^IB > ln(2) * FB / (1 - 2^(1-N)), i.e. 2^IB > 7.6).
//
// The sigmoid is approximated for x >= 0 by a uniform piecewise-linear (PWL)
// model, sigma(x) ~ m*x + q, with 53 table entries. Segment i covers
// [i*h, (i+1)*h) with h = 2^-SEG_FRAC = 0.25, so entries 0..51 cover [0, 13);
// the last entry (m = 0, q = 1) is used for every larger input. The segment
// width and the placement of the saturation entry are this design's choice;
// the entry count is the one the unit was reported with.
//
// Entry formula (evaluated at elaboration, no table file is needed):
//   m  = round((sigma(b) - sigma(a)) / h * 2^FB) / 2^FB      chord slope
//   q  = (max d + min d) / 2, d(x) = sigma(x) - m*x over 17 points of [a,b]
//   q is rounded to FB bits and clamped to [0.5, 1].
// Fitting q after quantising m keeps the error of the line centred on the
// curve, so the absolute error stays near 2^-11 even for large x.
package nacu_pkg;

  localparam int DATA_W      = 16;  // N
  localparam int FRAC_W      = 11;  // FB
  localparam int LUT_ENTRIES = 53;
  localparam int SEG_FRAC    = 2;   // segment width 2^-SEG_FRAC

  // Function selected per operation.
  typedef enum logic [2:0] {
    OP_MAC     = 3'd0,  // acc <= x0*x1 + acc (or x0*x1 when acc_clr)
    OP_SIGMOID = 3'd1,  // sigma(x0)
    OP_TANH    = 3'd2,  // tanh(x0)
    OP_EXP     = 3'd3,  // e^x0, x0 <= 0 (normalised input x - x_max)
    OP_SOFTMAX = 3'd4   // x0 / sm_in (exponential divided by the sum)
  } op_e;

  function automatic real sigma_r(real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  // Range/accuracy rule for the format: the largest input must drive the
  // sigmoid within one output LSB of 1, e^-In_max < 2^-FB, which for equal
  // input and output formats is 2^IB > ln(2) * FB / (1 - 2^(1-N)).
  // For N = 16 it holds from IB = 4 on, which leaves FB = 11.
  function automatic bit format_saturates(int n, int fb);
    int  ib;
    real lhs, rhs;
    ib  = n - fb - 1;
    lhs = real'(64'(1) << ib);
    rhs = $ln(2.0) * real'(fb) / (1.0 - 1.0 / real'(64'(1) << (n - 1)));
    return lhs > rhs;
  endfunction

  function automatic int round_r(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  // Slope (index 0) or bias (index 1) of table entry i, in LSBs of 2^-frac_w.
  function automatic int pwl_coef(int i, int n_entries, int seg_frac, int frac_w,
                                  bit want_bias);
    real scale, h, a, b, m_r, x, d, dmax, dmin;
    int  m_i, q_i;
    scale = real'(64'(1) << frac_w);
    if (i >= n_entries - 1) begin
      m_i = 0;
      q_i = int'(scale);
    end else begin
      h    = 1.0 / real'(64'(1) << seg_frac);
      a    = real'(i) * h;
      b    = a + h;
      m_i  = round_r((sigma_r(b) - sigma_r(a)) / h * scale);
      m_r  = real'(m_i) / scale;
      dmax = -10.0;
      dmin = 10.0;
      for (int k = 0; k <= 16; k++) begin
        x = a + h * real'(k) / 16.0;
        d = sigma_r(x) - m_r * x;
        if (d > dmax) dmax = d;
        if (d < dmin) dmin = d;
      end
      q_i = round_r((dmax + dmin) / 2.0 * scale);
      if (q_i > int'(scale))       q_i = int'(scale);
      if (q_i < int'(scale / 2.0)) q_i = int'(scale / 2.0);
    end
    return want_bias ? q_i : m_i;
  endfunction

endpackage
