// detector_pkg: constants and helper functions shared by the cardiac event
// detector (wavelet filterbank + folded GLRT).
//
// The filterbank has three scales, q = 2, 3, 4, each delivering a biphasic
// and a monophasic output, so the GLRT sees six inputs y1..y6: y1..y3 are the
// biphasic outputs of q = 2, 3, 4 and y4..y6 the monophasic ones (this
// ordering is a choice of this design; it matches the two 3x3 blocks of the
// GLRT matrix). The GLRT matrix (H^T H)^-1 is stored here with its entries
// rounded to integers, as the design replaces the real-valued entries by
// rounded integers so that the products become shift-add operations.
//
// Word widths are full precision: nothing in the datapath can overflow for
// any input of IN_W bits. The functions below compute them from IN_W.
package detector_pkg;

  localparam int unsigned N_SCALES = 3;             // q = 2, 3, 4
  localparam int unsigned N_Y      = 2 * N_SCALES;  // six filterbank outputs
  localparam int unsigned N_TAPS   = 3;             // non-zeros per matrix column
  localparam int unsigned Q_FIRST  = 2;             // scale of the first branch

  // Integer version of (H^T H)^-1, entries rounded half away from zero:
  //  4.3 -2.8  0.7 | 4.8 -2.3  0.6
  // -2.8  4.5 -1.8 |-2.3  4.2 -1.4
  //  0.7 -1.8  1.5 | 0.6 -1.4  1.7
  typedef int coef_matrix_t [N_Y][N_Y];
  localparam coef_matrix_t C_INT = '{
    '{ 4, -3,  1,  0,  0,  0},
    '{-3,  5, -2,  0,  0,  0},
    '{ 1, -2,  2,  0,  0,  0},
    '{ 0,  0,  0,  5, -2,  1},
    '{ 0,  0,  0, -2,  4, -1},
    '{ 0,  0,  0,  1, -1,  2}
  };

  // Scale factor of branch k (k = 0, 1, 2 -> q = 2, 3, 4).
  function automatic int unsigned scale_q(int unsigned k);
    return Q_FIRST + k;
  endfunction

  // Dilation of the binomial low-pass of branch k: F(z) = (1 + z^-(q-1))^3.
  function automatic int unsigned lp_dilation(int unsigned k);
    return scale_q(k) - 1;
  endfunction

  // Length in samples (highest power of z^-1) of the low-pass cascade up to
  // and including branch k.
  function automatic int unsigned lp_span(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j <= k; j++) s += 3 * lp_dilation(j);
    return s;
  endfunction

  // Span of the biphasic (mono = 0) or monophasic (mono = 1) output of branch k.
  function automatic int unsigned out_span(int unsigned k, bit mono);
    return lp_span(k) + (mono ? 2 : 1) * scale_q(k);
  endfunction

  // Extra delay that centres an output on the longest one, the monophasic
  // output of the last branch (rounded down to whole samples).
  function automatic int unsigned centre_delay(int unsigned k, bit mono);
    return (out_span(N_SCALES - 1, 1'b1) - out_span(k, mono)) / 2;
  endfunction

  // Widths: each low-pass stage has gain 8 (3 bits), each difference 1 bit.
  function automatic int unsigned lp_width(int unsigned in_w, int unsigned k);
    return in_w + 3 * (k + 1);
  endfunction

  // Common width of the six filterbank outputs (the widest one).
  function automatic int unsigned y_width(int unsigned in_w);
    return lp_width(in_w, N_SCALES - 1) + 2;
  endfunction

  // Column sums s_i = sum_j c_ji y_j: |s| <= 10 * 2^(YW-1), so 4 more bits.
  function automatic int unsigned s_width(int unsigned in_w);
    return y_width(in_w) + 4;
  endfunction

  // T(n) = sum of six products y_i * s_i: 3 more bits than one product.
  function automatic int unsigned t_width(int unsigned in_w);
    return y_width(in_w) + s_width(in_w) + 3;
  endfunction

  // Row index of tap t (0..2) of column i: rows of the 3x3 block holding i.
  function automatic int unsigned tap_row(int unsigned i, int unsigned t);
    return (i / N_TAPS) * N_TAPS + t;
  endfunction

endpackage
