// tb_ref_pkg: reference model of the cardiac event detector for the
// testbenches, written independently of the RTL structure.
//
// The filterbank is modelled by its six impulse responses, built here by
// polynomial multiplication of the branch filters and then convolved with
// the input history; the GLRT by the quadratic form y^T C y with C the
// matrix (H^T H)^-1 of the design, rounded half away from zero.
package tb_ref_pkg;

  localparam int NY   = 6;
  localparam int HLEN = 27;   // longest response: 26 delays + 1
  localparam int HIST = 64;   // input history kept by the model

  typedef longint poly_t [HLEN];
  typedef longint yvec_t [NY];

  // expected centring delays (biphasic q=2,3,4 then monophasic q=2,3,4):
  // (26 - span) / 2 rounded down, spans 5, 12, 22, 7, 15, 26
  localparam int CENTRE [NY] = '{10, 7, 2, 9, 5, 0};

  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t r;
    foreach (r[i]) r[i] = 0;
    for (int i = 0; i < HLEN; i++)
      for (int j = 0; j < HLEN - i; j++)
        r[i+j] += a[i] * b[j];
    return r;
  endfunction

  function automatic poly_t binom3(int d);
    poly_t r;
    foreach (r[i]) r[i] = 0;
    r[0] = 1; r[d] += 3; r[2*d] += 3; r[3*d] += 1;
    return r;
  endfunction

  function automatic poly_t diff(int q);
    poly_t r;
    foreach (r[i]) r[i] = 0;
    r[0] = -1; r[q] = 1;
    return r;
  endfunction

  function automatic poly_t shift(poly_t a, int k);
    poly_t r;
    foreach (r[i]) r[i] = (i >= k) ? a[i-k] : 0;
    return r;
  endfunction

  // Impulse response of filterbank output i (0..5).
  function automatic poly_t response(int i);
    poly_t lp;
    int k, q;
    k = i % 3;
    foreach (lp[n]) lp[n] = (n == 0) ? 1 : 0;
    for (int j = 0; j <= k; j++) lp = pmul(lp, binom3(j + 1));
    q = k + 2;
    lp = pmul(lp, diff(q));
    if (i >= 3) lp = pmul(lp, diff(q));
    return shift(lp, CENTRE[i]);
  endfunction

  // Convolve: hist[0] is the newest sample, hist[k] the sample k earlier.
  function automatic longint conv(poly_t h, longint hist[HIST]);
    longint acc = 0;
    for (int j = 0; j < HLEN; j++) acc += h[j] * hist[j];
    return acc;
  endfunction

  function automatic int round_half_away(real r);
    return (r < 0.0) ? -int'($floor(-r + 0.5)) : int'($floor(r + 0.5));
  endfunction

  function automatic longint coef(int i, int j);
    real c [NY][NY] = '{
      '{ 4.3, -2.8,  0.7,  0.0,  0.0,  0.0},
      '{-2.8,  4.5, -1.8,  0.0,  0.0,  0.0},
      '{ 0.7, -1.8,  1.5,  0.0,  0.0,  0.0},
      '{ 0.0,  0.0,  0.0,  4.8, -2.3,  0.6},
      '{ 0.0,  0.0,  0.0, -2.3,  4.2, -1.4},
      '{ 0.0,  0.0,  0.0,  0.6, -1.4,  1.7}};
    return longint'(round_half_away(c[i][j]));
  endfunction

  function automatic longint glrt(yvec_t y);
    longint acc = 0;
    for (int i = 0; i < NY; i++)
      for (int j = 0; j < NY; j++)
        acc += y[i] * coef(i, j) * y[j];
    return acc;
  endfunction

  // ---------------------------------------------------------------------
  // Synthetic electrogram at 1 kHz (1 sample = 1 ms), 8-bit signed.
  // Beat k has its R peak at beat_pos(k); the QRS is a sum of three
  // Gaussian lobes (Q, R, S), followed by a broad T wave, on top of a slow
  // baseline wander and small deterministic pseudo-random noise.
  // ---------------------------------------------------------------------
  localparam int BEAT_FIRST = 300;
  localparam int BEAT_RR    = 750;

  function automatic int beat_pos(int k);
    return BEAT_FIRST + k * BEAT_RR + ((k * 37) % 11) * 10;
  endfunction

  function automatic real gauss(real t, real mu, real sigma);
    return $exp(-((t - mu) / sigma) * ((t - mu) / sigma));
  endfunction

  function automatic int ecg_sample(int n);
    real v;
    int k, noise;
    int unsigned h;
    v = 10.0 * $sin(2.0 * 3.14159265 * n / 3000.0);
    for (k = 0; beat_pos(k) <= n + 400; k++) begin
      real t = real'(n - beat_pos(k));
      v += 90.0 * gauss(t, 0.0, 6.0) - 25.0 * gauss(t, -10.0, 5.0)
         - 35.0 * gauss(t, 10.0, 6.0) + 20.0 * gauss(t, 250.0, 40.0);
    end
    h = (n * 1103515245 + 12345);
    noise = int'((h >> 16) % 7) - 3;
    v += real'(noise);
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    return int'(v);
  endfunction

endpackage
