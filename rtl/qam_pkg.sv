// qam_pkg: types, constants and elaboration-time tables shared by the QAM
// demodulator.
//
// Number formats (this design's own choices; the word lengths of the original
// chip are not published):
//   * samples are W = 12-bit two's complement;
//   * a constellation point of level n (odd, |n| <= L-1, L = levels per axis)
//     sits at n * GRID(L) with GRID(L) = 256/L, so the largest point is about
//     240 in every mode and the mean |I| is exactly 128 in every mode;
//   * NCO cosine/sine use 2047 for 1.0.
// QAM orders 4/16/64/256 (L = 2/4/8/16) follow the chip's supported set.
//
// Tables are computed by constant functions at elaboration:
//   * sin_quarter(k) = round(2047 * sin(pi/2 * (k + 0.5) / 2**(LUT_BITS-2)))
//   * srrc_coef(k)   = round(2**COEF_FRAC * h(t)), t = (k - (N-1)/2)/SPS symbols,
//     h the square-root raised cosine of roll-off ROLLOFF, energy normalised
//     so that sum(h^2) = 1 (a transmit and receive pair then peaks at 1.0).
package qam_pkg;

  localparam int W           = 12;   // sample width
  localparam int NCO_PHASE_W = 24;   // NCO phase accumulator width
  localparam int LUT_BITS    = 10;   // phase bits addressing one sine period
  localparam int TRIG_W      = 12;   // cos/sin output width (2047 = 1.0)

  localparam int    SRRC_SPS     = 4;     // input samples per symbol
  localparam int    SRRC_TAPS    = 49;    // 12-symbol span
  localparam real   SRRC_ROLLOFF = 0.15;
  localparam int    COEF_FRAC    = 12;
  localparam int    COEF_W       = 14;

  typedef logic signed [W-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  // Equalizer coefficients: Q2.14 (16384 = 1.0), complex.
  localparam int CW    = 16;
  localparam int CFRAC = 14;
  typedef logic signed [CW-1:0] coef_t;

  typedef struct packed {
    coef_t i;
    coef_t q;
  } ccoef_t;

  // Complex product accumulator, CFRAC fractional bits.
  localparam int AW = W + CW + 5;
  typedef logic signed [AW-1:0] acc_t;

  typedef struct packed {
    acc_t i;
    acc_t q;
  } cacc_t;

  // Full-precision complex product c * x.
  function automatic cacc_t cmul(ccoef_t c, cplx_t x);
    cacc_t r;
    r.i = AW'(c.i) * AW'(x.i) - AW'(c.q) * AW'(x.q);
    r.q = AW'(c.i) * AW'(x.q) + AW'(c.q) * AW'(x.i);
    return r;
  endfunction

  // QAM order selection as carried on the control register.
  typedef enum logic [1:0] {
    QAM4   = 2'd0,
    QAM16  = 2'd1,
    QAM64  = 2'd2,
    QAM256 = 2'd3
  } qam_mode_e;

  // log2 of levels per axis: 1, 2, 3, 4.
  function automatic int unsigned log2_levels(qam_mode_e m);
    return int'(m) + 1;
  endfunction

  // log2 of GRID = 256/L: 7, 6, 5, 4.
  function automatic int unsigned log2_grid(qam_mode_e m);
    return 7 - int'(m);
  endfunction

  // Nearest constellation level index k (0..L-1) for one axis.  Points sit at
  // (2k+1-L)*GRID and L*GRID = 256, so k = floor((y + 256) / (2*GRID)).
  function automatic logic [3:0] slice_index(qam_mode_e m, logic signed [W+1:0] y);
    logic signed [W+2:0] t;
    int                  k;
    int unsigned         lv;
    lv = 1 << log2_levels(m);
    t  = (W+3)'(y) + 256;
    if (t < 0) k = 0;
    else       k = int'(32'(t)) >>> (log2_grid(m) + 1);
    if (k > int'(lv) - 1) k = int'(lv) - 1;
    return 4'(k);
  endfunction

  // Sample value of level index k.
  function automatic sample_t level_value(qam_mode_e m, logic [3:0] k);
    int n;
    n = 2 * int'(k) + 1 - (1 << log2_levels(m));
    return sample_t'(n <<< log2_grid(m));
  endfunction

  // ---------------------------------------------------------------------------
  // Elaboration-time tables
  // ---------------------------------------------------------------------------
  localparam int QUARTER = 1 << (LUT_BITS - 2);
  typedef logic signed [TRIG_W-1:0] sin_tab_t [QUARTER];

  function automatic sin_tab_t mk_sin_quarter();
    sin_tab_t r;
    for (int k = 0; k < QUARTER; k++)
      r[k] = TRIG_W'($rtoi(2047.0 * $sin(3.14159265358979 / 2.0 * (real'(k) + 0.5) / real'(QUARTER)) + 0.5));
    return r;
  endfunction

  typedef logic signed [COEF_W-1:0] srrc_tab_t [SRRC_TAPS];

  function automatic real srrc_h(real t, real a);
    real pi, num, den;
    pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ((4.0 * a * t == 1.0) || (4.0 * a * t == -1.0))
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a))
                               + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    num = $sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a));
    den = pi * t * (1.0 - 16.0 * a * a * t * t);
    return num / den;
  endfunction

  function automatic srrc_tab_t mk_srrc();
    srrc_tab_t r;
    real h [SRRC_TAPS];
    real e, t, v;
    e = 0.0;
    for (int k = 0; k < SRRC_TAPS; k++) begin
      t    = (real'(k) - real'(SRRC_TAPS - 1) / 2.0) / real'(SRRC_SPS);
      h[k] = srrc_h(t, SRRC_ROLLOFF);
      e    = e + h[k] * h[k];
    end
    for (int k = 0; k < SRRC_TAPS; k++) begin
      v    = h[k] / $sqrt(e) * real'(1 << COEF_FRAC);
      r[k] = COEF_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return r;
  endfunction

  localparam sin_tab_t  SIN_QUARTER = mk_sin_quarter();
  localparam srrc_tab_t SRRC_COEF   = mk_srrc();

  // ---------------------------------------------------------------------------
  // Power rings for the phase detector.  For each QAM order, the distinct
  // powers a^2 + b^2 of first-quadrant points (a, b odd, 1..L-1) in increasing
  // order, with the (at most four) points on each ring.
  // ---------------------------------------------------------------------------
  localparam int MAX_RINGS = 32;
  localparam int MAX_PTS   = 4;

  typedef struct packed {
    logic [8:0] pow;                 // ring power in level units
    logic [2:0] cnt;                 // number of points on the ring
    logic [MAX_PTS-1:0][3:0] a;      // I level (odd, positive)
    logic [MAX_PTS-1:0][3:0] b;      // Q level
  } ring_t;

  // Flat table of packed ring_t words: entry m*MAX_RINGS + j is ring j of
  // QAM mode m.
  typedef logic [$bits(ring_t)-1:0] ring_tab_t [4*MAX_RINGS];

  function automatic ring_tab_t mk_rings();
    ring_tab_t               r;
    ring_t                   e;
    logic [MAX_PTS-1:0][3:0] av;
    logic [MAX_PTS-1:0][3:0] bv;
    int                      n;
    int                      lv;
    int                      c;
    for (int j = 0; j < 4 * MAX_RINGS; j++) r[j] = '0;
    for (int m = 0; m < 4; m++) begin
      lv = 2 << m;
      n  = 0;
      // visit every achievable power (odd^2 + odd^2 = 2 mod 8) in order
      for (int p = 2; p <= 2 * (lv - 1) * (lv - 1); p += 8) begin
        c  = 0;
        av = '0;
        bv = '0;
        for (int a = 1; a < lv; a += 2)
          for (int b = 1; b < lv; b += 2)
            if (a * a + b * b == p) begin
              av = (av << 4) | (MAX_PTS*4)'(a);
              bv = (bv << 4) | (MAX_PTS*4)'(b);
              c++;
            end
        if (c > 0) begin
          e.pow = 9'(p);
          e.cnt = 3'(c);
          e.a   = av;
          e.b   = bv;
          r[m * MAX_RINGS + n] = e;
          n++;
        end
      end
    end
    return r;
  endfunction

  function automatic int mk_ring_count(int m);
    int n;
    int lv;
    lv = 2 << m;
    n  = 0;
    for (int p = 2; p <= 2 * (lv - 1) * (lv - 1); p += 8) begin
      bit hit;
      hit = 1'b0;
      for (int a = 1; a < lv; a += 2)
        for (int b = 1; b < lv; b += 2)
          if (a * a + b * b == p) hit = 1'b1;
      if (hit) n++;
    end
    return n;
  endfunction

  localparam ring_tab_t RINGS = mk_rings();
  localparam int RING_NUM [4] = '{mk_ring_count(0), mk_ring_count(1),
                                  mk_ring_count(2), mk_ring_count(3)};

endpackage
