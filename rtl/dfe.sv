// dfe: decision-feedback equalizer with a dual-mode feedforward section.
//
//   ysoft(n) = FF(n) + sum_{k=1..NFB} b_k d(n-k)
//   d(n)     = nearest constellation point of ysoft(n) for the selected QAM order
//   err(n)   = d(n) - ysoft(n)
// FF is dfe_ff_filter (8 taps, T- or T/2-spaced, two 4-tap circuits); the
// feedback section has NFB = 16 complex taps on past decisions.  The tap
// counts and the T/2 mode on the feedforward taps follow the chip; the
// adaptation rule is this design's: decision-directed LMS,
//   c_k += 2^-MU_SHIFT * err * conj(x_k)   (b_k likewise with d(n-k)),
// kept in accumulators with EXT extra fractional bits and saturated.
// Coefficients restart from a single unit tap (even-circuit tap 0) after
// reset and whenever the equalizing mode (T or T/2) changes, since the taps
// then mean different sample spacings.  A change of QAM order keeps them:
// the constellation scaling is the same in every order, and a converged
// equalizer lets decision-directed adaptation work at 256-QAM, whose eye
// is too small to open from a unit tap under a strong echo.
// Timing: one new symbol per clock.  y_o/d_o/ki_o/kq_o are registered, one
// clock after the FF output they use; the whole path from IN to y_o is three
// clocks in T-spaced mode plus the tap delays.
module dfe
  import qam_pkg::*;
#(
  parameter int NFF_HALF = 4,
  parameter int NFB      = 16,
  parameter int MU_SHIFT = 4,
  parameter int EXT      = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  qam_mode_e qam_mode,
  input  logic      t_spaced,
  input  logic      adapt,
  input  cplx_t     x,
  output cplx_t     y_o,      // equalized soft value
  output cplx_t     d_o,      // decision
  output logic [3:0] ki_o,    // decision level indices
  output logic [3:0] kq_o
);

  localparam int XW = CW + EXT;                 // coefficient accumulator width
  localparam int EW = W + 3;                    // soft value / error width
  typedef logic signed [XW-1:0] xacc_t;
  localparam logic signed [XW+1:0] XMAX = (XW+2)'((1 << (XW - 1)) - 1);
  typedef struct packed { xacc_t i; xacc_t q; } cxacc_t;

  cxacc_t ca_odd [NFF_HALF];
  cxacc_t ca_even[NFF_HALF];
  cxacc_t cb     [NFB];
  ccoef_t c_odd  [NFF_HALF];
  ccoef_t c_even [NFF_HALF];
  ccoef_t b      [NFB];
  cplx_t  dd     [NFB];          // dd[k-1] = d(n-k)
  cplx_t  r_odd  [NFF_HALF];
  cplx_t  r_even [NFF_HALF];
  cacc_t  ff_y;

  logic      ts_q;
  logic      reinit;

  dfe_ff_filter #(.TAPS_HALF(NFF_HALF)) u_ff (
    .clk      (clk),
    .rst      (rst),
    .t_spaced (t_spaced),
    .x        (x),
    .c_odd    (c_odd),
    .c_even   (c_even),
    .y        (ff_y),
    .reg_odd  (r_odd),
    .reg_even (r_even)
  );

  always_comb begin
    for (int k = 0; k < NFF_HALF; k++) begin
      c_odd[k].i  = coef_t'(ca_odd[k].i  >>> EXT);
      c_odd[k].q  = coef_t'(ca_odd[k].q  >>> EXT);
      c_even[k].i = coef_t'(ca_even[k].i >>> EXT);
      c_even[k].q = coef_t'(ca_even[k].q >>> EXT);
    end
    for (int k = 0; k < NFB; k++) begin
      b[k].i = coef_t'(cb[k].i >>> EXT);
      b[k].q = coef_t'(cb[k].q >>> EXT);
    end
  end

  // soft value, decision and error
  cacc_t                 tot;
  logic signed [EW-1:0]  ys_i, ys_q, er_i, er_q;
  logic [3:0]            ki, kq;
  cplx_t                 d;

  always_comb begin
    tot = ff_y;
    for (int k = 0; k < NFB; k++) begin
      cacc_t p;
      p = cmul(b[k], dd[k]);
      tot.i += p.i;
      tot.q += p.q;
    end
    ys_i = EW'((tot.i + AW'(1 << (CFRAC - 1))) >>> CFRAC);
    ys_q = EW'((tot.q + AW'(1 << (CFRAC - 1))) >>> CFRAC);
    ki   = slice_index(qam_mode, (W+2)'(ys_i));
    kq   = slice_index(qam_mode, (W+2)'(ys_q));
    d.i  = level_value(qam_mode, ki);
    d.q  = level_value(qam_mode, kq);
    er_i = EW'(d.i) - ys_i;
    er_q = EW'(d.q) - ys_q;
  end

  function automatic sample_t sat_w(logic signed [EW-1:0] v);
    if (v > 2047)       return sample_t'(2047);
    else if (v < -2048) return sample_t'(-2048);
    else                return sample_t'(v);
  endfunction

  // LMS update of one complex coefficient accumulator with regressor r.
  function automatic cxacc_t lms(cxacc_t c, cplx_t r, logic signed [EW-1:0] ei,
                                 logic signed [EW-1:0] eq);
    localparam int PW = EW + W + 2;
    logic signed [PW-1:0] gi, gq;
    logic signed [XW+1:0] ni, nq;
    cxacc_t o;
    gi = PW'(ei) * PW'(r.i) + PW'(eq) * PW'(r.q);
    gq = PW'(eq) * PW'(r.i) - PW'(ei) * PW'(r.q);
    ni = (XW+2)'(c.i) + (XW+2)'(gi >>> MU_SHIFT);
    nq = (XW+2)'(c.q) + (XW+2)'(gq >>> MU_SHIFT);
    o.i = (ni > XMAX) ? XW'(XMAX) : (ni < -XMAX) ? XW'(-XMAX) : XW'(ni);
    o.q = (nq > XMAX) ? XW'(XMAX) : (nq < -XMAX) ? XW'(-XMAX) : XW'(nq);
    return o;
  endfunction

  assign reinit = (t_spaced != ts_q);

  always_ff @(posedge clk) begin
    if (rst || reinit) begin
      ts_q   <= t_spaced;
      for (int k = 0; k < NFF_HALF; k++) begin
        ca_odd[k]  <= '0;
        ca_even[k] <= '0;
      end
      ca_even[0].i <= XW'(1) << (CFRAC + EXT);
      for (int k = 0; k < NFB; k++) begin
        cb[k] <= '0;
        dd[k] <= '0;
      end
      y_o  <= '0;
      d_o  <= '0;
      ki_o <= '0;
      kq_o <= '0;
    end else begin
      dd[0] <= d;
      for (int k = 1; k < NFB; k++) dd[k] <= dd[k-1];
      y_o.i <= sat_w(ys_i);
      y_o.q <= sat_w(ys_q);
      d_o   <= d;
      ki_o  <= ki;
      kq_o  <= kq;
      if (adapt) begin
        for (int k = 0; k < NFF_HALF; k++) begin
          ca_odd[k]  <= lms(ca_odd[k],  r_odd[k],  er_i, er_q);
          ca_even[k] <= lms(ca_even[k], r_even[k], er_i, er_q);
        end
        for (int k = 0; k < NFB; k++) cb[k] <= lms(cb[k], dd[k], er_i, er_q);
      end
    end
  end

endmodule
