// srrc_filter: receive square-root Nyquist (root raised cosine) filter for one
// rail (I or Q), decimating from four to two samples per symbol.
//
// A SRRC_TAPS-deep shift register takes one input sample per clock.  All taps
// are multiplied by the coefficients qam_pkg::SRRC_COEF (roll-off 0.15,
// energy normalised, COEF_FRAC fractional bits) and summed in parallel; the
// rounded, saturated sum is registered only on cycles with `ostb` high, so the
// output changes every other sample when `ostb` toggles.  Latency: the output
// registered on a strobe uses the samples up to and including the one
// presented in the previous cycle.  The chip's block diagram names one such
// filter per rail; length and roll-off are this design's choices.
module srrc_filter
  import qam_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t x,
  input  logic    ostb,
  output sample_t y
);

  localparam int ACC_W = W + COEF_W + 6;

  sample_t                  dl [SRRC_TAPS];
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rnd;

  always_comb begin
    acc = '0;
    for (int k = 0; k < SRRC_TAPS; k++)
      acc += ACC_W'(dl[k]) * ACC_W'(SRRC_COEF[k]);
    rnd = (acc + ACC_W'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < SRRC_TAPS; k++) dl[k] <= '0;
      y <= '0;
    end else begin
      dl[0] <= x;
      for (int k = 1; k < SRRC_TAPS; k++) dl[k] <= dl[k-1];
      if (ostb) begin
        if (rnd > 2047)       y <= sample_t'(2047);
        else if (rnd < -2048) y <= sample_t'(-2048);
        else                  y <= sample_t'(rnd);
      end
    end
  end

endmodule
