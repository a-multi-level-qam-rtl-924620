// phase_derotator: carrier phase derotator of the inner (APC) loop.
//
// Multiplies the complex baseband sample by the conjugate NCO phasor,
//   y = (xi + j xq) (cos - j sin),
// i.e. yi = xi cos + xq sin, yq = xq cos - xi sin, with cos/sin scaled so that
// 2047 is 1.0.  Products are rounded (divide by 2048) and saturated to W bits
// and registered on cycles with `en` high (the two-samples-per-symbol strobe):
// one enabled cycle of latency.  The function is that of the chip's block
// diagram; the number format is this design's own.
module phase_derotator
  import qam_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  sample_t                  xi,
  input  sample_t                  xq,
  input  logic signed [TRIG_W-1:0] cos_i,
  input  logic signed [TRIG_W-1:0] sin_i,
  output sample_t                  yi,
  output sample_t                  yq
);

  localparam int PW = W + TRIG_W + 1;

  logic signed [PW-1:0] ai, aq;

  always_comb begin
    ai = PW'(xi) * PW'(cos_i) + PW'(xq) * PW'(sin_i);
    aq = PW'(xq) * PW'(cos_i) - PW'(xi) * PW'(sin_i);
  end

  function automatic sample_t sat_round(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1024)) >>> 11;
    if (r > 2047)       return sample_t'(2047);
    else if (r < -2048) return sample_t'(-2048);
    else                return sample_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      yi <= '0;
      yq <= '0;
    end else if (en) begin
      yi <= sat_round(ai);
      yq <= sat_round(aq);
    end
  end

endmodule
