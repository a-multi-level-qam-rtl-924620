// nco: numerically controlled oscillator producing cosine and sine.
//
// A PHASE_W-bit phase accumulator advances by `freq` on every cycle in which
// `en` is high.  Its top LUT_BITS bits address one sine period; the two bits
// above the quarter index select the quadrant and a quarter-wave table
// (qam_pkg::SIN_QUARTER, sampled at the centres of the quarter-period bins)
// is mirrored and negated to give both outputs.  Outputs are registered and
// follow the accumulator by one enabled cycle: after the enable in which the
// phase became p, cos_o/sin_o hold cos(p)/sin(p) one enable later.
// 2047 stands for 1.0.  The oscillator itself is the one named in the chip's
// block diagram; its widths and table size are this design's choice.
module nco
  import qam_pkg::*;
#(
  parameter int PHASE_W_P = NCO_PHASE_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        en,
  input  logic        [PHASE_W_P-1:0] freq,
  output logic signed [TRIG_W-1:0]    cos_o,
  output logic signed [TRIG_W-1:0]    sin_o,
  output logic        [PHASE_W_P-1:0] phase_o
);

  localparam int QB = LUT_BITS - 2;

  logic [PHASE_W_P-1:0] phase;
  logic [1:0]           quad;
  logic [QB-1:0]        idx;
  logic signed [TRIG_W-1:0] s_fwd, s_rev;

  assign quad  = phase[PHASE_W_P-1 -: 2];
  assign idx   = phase[PHASE_W_P-3 -: QB];
  assign s_fwd = SIN_QUARTER[idx];
  assign s_rev = SIN_QUARTER[~idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      cos_o <= '0;
      sin_o <= '0;
    end else if (en) begin
      phase <= phase + freq;
      unique case (quad)
        2'd0: begin sin_o <=  s_fwd; cos_o <=  s_rev; end
        2'd1: begin sin_o <=  s_rev; cos_o <= -s_fwd; end
        2'd2: begin sin_o <= -s_fwd; cos_o <= -s_rev; end
        2'd3: begin sin_o <= -s_rev; cos_o <=  s_fwd; end
      endcase
    end
  end

  assign phase_o = phase;

endmodule
