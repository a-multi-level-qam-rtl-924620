// quad_mixer: converts the real IF samples from the ADC to complex baseband.
//
// A fixed-frequency NCO (LO_FREQ, default a quarter of the sample rate) gives
// cos and sin; I = 2*IN*cos and Q = -2*IN*sin, rounded to W bits.  The factor
// two restores the amplitude halved by mixing.  One sample per clock; the
// output is two cycles behind the input sample (one for the NCO, one for the
// product register, the input itself is aligned by a register).  The pair of
// multipliers follows the chip's block diagram; the IF and the LO source are
// this design's choice.
module quad_mixer
  import qam_pkg::*;
#(
  parameter logic [NCO_PHASE_W-1:0] LO_FREQ = NCO_PHASE_W'(1) << (NCO_PHASE_W - 2)
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t in_s,
  output sample_t i_o,
  output sample_t q_o
);

  logic signed [TRIG_W-1:0] lo_cos, lo_sin;
  logic        [NCO_PHASE_W-1:0] lo_phase;
  sample_t                  in_d;
  logic signed [W+TRIG_W-1:0] pi_w, pq_w;

  nco u_lo (
    .clk     (clk),
    .rst     (rst),
    .en      (1'b1),
    .freq    (LO_FREQ),
    .cos_o   (lo_cos),
    .sin_o   (lo_sin),
    .phase_o (lo_phase)
  );

  assign pi_w = in_d * lo_cos;
  assign pq_w = -(in_d * lo_sin);

  function automatic sample_t sat_round(logic signed [W+TRIG_W-1:0] v);
    logic signed [W+TRIG_W-1:0] r;
    r = (v + (W+TRIG_W)'(512)) >>> 10;
    if (r > 2047)       return sample_t'(2047);
    else if (r < -2048) return sample_t'(-2048);
    else                return sample_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      in_d <= '0;
      i_o  <= '0;
      q_o  <= '0;
    end else begin
      in_d <= in_s;
      i_o  <= sat_round(pi_w);
      q_o  <= sat_round(pq_w);
    end
  end

  // lo_phase is only observed in simulation
  logic unused_ok;
  assign unused_ok = ^lo_phase;

endmodule
