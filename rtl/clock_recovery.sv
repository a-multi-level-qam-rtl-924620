// clock_recovery: symbol-timing error detector and loop filter.
//
// Works on the derotated signal at two samples per symbol (`en` marks a new
// sample, `sym` marks the on-symbol one).  On each on-symbol sample the
// Gardner detector
//   ted = mi * (pi - ci) + mq * (pq - cq)
// is formed from the previous symbol sample p, the mid-symbol sample m and the
// current symbol sample c; it is zero on average when `sym` samples fall on
// the symbol centres; it is negative on average when sampling late and
// positive when sampling early.  The errors are
// integrated (ctrl += ted >> K_SHIFT, saturating) and the top 16 bits leave as
// the one-bit pulse-density stream clk_out (CLOCK OUT) that steers the
// external sampling-clock oscillator.  The detector choice and gains are this
// design's; the chip only names the block and its output.
module clock_recovery
  import qam_pkg::*;
#(
  parameter int K_SHIFT = 8,
  parameter int ACC_W   = 24
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     sym,
  input  sample_t  xi,
  input  sample_t  xq,
  output logic signed [2*W+1:0] ted,
  output logic signed [15:0]    ctrl,
  output logic     clk_out
);

  localparam int TW = 2 * W + 2;

  sample_t pi_r, pq_r, mi_r, mq_r;
  logic signed [TW-1:0] ted_n;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   nxt;
  localparam logic signed [ACC_W:0] AMAX = (ACC_W+1)'((1 << (ACC_W - 1)) - 1);

  assign ted_n = TW'(mi_r) * (TW'(pi_r) - TW'(xi)) + TW'(mq_r) * (TW'(pq_r) - TW'(xq));
  assign nxt   = (ACC_W+1)'(acc) + (ACC_W+1)'(ted_n >>> K_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      pi_r <= '0; pq_r <= '0; mi_r <= '0; mq_r <= '0;
      ted  <= '0;
      acc  <= '0;
    end else if (en) begin
      if (sym) begin
        pi_r <= xi;
        pq_r <= xq;
        ted  <= ted_n;
        if (nxt > AMAX)       acc <= ACC_W'(AMAX);
        else if (nxt < -AMAX) acc <= ACC_W'(-AMAX);
        else                  acc <= ACC_W'(nxt);
      end else begin
        mi_r <= xi;
        mq_r <= xq;
      end
    end
  end

  assign ctrl = acc[ACC_W-1 -: 16];

  sigma_delta_dac #(.IW(16)) u_dac (
    .clk   (clk),
    .rst   (rst),
    .word  (ctrl),
    .bit_o (clk_out)
  );

endmodule
