// agc: automatic gain control detector.
//
// With the constellation scaling of qam_pkg the mean of |I| and of |Q| is 128
// for every QAM order, so the detector compares |xi| + |xq| with 2*REF on each
// enabled sample and integrates the difference:
//   acc += (2*REF - |xi| - |xq|)        (acc saturates)
// `gain` (top 16 bits of acc) rises while the signal is too weak; it leaves
// the chip as the one-bit pulse-density stream agc_out (AGC OUT) to set the
// analog gain.  Detector, reference and output coding are this design's
// choices; the chip only names the AGC block and its output.
module agc
  import qam_pkg::*;
#(
  parameter int REF   = 128,
  parameter int ACC_W = 22
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  sample_t  xi,
  input  sample_t  xq,
  output logic signed [15:0] gain,
  output logic     agc_out
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   nxt;
  localparam logic signed [ACC_W:0] AMAX = (ACC_W+1)'((1 << (ACC_W - 1)) - 1);
  logic        [W-1:0]     ai, aq;

  assign ai  = xi[W-1] ? W'(-xi) : W'(xi);
  assign aq  = xq[W-1] ? W'(-xq) : W'(xq);
  assign nxt = (ACC_W+1)'(acc) + (ACC_W+1)'(2 * REF) - (ACC_W+1)'(ai) - (ACC_W+1)'(aq);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
    end else if (en) begin
      if (nxt > AMAX)       acc <= ACC_W'(AMAX);
      else if (nxt < -AMAX) acc <= ACC_W'(-AMAX);
      else                  acc <= ACC_W'(nxt);
    end
  end

  assign gain = acc[ACC_W-1 -: 16];

  sigma_delta_dac #(.IW(16)) u_dac (
    .clk   (clk),
    .rst   (rst),
    .word  (gain),
    .bit_o (agc_out)
  );

endmodule
