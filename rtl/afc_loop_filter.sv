// afc_loop_filter: loop filter of the outer carrier loop (automatic frequency
// control).  It integrates the detected phase errors,
//   acc += eout << KA_SHIFT   (when en && evalid),
// and sends the top 16 bits of the accumulator to the analog tuner: as the
// word `afc_word` and as the one-bit pulse-density stream `afc_out` (AFC OUT),
// which the external low-pass filter turns into the tuner's control voltage.
// A positive phase error (received signal ahead of the decision) raises the
// word.  The integrator form, gain and output coding are this design's
// choices; the loop and its path through an LPF to the tuner are the chip's.
module afc_loop_filter #(
  parameter int ACC_W    = 20,
  parameter int KA_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              evalid,
  input  logic signed [4:0] eout,
  output logic signed [15:0] afc_word,
  output logic              afc_out
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   nxt;
  localparam logic signed [ACC_W:0] AMAX = (ACC_W+1)'((1 << (ACC_W - 1)) - 1);

  assign nxt = (ACC_W+1)'(acc) + ((ACC_W+1)'(eout) <<< KA_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
    end else if (en && evalid) begin
      // saturate instead of wrapping
      if (nxt > AMAX)       acc <= ACC_W'(AMAX);
      else if (nxt < -AMAX) acc <= ACC_W'(-AMAX);
      else                  acc <= ACC_W'(nxt);
    end
  end

  assign afc_word = acc[ACC_W-1 -: 16];

  sigma_delta_dac #(.IW(16)) u_dac (
    .clk   (clk),
    .rst   (rst),
    .word  (afc_word),
    .bit_o (afc_out)
  );

endmodule
