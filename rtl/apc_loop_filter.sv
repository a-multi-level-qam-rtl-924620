// apc_loop_filter: loop filter of the inner, internally closed carrier loop
// (automatic phase control).  Proportional-plus-integral:
//   integ += eout << KI_SHIFT          (on each detected error)
//   freq   = integ + (eout << KP_SHIFT)
// `freq` is the NCO phase increment per two-samples-per-symbol sample; `integ`
// is the loop's frequency estimate (the slowly moving "APC loop-filter
// output").  Errors are applied only when `en` (from loop select) and
// `evalid` (a phase error was detected) are both high; otherwise the
// proportional part is zero and the integrator holds.  Registered output, one
// clock after the error.  The second-order form and the gains are this
// design's choice; the block itself is the chip's APC loop filter.
module apc_loop_filter #(
  parameter int OW       = 24,
  parameter int KP_SHIFT = 11,
  parameter int KI_SHIFT = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              evalid,
  input  logic signed [4:0] eout,
  output logic [OW-1:0]     freq,
  output logic signed [OW-1:0] integ
);

  logic signed [OW-1:0] e_ext;
  logic signed [OW-1:0] integ_n;

  assign e_ext   = OW'(eout);
  assign integ_n = integ + (e_ext <<< KI_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      freq  <= '0;
    end else if (en && evalid) begin
      integ <= integ_n;
      freq  <= integ_n + (e_ext <<< KP_SHIFT);
    end else begin
      freq  <= integ;
    end
  end

endmodule
