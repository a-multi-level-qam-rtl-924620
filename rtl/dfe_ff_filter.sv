// dfe_ff_filter: dual-mode (T / T/2-spaced) 8-tap feedforward section of the
// decision-feedback equalizer, clocked at the symbol rate in both modes.
//
// Structure (follows the chip's equalizer block diagram):
//   * IN is registered on the rising clock edge (`top`) and, in parallel, on
//     the falling edge (`neg`) followed by a rising-edge register (`neg2`).
//   * The odd-tap circuit is a 4-tap delay line fed by a selector:
//     t_spaced=1 -> `top`, t_spaced=0 -> `neg2`.
//   * The even-tap circuit is a 4-tap delay line fed by a second selector:
//     t_spaced=1 -> last register of the odd line, t_spaced=0 -> `top`.
//   * Each circuit multiplies its four taps by its coefficients and sums them;
//     the even sum passes one register and is added to the odd sum, and the
//     total passes one register to the output.
// In T-spaced mode (t_spaced=1) IN carries one sample per clock and the two
// circuits form one contiguous 8-tap line: y(n+1) = sum_k c_k x(n-k), where
// c_0..c_3 are the odd-circuit and c_4..c_7 the even-circuit coefficients.
// In T/2-spaced mode IN changes at both clock edges (two samples per symbol):
// the rising-edge sample goes to the even circuit and the falling-edge sample
// to the odd circuit, so each circuit runs at the symbol rate.
// reg_odd/reg_even are the tap values that produced the current y (for LMS
// adaptation).  Complex data; one Figure-style rail per component.
module dfe_ff_filter
  import qam_pkg::*;
#(
  parameter int TAPS_HALF = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   t_spaced,
  input  cplx_t  x,
  input  ccoef_t c_odd  [TAPS_HALF],
  input  ccoef_t c_even [TAPS_HALF],
  output cacc_t  y,
  output cplx_t  reg_odd  [TAPS_HALF],
  output cplx_t  reg_even [TAPS_HALF]
);

  cplx_t top, neg, neg2;
  cplx_t o   [TAPS_HALF];
  cplx_t e   [TAPS_HALF];
  cplx_t e_d [TAPS_HALF];
  cacc_t odd_sum, even_sum, even_d;

  // negative-edge input register (T/2 mode, odd samples)
  always_ff @(negedge clk) begin
    if (rst) neg <= '0;
    else     neg <= x;
  end

  // input selectors
  assign o[0] = t_spaced ? top : neg2;
  assign e[0] = t_spaced ? o[TAPS_HALF-1] : top;

  always_comb begin
    odd_sum  = '0;
    even_sum = '0;
    for (int k = 0; k < TAPS_HALF; k++) begin
      cacc_t po, pe;
      po = cmul(c_odd[k], o[k]);
      pe = cmul(c_even[k], e[k]);
      odd_sum.i  += po.i;
      odd_sum.q  += po.q;
      even_sum.i += pe.i;
      even_sum.q += pe.q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      top    <= '0;
      neg2   <= '0;
      even_d <= '0;
      y      <= '0;
      for (int k = 1; k < TAPS_HALF; k++) begin
        o[k] <= '0;
        e[k] <= '0;
      end
      for (int k = 0; k < TAPS_HALF; k++) begin
        e_d[k]      <= '0;
        reg_odd[k]  <= '0;
        reg_even[k] <= '0;
      end
    end else begin
      top  <= x;
      neg2 <= neg;
      for (int k = 1; k < TAPS_HALF; k++) begin
        o[k] <= o[k-1];
        e[k] <= e[k-1];
      end
      even_d <= even_sum;
      y.i    <= even_d.i + odd_sum.i;
      y.q    <= even_d.q + odd_sum.q;
      for (int k = 0; k < TAPS_HALF; k++) begin
        e_d[k]      <= e[k];
        reg_even[k] <= e_d[k];
        reg_odd[k]  <= o[k];
      end
    end
  end

endmodule
