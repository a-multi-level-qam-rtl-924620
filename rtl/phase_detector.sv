// phase_detector: power-based carrier phase detector with a +/-45 degree
// range, independent of the QAM order.
//
// Four stages, as in the chip's phase detector diagram:
//   1. Power calculation: P = Xi^2 + Xq^2 of the received signal.
//   2. Transmitted symbol prediction: the constellation ring (set of points
//      with equal power) nearest to P is chosen by comparing 2P with the sums
//      of adjacent ring powers; its first-quadrant points are the candidates
//      S1..S4 (at most four in 256-QAM).
//   3. Phase error angle calculation: for each candidate, of its four 90-degree
//      rotations the one within +/-45 degrees of X is used, so the tangent of
//      the angle theta from S to X, cross/dot, lies in [-1, 1].  It is
//      quantised to one of NREG = 16 equal regions of width 1/8 in tan(theta)
//      by comparing 8|cross| with multiples of dot (no divider).
//   4. Phase error selection: a counter per region counts the consecutive
//      received signals for which some candidate fell in that region
//      (saturating at 15).  When a region has reached NCONSEC = 4, an error
//      is output (evalid=1) with eout = 2r - 15, the region centre in units
//      of 1/16 of tan(theta).  If several regions qualify, the longest run
//      wins (the true error is hit on every symbol, a wrong candidate only by
//      chance), and among equal runs the one nearest zero.
// The four-candidate prediction, the 16 regions and the four-consecutive
// rule follow the chip; the region widths, the rotation search and the
// choice among several qualifying regions are this design's.
// Latency: X is registered on `vin`, the error appears on the clock after
// that (two clocks from X to eout).
module phase_detector
  import qam_pkg::*;
#(
  parameter int NREG    = 16,
  parameter int NCONSEC = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  qam_mode_e         qam_mode,
  input  logic              vin,
  input  sample_t           xi,
  input  sample_t           xq,
  output logic signed [4:0] eout,
  output logic              evalid,
  output logic [MAX_PTS-1:0] cand_valid,   // candidates used for this signal
  output logic [NREG-1:0]   hit_o          // regions hit by this signal
);

  localparam int PW = 2 * W + 2;    // power width
  localparam int CWD = W + 8;       // cross/dot width

  sample_t    xr_i, xr_q;
  logic       v_r;
  logic [PW-1:0] pow;
  int         jsel;
  ring_t      ring;
  logic [NREG-1:0] hit;
  logic [3:0] cnt [NREG];
  logic [3:0] cnt_n [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      xr_i <= '0;
      xr_q <= '0;
      v_r  <= 1'b0;
    end else begin
      v_r <= vin;
      if (vin) begin
        xr_i <= xi;
        xr_q <= xq;
      end
    end
  end

  // 1 + 2: power and ring selection
  always_comb begin
    int lg;
    int nr;
    logic [PW+8:0] thr;
    lg   = int'(log2_grid(qam_mode));
    nr   = RING_NUM[qam_mode];
    pow  = PW'(xr_i * xr_i) + PW'(xr_q * xr_q);
    jsel = 0;
    for (int j = 0; j < MAX_RINGS - 1; j++) begin
      ring_t r0, r1;
      r0  = RINGS[int'(qam_mode) * MAX_RINGS + j];
      r1  = RINGS[int'(qam_mode) * MAX_RINGS + j + 1];
      thr = (PW+9)'({1'b0, r0.pow} + {1'b0, r1.pow}) << (2 * lg);
      if ((j + 1 < nr) && ({(PW+9)'(pow), 1'b0} > {1'b0, thr})) jsel = j + 1;
    end
    ring = RINGS[int'(qam_mode) * MAX_RINGS + jsel];
  end

  // 3: angle of each candidate, quantised to a region
  always_comb begin
    hit        = '0;
    cand_valid = '0;
    for (int c = 0; c < MAX_PTS; c++) begin
      logic signed [5:0]     a, b;
      logic signed [5:0]     si, sq;
      logic signed [CWD-1:0] cr, dt, acr;
      logic                  found;
      int                    q;
      a     = 6'(ring.a[c]);
      b     = 6'(ring.b[c]);
      found = 1'b0;
      cr    = '0;
      dt    = '0;
      for (int r = 0; r < 4; r++) begin
        logic signed [CWD-1:0] crr, dtr, acrr;
        unique case (r)
          0: begin si =  a; sq =  b; end
          1: begin si = -b; sq =  a; end
          2: begin si = -a; sq = -b; end
          default: begin si =  b; sq = -a; end
        endcase
        crr  = CWD'(si) * CWD'(xr_q) - CWD'(sq) * CWD'(xr_i);
        dtr  = CWD'(si) * CWD'(xr_i) + CWD'(sq) * CWD'(xr_q);
        acrr = (crr < 0) ? -crr : crr;
        if (!found && (dtr > 0) && (acrr <= dtr)) begin
          found = 1'b1;
          cr    = crr;
          dt    = dtr;
        end
      end
      acr = (cr < 0) ? -cr : cr;
      q   = 0;
      for (int k = 1; k < 8; k++)
        if ((CWD+4)'(acr) * 8 >= (CWD+4)'(dt) * k) q = k;
      if ((c < int'(ring.cnt)) && found && v_r) begin
        cand_valid[c] = 1'b1;
        if (cr >= 0) hit[8 + q] = 1'b1;
        else         hit[7 - q] = 1'b1;
      end
    end
  end

  assign hit_o = hit;

  // 4: phase error selection
  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      if (!hit[r])            cnt_n[r] = '0;
      else if (cnt[r] != 4'hF) cnt_n[r] = cnt[r] + 4'd1;
      else                    cnt_n[r] = cnt[r];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREG; r++) cnt[r] <= '0;
      eout   <= '0;
      evalid <= 1'b0;
    end else begin
      evalid <= 1'b0;
      if (v_r) begin
        logic [3:0] best;
        best = 4'(NCONSEC - 1);
        for (int r = 0; r < NREG; r++) cnt[r] <= cnt_n[r];
        // longest run wins; search outwards from zero error (7, 8, 6, 9,
        // ...) so that equal runs resolve to the smaller error
        for (int s = 0; s < NREG; s++) begin
          int r;
          r = (s % 2 == 0) ? (NREG / 2 - 1 - s / 2) : (NREG / 2 + s / 2);
          if (cnt_n[r] > best) begin
            best   = cnt_n[r];
            evalid <= 1'b1;
            eout   <= 5'(2 * r - (NREG - 1));
          end
        end
      end
    end
  end

endmodule
