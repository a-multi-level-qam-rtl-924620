// diff_decoder: differential decoder that removes the 90-degree ambiguity
// left by carrier recovery.
//
// A decision (ki, kq level indices) has quadrant q (0: I>0,Q>0; 1: I<0,Q>0;
// 2: I<0,Q<0; 3: I>0,Q<0).  The point is rotated back into quadrant 0 by
// q * -90 degrees, the quadrant is differentially decoded,
//   dq = (q - q_prev) mod 4,
// and the output (i_out, q_out) is the quadrant-0 point rotated by dq * 90
// degrees.  Rotating the whole received sequence by a multiple of 90 degrees
// leaves the output unchanged (after the first symbol).  One symbol per `vin`,
// registered: one clock of latency.  The chip names a differential decoder
// after the equalizer; this coding rule is this design's choice.
module diff_decoder
  import qam_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  qam_mode_e  qam_mode,
  input  logic       vin,
  input  logic [3:0] ki,
  input  logic [3:0] kq,
  output logic [3:0] i_out,
  output logic [3:0] q_out,
  output logic [1:0] quad_out,
  output logic       vout
);

  // levels as odd integers n = 2k + 1 - L
  logic signed [5:0] ni, nq, fi, fq, oi, oq;
  logic [1:0]        q, q_prev, dq;
  int                lv;

  always_comb begin
    lv = 1 << log2_levels(qam_mode);
    ni = 6'(2 * int'(ki) + 1 - lv);
    nq = 6'(2 * int'(kq) + 1 - lv);
    if (ni > 0) q = (nq > 0) ? 2'd0 : 2'd3;
    else        q = (nq > 0) ? 2'd1 : 2'd2;
    // fold into quadrant 0: rotate by -90 degrees q times
    unique case (q)
      2'd0: begin fi =  ni; fq =  nq; end
      2'd1: begin fi =  nq; fq = -ni; end
      2'd2: begin fi = -ni; fq = -nq; end
      default: begin fi = -nq; fq =  ni; end
    endcase
    dq = q - q_prev;
    unique case (dq)
      2'd0: begin oi =  fi; oq =  fq; end
      2'd1: begin oi = -fq; oq =  fi; end
      2'd2: begin oi = -fi; oq = -fq; end
      default: begin oi =  fq; oq = -fi; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_prev   <= '0;
      i_out    <= '0;
      q_out    <= '0;
      quad_out <= '0;
      vout     <= 1'b0;
    end else begin
      vout <= vin;
      if (vin) begin
        q_prev   <= q;
        i_out    <= 4'((int'(oi) + lv - 1) / 2);
        q_out    <= 4'((int'(oq) + lv - 1) / 2);
        quad_out <= dq;
      end
    end
  end

endmodule
