// loop_select: decides which carrier loop filters receive the phase detector
// output.
//   sel = 0: APC only        sel = 1: AFC only
//   sel = 2: APC and AFC     sel = 3: automatic
// In automatic mode both loops run until the loop is locked, then the AFC
// loop holds its value and only the APC loop tracks.  Lock is declared after
// LOCK_N consecutive detected errors with |eout| <= LOCK_TH and dropped after
// LOCK_N consecutive detected errors outside that band (a lock detector of
// this design's own; the chip only shows a "Loop Select" block between the
// phase detector, the two loop filters and the serial bus).  Outputs are
// registered.
module loop_select #(
  parameter int LOCK_N  = 64,
  parameter int LOCK_TH = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        sel,
  input  logic              evalid,
  input  logic signed [4:0] eout,
  output logic              apc_en,
  output logic              afc_en,
  output logic              lock
);

  localparam int CNT_W = $clog2(LOCK_N + 1);

  logic [CNT_W-1:0] good_cnt, bad_cnt;
  logic             in_band;

  assign in_band = (eout <= 5'(LOCK_TH)) && (eout >= -5'(LOCK_TH));

  always_ff @(posedge clk) begin
    if (rst) begin
      good_cnt <= '0;
      bad_cnt  <= '0;
      lock     <= 1'b0;
    end else if (evalid) begin
      if (in_band) begin
        bad_cnt <= '0;
        if (good_cnt == CNT_W'(LOCK_N - 1)) lock <= 1'b1;
        if (good_cnt != CNT_W'(LOCK_N))     good_cnt <= good_cnt + 1'b1;
      end else begin
        good_cnt <= '0;
        if (bad_cnt == CNT_W'(LOCK_N - 1)) lock <= 1'b0;
        if (bad_cnt != CNT_W'(LOCK_N))     bad_cnt <= bad_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (sel)
      2'd0:    begin apc_en = 1'b1; afc_en = 1'b0;  end
      2'd1:    begin apc_en = 1'b0; afc_en = 1'b1;  end
      2'd2:    begin apc_en = 1'b1; afc_en = 1'b1;  end
      default: begin apc_en = 1'b1; afc_en = !lock; end
    endcase
  end

endmodule
