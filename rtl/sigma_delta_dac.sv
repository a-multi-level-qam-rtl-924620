// sigma_delta_dac: first-order sigma-delta modulator turning a signed control
// word into a one-bit pulse-density stream for an external RC low-pass
// filter (used for the AFC, AGC and clock-control outputs).
//
// The word is offset to unsigned (0 .. 2^IW-1); each enabled clock adds it to
// an IW-bit accumulator and the carry is the output bit, so the density of
// ones equals (word + 2^(IW-1)) / 2^IW.  Output registered; one bit per clock.
module sigma_delta_dac #(
  parameter int IW = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [IW-1:0] word,
  output logic                 bit_o
);

  logic [IW-1:0] acc;
  logic [IW:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, ~word[IW-1], word[IW-2:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      bit_o <= 1'b0;
    end else begin
      acc   <= sum[IW-1:0];
      bit_o <= sum[IW];
    end
  end

endmodule
