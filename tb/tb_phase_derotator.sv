// tb_phase_derotator: random complex samples and random angles.  After each
// enabled clock the output must be within 1.5 LSB of (xi + j xq) * exp(-j a)
// computed in real arithmetic from the applied cos/sin words; with `en` low
// the output must hold.
module tb_phase_derotator;
  import qam_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  sample_t xi = '0, xq = '0, yi, yq;
  logic signed [11:0] c = '0, s = '0;
  int checks = 0, failures = 0;

  phase_derotator dut (.clk(clk), .rst(rst), .en(en), .xi(xi), .xq(xq),
                       .cos_i(c), .sin_i(s), .yi(yi), .yq(yq));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 500; m++) begin
      real a, ri, rq, ci, si;
      sample_t hi, hq;
      a  = real'($urandom_range(0, 3599)) * 3.14159265358979 / 1800.0;
      ci = $cos(a); si = $sin(a);
      xi <= sample_t'($signed($urandom_range(0, 1200)) - 600);
      xq <= sample_t'($signed($urandom_range(0, 1200)) - 600);
      c  <= 12'($rtoi(2047.0 * ci));
      s  <= 12'($rtoi(2047.0 * si));
      en <= (m % 5 != 4);
      hi = yi; hq = yq;
      @(posedge clk);
      #1;
      checks++;
      if (en) begin
        ri = (real'(xi) * real'(c) + real'(xq) * real'(s)) / 2048.0;
        rq = (real'(xq) * real'(c) - real'(xi) * real'(s)) / 2048.0;
        if ((real'(yi) - ri > 1.5) || (ri - real'(yi) > 1.5) || (real'(yq) - rq > 1.5) || (rq - real'(yq) > 1.5)) begin
          failures++;
          if (failures < 10) $display("m=%0d y=%0d,%0d ref=%f,%f", m, yi, yq, ri, rq);
        end
      end else if (yi != hi || yq != hq) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
