// tb_srrc_filter: random input through the decimating root-raised-cosine
// filter.  The reference convolves the inputs with a root-raised-cosine
// response (roll-off 0.15, 4 samples/symbol, 49 taps, unit energy) computed
// here in real arithmetic; each strobed output must match to within 3 LSB,
// and the output must hold between strobes.  Also checks the unit-energy
// scaling: an impulse of 1000 gives a peak response of about 1000*h(0).
module tb_srrc_filter;
  import qam_pkg::*;

  logic clk = 0, rst = 1, ostb = 0;
  sample_t x = '0, y;
  int checks = 0, failures = 0;
  real h [49];
  sample_t xs [$];

  srrc_filter dut (.clk(clk), .rst(rst), .x(x), .ostb(ostb), .y(y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rrc(real t);
    real a, pi;
    a = 0.15; pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ((4.0 * a * t - 1.0) * (4.0 * a * t + 1.0) < 1e-9 && (4.0 * a * t - 1.0) * (4.0 * a * t + 1.0) > -1e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * (1.0 - 16.0 * a * a * t * t));
  endfunction

  initial begin
    real e;
    e = 0.0;
    for (int k = 0; k < 49; k++) begin h[k] = rrc((real'(k) - 24.0) / 4.0); e += h[k] * h[k]; end
    for (int k = 0; k < 49; k++) h[k] = h[k] / $sqrt(e);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 600; m++) begin
      sample_t yprev;
      yprev = y;
      x    <= (m < 100) ? ((m == 10) ? sample_t'(1000) : '0) : sample_t'($signed($urandom_range(0, 1200)) - 600);
      ostb <= m[0];
      @(posedge clk);
      xs.push_back(x);
      #1;
      if (m >= 1 && m[0]) begin
        // y = sum h[k] * x(m-1-k)
        real r;
        r = 0.0;
        for (int k = 0; k < 49; k++) if (m - 1 - k >= 0) r += h[k] * real'(xs[m-1-k]);
        checks++;
        if ((real'(y) - r > 3.0) || (r - real'(y) > 3.0)) begin
          failures++;
          if (failures < 10) $display("m=%0d y=%0d ref=%f", m, y, r);
        end
      end else if (m >= 1) begin
        checks++;
        if (y != yprev) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
