// tb_dfe: decision-feedback equalizer.
//  1. Slicer, all QAM orders, adaptation off, identity channel: inputs are
//     constellation points plus noise smaller than half the point spacing;
//     decisions must equal the points, six clocks after the input (T mode).
//  2. T-spaced, 16-QAM, channel x(n) = s(n) + 0.15 s(n-1) + 0.08j s(n-2),
//     LMS on: after convergence decisions must equal s(n) (delay 6) and the
//     residual mean-square error of the soft output must fall below 30
//     (about 600 unequalized).
//  3. Mode switch to T/2: coefficients must restart from the unit tap.  IN
//     carries two samples per symbol, on-symbol xp = s(n) + 0.15 s(n-1) at the
//     rising edge and mid-symbol xn = (s(n) + s(n+1))/2 at the falling edge;
//     decisions must equal s(n) (delay 3) with a residual MSE below 30.
module tb_dfe;
  import qam_pkg::*;

  logic      clk = 0, rst = 1, ts = 1, adapt = 0;
  qam_mode_e mode = QAM16;
  cplx_t     x = '0, y, d;
  logic [3:0] ki, kq;
  int checks = 0, failures = 0;
  cplx_t s [int];

  dfe dut (.clk(clk), .rst(rst), .qam_mode(mode), .t_spaced(ts), .adapt(adapt), .x(x),
           .y_o(y), .d_o(d), .ki_o(ki), .kq_o(kq));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd_sym(qam_mode_e m);
    cplx_t v;
    int lv, g;
    lv = 2 << int'(m);
    g  = 256 / lv;
    v.i = sample_t'((2 * int'($urandom_range(0, lv - 1)) + 1 - lv) * g);
    v.q = sample_t'((2 * int'($urandom_range(0, lv - 1)) + 1 - lv) * g);
    return v;
  endfunction

  function automatic sample_t clip(real r);
    return sample_t'($rtoi(r + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  // Residual mean-square error of the soft output after convergence; the
  // unequalized channel leaves about 0.17^2 * 20480 = 600.
  task automatic check_mse(string what, real mse);
    checks++;
    if (mse > 30.0) begin
      failures++;
      $display("%s: residual MSE %f too large", what, mse);
    end
  endtask

  initial begin
    int errs;
    real mse;
    repeat (3) @(posedge clk);
    rst <= 0;
    // ---------------- 1: slicer ----------------
    for (int m = 0; m < 4; m++) begin
      mode = qam_mode_e'(m);
      s.delete();
      for (int n = 0; n < 300; n++) begin
        cplx_t v;
        int g;
        g = 256 / (2 << m);
        s[n] = rnd_sym(mode);
        v.i = s[n].i + sample_t'($signed($urandom_range(0, 2 * g - 2)) - (g - 1));
        v.q = s[n].q + sample_t'($signed($urandom_range(0, 2 * g - 2)) - (g - 1));
        x <= v;
        @(posedge clk);
        #1;
        if (n >= 10) begin
          checks++;
          if (d != s[n-6] || level_value(mode, ki) != s[n-6].i || level_value(mode, kq) != s[n-6].q) begin
            failures++;
            if (failures < 10) $display("slicer mode %0d n=%0d d=%0d,%0d s=%0d,%0d", m, n, d.i, d.q, s[n-6].i, s[n-6].q);
          end
        end
      end
    end
    // ---------------- 2: T-spaced adaptation ----------------
    mode = QAM16;
    @(posedge clk);
    adapt = 1;
    s.delete();
    for (int n = -2; n < 0; n++) s[n] = '0;
    errs = 0;
    mse  = 0.0;
    for (int n = 0; n < 6000; n++) begin
      cplx_t v;
      s[n] = rnd_sym(mode);
      v.i = clip(real'(s[n].i) + 0.15 * real'(s[n-1].i) - 0.08 * real'(s[n-2].q));
      v.q = clip(real'(s[n].q) + 0.15 * real'(s[n-1].q) + 0.08 * real'(s[n-2].i));
      x <= v;
      @(posedge clk);
      #1;
      if (n >= 4000) begin
        checks++;
        if (d != s[n-6]) begin failures++; errs++; end
        mse += (real'(y.i - s[n-6].i) ** 2 + real'(y.q - s[n-6].q) ** 2) / 2000.0;
      end
    end
    if (errs) $display("T mode: %0d decision errors", errs);
    check_mse("T mode", mse);
    // ---------------- 3: switch to T/2 ----------------
    ts = 0;
    @(posedge clk);
    #1;
    checks++;
    if (dut.ca_even[0].i != (1 << (CFRAC + dut.EXT)) || dut.ca_even[0].q != 0 || dut.cb[0] != '0) begin
      failures++;
      $display("coefficients not restarted on mode switch");
    end
    s.delete();
    s[-2] = '0;
    s[-1] = '0;
    s[0]  = rnd_sym(mode);
    errs = 0;
    mse  = 0.0;
    for (int n = 0; n < 6000; n++) begin
      cplx_t v;
      s[n+1] = rnd_sym(mode);
      v.i = clip(0.5 * (real'(s[n-1].i) + real'(s[n].i)));
      v.q = clip(0.5 * (real'(s[n-1].q) + real'(s[n].q)));
      x <= v;
      @(negedge clk);
      v.i = clip(real'(s[n].i) + 0.15 * real'(s[n-1].i));
      v.q = clip(real'(s[n].q) + 0.15 * real'(s[n-1].q));
      x <= v;
      @(posedge clk);
      #1;
      if (n >= 4000) begin
        checks++;
        if (d != s[n-3]) begin failures++; errs++; end
        mse += (real'(y.i - s[n-3].i) ** 2 + real'(y.q - s[n-3].q) ** 2) / 2000.0;
      end
    end
    if (errs) $display("T/2 mode: %0d decision errors", errs);
    check_mse("T/2 mode", mse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
