// tb_clock_recovery: a band-limited symbol stream (+/-A alternating with
// random repeats, shaped by a raised-cosine-like pulse) is sampled at two
// samples per symbol with a timing offset tau.  On every on-symbol sample
// the timing error must equal the Gardner value
// m * (p - c) (previous symbol, middle, current symbol sample, I plus Q)
// computed here, and over a run its mean must be negative for a late
// sampling phase and positive for an early one (and the control word must
// move the same way).  CLOCK OUT must carry the control word as a pulse
// density.
module tb_clock_recovery;
  import qam_pkg::*;
  logic clk = 0, rst = 1, en = 0, sym = 0, o;
  sample_t xi = '0, xq = '0;
  logic signed [25:0] ted;
  logic signed [15:0] ctrl;
  int checks = 0, failures = 0;
  real a [int], b [int];

  clock_recovery dut (.clk(clk), .rst(rst), .en(en), .sym(sym), .xi(xi), .xq(xq),
                      .ted(ted), .ctrl(ctrl), .clk_out(o));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raised-cosine pulse, roll-off 0.5, t in symbols
  function automatic real p(real t);
    real pi, s, c;
    pi = 3.14159265358979;
    if (t > -1e-9 && t < 1e-9) return 1.0;
    if ((t * t - 1.0) > -1e-9 && (t * t - 1.0) < 1e-9) return 0.5 * $sin(pi * t) / (pi * t) * pi / 4.0 * 2.0 / pi;
    s = $sin(pi * t) / (pi * t);
    c = $cos(0.5 * pi * t) / (1.0 - t * t);
    return s * c;
  endfunction

  function automatic real sig(real t, bit q);
    real r;
    int n0;
    r = 0.0;
    n0 = $rtoi($floor(t));
    for (int n = n0 - 8; n <= n0 + 8; n++) r += (q ? b[n] : a[n]) * p(t - real'(n));
    return r;
  endfunction

  sample_t pi_s = '0, pq_s = '0, mi_s = '0, mq_s = '0;

  task automatic run(real tau, output real mean_ted, output int dctrl);
    logic signed [15:0] c0;
    longint sum;
    int cnt;
    sum = 0; cnt = 0;
    c0 = ctrl;
    for (int n = 10; n < 3000; n++) begin
      for (int h = 0; h < 2; h++) begin
        sample_t vi, vq;
        vi = sample_t'($rtoi(sig(real'(n) + 0.5 * real'(h) + tau, 0)));
        vq = sample_t'($rtoi(sig(real'(n) + 0.5 * real'(h) + tau, 1)));
        xi <= vi; xq <= vq; en <= 1; sym <= (h == 0);
        @(posedge clk);
        #1;
        if (h == 0) begin
          longint e;
          e = longint'(mi_s) * (longint'(pi_s) - longint'(vi)) + longint'(mq_s) * (longint'(pq_s) - longint'(vq));
          checks++;
          if (longint'(ted) != e) begin
            failures++;
            if (failures < 10) $display("ted %0d expected %0d", ted, e);
          end
          if (n > 20) begin sum += e; cnt++; end
          pi_s = vi; pq_s = vq;
        end else begin
          mi_s = vi; mq_s = vq;
        end
        en <= 0;
        @(posedge clk);
      end
    end
    mean_ted = real'(sum) / real'(cnt);
    dctrl = int'(ctrl) - int'(c0);
  endtask

  initial begin
    real m;
    int dc, ones;
    for (int n = -20; n < 3100; n++) begin
      a[n] = real'(2 * int'($urandom_range(0, 1)) - 1) * 150.0;
      b[n] = real'(2 * int'($urandom_range(0, 1)) - 1) * 150.0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0.2, m, dc);     // sampling late
    checks++;
    if (m >= 0.0 || dc >= 0) begin failures++; $display("late: mean ted %f dctrl %0d", m, dc); end
    run(-0.2, m, dc);    // sampling early
    checks++;
    if (m <= 0.0 || dc <= 0) begin failures++; $display("early: mean ted %f dctrl %0d", m, dc); end
    en <= 0;
    @(posedge clk);
    ones = 0;
    for (int k = 0; k < 4096; k++) begin @(posedge clk); #1 ones += int'(o); end
    checks++;
    if (ones - (int'(ctrl) + 32768) * 4096 / 65536 > 2 || (int'(ctrl) + 32768) * 4096 / 65536 - ones > 2) begin
      failures++; $display("density %0d for word %0d", ones, ctrl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
