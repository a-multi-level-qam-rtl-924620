// tb_phase_detector: noise-free constellation points rotated by a fixed angle
// theta.  For each QAM order and each theta in -44..44 degrees (steps of 4),
// plus 60 and -70 degrees (which alias to -30 and +20 modulo 90):
//   * no error may be output for the first three symbols after a change of
//     theta has flushed through (four consecutive hits are needed), and
//   * from the fourth symbol on, every symbol must give evalid with
//     eout = 2r - 15, r = 8 + floor(8 tan(theta')) for theta' >= 0 and
//     r = 7 - floor(8 |tan(theta')|) for theta' < 0 (theta' = theta reduced
//     to -45..45 degrees), computed here in real arithmetic.
// Angles within 0.3 degrees of a region edge are skipped.
module tb_phase_detector;
  import qam_pkg::*;

  logic clk = 0, rst = 1, vin = 0;
  qam_mode_e mode = QAM4;
  sample_t xi = '0, xq = '0;
  logic signed [4:0] eout;
  logic evalid;
  logic [3:0] cv;
  logic [15:0] hit;
  int checks = 0, failures = 0;
  int n_detect = 0;

  phase_detector dut (.clk(clk), .rst(rst), .qam_mode(mode), .vin(vin), .xi(xi), .xq(xq),
                      .eout(eout), .evalid(evalid), .cand_valid(cv), .hit_o(hit));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_angle(int m, real deg);
    real th, thr, t, pi;
    int  r, e_exp, lv, g;
    bit  edge_case;
    pi  = 3.14159265358979;
    thr = deg;
    while (thr > 45.0)  thr -= 90.0;
    while (thr < -45.0) thr += 90.0;
    t = $tan(thr * pi / 180.0);
    r = (t >= 0) ? 8 + $rtoi($floor(8.0 * t)) : 7 - $rtoi($floor(-8.0 * t));
    if (r > 15) r = 15;
    if (r < 0)  r = 0;
    e_exp = 2 * r - 15;
    edge_case = (abs_r(8.0 * t - $floor(8.0 * t + 0.5)) < 0.05);
    th = deg * pi / 180.0;
    lv = 2 << m;
    g  = 256 / lv;
    // flush with a zero signal (no candidates, counters clear)
    xi <= '0; xq <= '0; vin <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      real si, sq;
      si = real'((2 * int'($urandom_range(0, lv - 1)) + 1 - lv) * g);
      sq = real'((2 * int'($urandom_range(0, lv - 1)) + 1 - lv) * g);
      xi <= sample_t'($rtoi(si * $cos(th) - sq * $sin(th) + 0.5 * ((si * $cos(th) - sq * $sin(th)) >= 0 ? 1 : -1)));
      xq <= sample_t'($rtoi(si * $sin(th) + sq * $cos(th) + 0.5 * ((si * $sin(th) + sq * $cos(th)) >= 0 ? 1 : -1)));
      @(posedge clk);
      #1;
      // output after this edge belongs to symbol n-1
      if (n >= 1 && n <= 3) begin
        checks++;
        if (evalid) begin failures++; $display("early detection mode %0d deg %f n=%0d", m, deg, n); end
      end else if (n >= 4 && !edge_case) begin
        checks++;
        if (!evalid || eout != 5'(e_exp)) begin
          failures++;
          if (failures < 20) $display("mode %0d deg %f n=%0d evalid=%0d eout=%0d expected %0d", m, deg, n, evalid, eout, e_exp);
        end
      end
      if (evalid) n_detect++;
    end
  endtask

  function automatic real abs_r(real v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 4; m++) begin
      mode = qam_mode_e'(m);
      for (int d = -44; d <= 44; d += 4) run_angle(m, real'(d));
      run_angle(m, 60.0);
      run_angle(m, -70.0);
    end
    $display("detections: %0d", n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
