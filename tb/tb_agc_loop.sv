// tb_agc_loop: the AGC loop closed through a model of the analog gain stage.
//
// The transmitter model is the one of tb_qam_demod_top (64-QAM, carrier
// offset 0.001 cycles/symbol, no echo).  Its ADC samples are scaled by the
// gain of a variable-gain amplifier model: AGC OUT is smoothed by a
// first-order low-pass (time constant 4096 sample clocks, like an external
// RC filter) to a value v in [-1, 1], and the gain is G0 * (1 + 2 v) with
// G0 = 0.6, i.e. the signal starts 4.4 dB too weak.  The receiver runs at
// 64-QAM, T-spaced, automatic loop select, with equalizer adaptation off for
// the first 20000 symbols while the level settles (an adapting equalizer
// would otherwise take up the level error and the carrier rotation itself)
// and on for the next 10000.  Then the test checks that the gain word rose, that the mean
// of |I| + |Q| at the derotator output over 2000 symbols is 256 within 4 %,
// and that 500 decoded symbols are all correct at one fixed latency.  The
// amplifier and filter are models of off-chip parts, not part of the design.
module tb_agc_loop;
  import qam_pkg::*;

  localparam real FOFF1 = 0.001;    // carrier offset, cycles per symbol
  localparam real G0    = 0.6;      // amplifier gain at v = 0
  localparam int  DLY   = 2;         // extra ADC samples of delay (sampling phase)

  logic clk_s = 0, rst = 1;
  sample_t in_s = '0;
  logic scl = 1, sda_m = 1, sda_oe, clk_sym;
  wire  sda = sda_m & ~sda_oe;
  logic [3:0] i_out, q_out;
  logic afc_out, agc_out, clock_out, lock;
  int checks = 0, failures = 0;

  qam_demod_top dut (.clk_s(clk_s), .rst(rst), .in_s(in_s), .scl(scl), .sda_i(sda),
                     .sda_oe(sda_oe), .clk_sym(clk_sym), .i_out(i_out), .q_out(q_out),
                     .afc_out(afc_out), .agc_out(agc_out), .clock_out(clock_out), .lock(lock));

  always #5 clk_s = ~clk_s;

  initial begin
    #100000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- transmitter ----------------
  real h [49];
  int  lv_tx = 4;                    // levels per axis
  real fo = FOFF1;
  real car_ph = 0.0;
  int  sym_n = 0;                    // symbols generated
  real ai [int], aq [int];           // channel input symbols (transmitted points)
  int  di [int], dq_ [int];          // data: expected decoder output indices
  int  qtx = 0;
  real echo = 0.0;

  function automatic real rrc(real t);
    real a, pi;
    a = 0.15; pi = 3.14159265358979;
    if (t > -1e-9 && t < 1e-9) return 1.0 - a + 4.0 * a / pi;
    if ((16.0 * a * a * t * t - 1.0) > -1e-9 && (16.0 * a * a * t * t - 1.0) < 1e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a))) /
           (pi * t * (1.0 - 16.0 * a * a * t * t));
  endfunction

  function automatic void rot(int r, inout int x, inout int y);
    int t;
    for (int k = 0; k < (r & 3); k++) begin t = x; x = -y; y = t; end
  endfunction

  function automatic void new_symbol();
    int a, b, dq, x, y, ex, ey, g;
    g  = 256 / lv_tx;
    a  = 2 * int'($urandom_range(0, lv_tx / 2 - 1)) + 1;
    b  = 2 * int'($urandom_range(0, lv_tx / 2 - 1)) + 1;
    dq = int'($urandom_range(0, 3));
    qtx = (qtx + dq) & 3;
    x = a; y = b; rot(qtx, x, y);
    ex = a; ey = b; rot(dq, ex, ey);
    ai[sym_n]  = real'(x * g);
    aq[sym_n]  = real'(y * g);
    di[sym_n]  = (ex + lv_tx - 1) / 2;
    dq_[sym_n] = (ey + lv_tx - 1) / 2;
    sym_n++;
  endfunction

  // complex baseband (before offset) at sample k (4 per symbol)
  function automatic void baseband(int k, output real bi, output real bq);
    int n0;
    real c30, s30;
    c30 = 0.866025; s30 = 0.5;
    bi = 0.0; bq = 0.0;
    n0 = k / 4;
    for (int n = n0 - 7; n <= n0 + 7; n++) begin
      real hv, hv1;
      int  j;
      j = k - 4 * n + 24;
      hv  = (j >= 0 && j < 49) ? h[j] : 0.0;
      j = j - 4;
      hv1 = (j >= 0 && j < 49) ? h[j] : 0.0;
      if (ai.exists(n)) begin
        bi += ai[n] * hv; bq += aq[n] * hv;
      end
      if (ai.exists(n - 1)) begin
        bi += echo * (c30 * ai[n-1] - s30 * aq[n-1]) * hv;
        bq += echo * (s30 * ai[n-1] + c30 * aq[n-1]) * hv;
      end
    end
  endfunction

  int  k_samp = 0;
  real vlp = 0.0;                    // low-pass filtered AGC OUT
  always @(posedge clk_s) if (!rst) vlp <= vlp + ((agc_out ? 1.0 : -1.0) - vlp) / 4096.0;
  always @(posedge clk_s) begin
    real bi, bq, ri, rq, v, th;
    if (!rst) begin
      while (sym_n * 4 < k_samp + 60) new_symbol();
      baseband(k_samp - DLY, bi, bq);
      car_ph += 2.0 * 3.14159265358979 * fo / 4.0;
      ri = bi * $cos(car_ph) - bq * $sin(car_ph);
      rq = bi * $sin(car_ph) + bq * $cos(car_ph);
      th = 3.14159265358979 / 2.0 * real'(k_samp % 4);
      v  = ri * $cos(th) - rq * $sin(th);
      v  = v * G0 * (1.0 + 2.0 * vlp);
      in_s <= sample_t'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
      k_samp++;
    end
  end

  // ---------------- serial bus master ----------------
  localparam int Q = 100;
  task automatic wbit(bit b);
    sda_m = b; #Q; scl = 1; #(2 * Q); scl = 0; #Q;
  endtask
  task automatic write_ctrl(logic [7:0] v);
    sda_m = 1; scl = 1; #Q; sda_m = 0; #Q; scl = 0; #Q;
    for (int k = 7; k >= 0; k--) wbit(k == 0 ? 1'b0 : 1'((7'h1C >> (k - 1)) & 7'd1));
    wbit(1'b1);
    for (int k = 7; k >= 0; k--) wbit(1'b0);
    wbit(1'b1);
    for (int k = 7; k >= 0; k--) wbit(v[k]);
    wbit(1'b1);
    sda_m = 0; #Q; scl = 1; #Q; sda_m = 1; #Q;
  endtask

  // ---------------- monitors ----------------
  int out_sym = 0;                   // symbol clocks since reset
  always @(posedge clk_sym) if (!rst) out_sym++;

  int oi [int], oq [int];
  always @(posedge clk_sym) if (!rst) begin oi[out_sym] = int'(i_out); oq[out_sym] = int'(q_out); end

  // Find the latency L with out[c] == data[c - L] over a window, then count
  // mismatches at that latency.
  task automatic check_window(string what, int c0, int c1);
    int best_l, best_err;
    best_l = -1; best_err = 1 << 30;
    for (int l = 0; l < 60; l++) begin
      int e;
      e = 0;
      for (int c = c0; c < c1; c++)
        if (!di.exists(c - l) || oi[c] != di[c - l] || oq[c] != dq_[c - l]) e++;
      if (e < best_err) begin best_err = e; best_l = l; end
    end
    checks++;
    $display("%s: latency %0d symbols, %0d of %0d symbols wrong", what, best_l, best_err, c1 - c0);
    if (best_err != 0) failures++;
  endtask

  task automatic wait_syms(int n);
    repeat (n) @(posedge clk_sym);
  endtask

  initial begin
    real e, lvl;
    int  g0;
    e = 0.0;
    for (int k = 0; k < 49; k++) begin h[k] = rrc((real'(k) - 24.0) / 4.0); e += h[k] * h[k]; end
    for (int k = 0; k < 49; k++) h[k] = h[k] / $sqrt(e);
    lv_tx = 8;
    repeat (20) @(posedge clk_s);
    rst <= 0;
    // equalizer adaptation off while the level settles, then on
    write_ctrl(8'h1E);
    wait_syms(100);
    g0 = int'(dut.agc_gain);
    wait_syms(20000);
    write_ctrl(8'h3E);
    wait_syms(10000);
    checks++;
    $display("AGC gain word %0d -> %0d, amplifier gain %f", g0, dut.agc_gain, G0 * (1.0 + 2.0 * vlp));
    if (int'(dut.agc_gain) <= g0 + 1000) failures++;
    lvl = 0.0;
    for (int n = 0; n < 2000; n++) begin
      // the on-symbol sample, the one the equalizer takes
      @(posedge clk_sym);
      lvl += real'(dut.rot_i < 0 ? -dut.rot_i : dut.rot_i) + real'(dut.rot_q < 0 ? -dut.rot_q : dut.rot_q);
    end
    lvl = lvl / 2000.0;
    checks++;
    $display("mean |I|+|Q| at the derotator output %f (target 256)", lvl);
    $display("lock %0d, APC frequency estimate %f cycles/symbol", lock, real'(dut.apc_integ) / real'(1 << 24) * 2.0);
    if (lvl < 256.0 * 0.96 || lvl > 256.0 * 1.04) failures++;
    begin
      int c;
      c = out_sym;
      wait_syms(500);
      check_window("decoded 64-QAM", c, c + 500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
