// tb_qam_demod_top: end-to-end test of the demodulator at its default
// parameters.
//
// Transmitter model (here, in real arithmetic): data symbols (quadrant step
// plus first-quadrant point) are differentially encoded, mapped to the
// constellation grid, shaped by a root-raised-cosine pulse (roll-off 0.15,
// 4 samples/symbol), passed through a two-ray channel (echo 0.05 of the main
// ray, one symbol later, 30 degrees rotated), shifted by a carrier-frequency
// offset and placed on an IF of a quarter of the sample rate.  The ADC sample
// is rounded to 12 bits.
//
// Sequence, with settings written over the serial bus:
//   1. acquisition at 4-QAM, T-spaced, automatic loop select, offset FOFF1,
//      equalizer adaptation off for 2000 symbols while the carrier loop
//      pulls in, then on; then 16-QAM: the carrier loop must lock and, in a
//      later window, every decoded symbol must match the data at one fixed
//      latency;
//   2. switch to T/2-spaced (equalizer restarts) and check again;
//   3. back to T-spaced at 16-QAM, then switch to 64-QAM (the transmitter
//      too) and check again;
//   4. switch to 256-QAM (equalizer keeps its taps) and check again;
//   5. switch to 4-QAM and T/2-spaced and check again.
// Mechanisms counted (each must occur): phase-detector detections, lock,
// AFC word moving in the direction of the offset, AFC hold after lock, APC
// integrator settling near the offset, equalizer mode switch, QAM mode
// switch, AGC and timing-detector activity.
module tb_qam_demod_top;
  import qam_pkg::*;

  localparam real FOFF1 = 0.002;     // carrier offset, cycles per symbol
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
    #40000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- transmitter ----------------
  real h [49];
  int  lv_tx = 2;                    // levels per axis
  real fo = FOFF1;
  real car_ph = 0.0;
  int  sym_n = 0;                    // symbols generated
  real ai [int], aq [int];           // channel input symbols (transmitted points)
  int  di [int], dq_ [int];          // data: expected decoder output indices
  int  qtx = 0;

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
        bi += 0.05 * (c30 * ai[n-1] - s30 * aq[n-1]) * hv;
        bq += 0.05 * (s30 * ai[n-1] + c30 * aq[n-1]) * hv;
      end
    end
  endfunction

  int k_samp = 0;
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
  int n_detect = 0, n_lock_rise = 0, n_afc_hold = 0, n_ted_nz = 0, n_agc_move = 0;
  int n_mode_sw = 0, n_qam_sw = 0;
  int out_sym = 0;                   // decoder outputs seen
  logic lock_q = 0;
  always @(posedge clk_sym) begin
    if (!rst) begin
      out_sym++;
      if (dut.pd_v) n_detect++;
      if (lock && !lock_q) n_lock_rise++;
      lock_q <= lock;
      if (dut.apc_en && !dut.afc_en && dut.loop_sel == 2'd3) n_afc_hold++;
      if (dut.ted != 0) n_ted_nz++;
      if (dut.agc_gain != 0) n_agc_move++;
    end
  end

  // decoder output history indexed by clk_sym count
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
    real e;
    e = 0.0;
    for (int k = 0; k < 49; k++) begin h[k] = rrc((real'(k) - 24.0) / 4.0); e += h[k] * h[k]; end
    for (int k = 0; k < 49; k++) h[k] = h[k] / $sqrt(e);
    repeat (20) @(posedge clk_s);
    rst <= 0;
    // 1: 16-QAM, T-spaced, auto loop select, adaptation on
    // acquisition at 4-QAM: equalizer adaptation off while the carrier loop
    // pulls in, then on; then 16-QAM with the converged taps
    write_ctrl(8'h1C);
    wait_syms(2000);
    write_ctrl(8'h3C);
    wait_syms(3000);
    lv_tx = 4;
    write_ctrl(8'h3D);
    n_qam_sw++;
    wait_syms(6000);
    checks++;
    if (!lock) begin failures++; $display("no lock in 16-QAM T mode"); end
    begin
      int c;
      c = out_sym;
      wait_syms(1000);
      check_window("16-QAM T-spaced", c, c + 1000);
    end
    // APC integrator: frequency word per 2 samples/symbol sample
    begin
      real f_est;
      f_est = real'(dut.apc_integ) / real'(1 << 24) * 2.0;
      checks++;
      $display("APC frequency estimate %f cycles/symbol (offset %f)", f_est, fo);
      if (f_est - fo > 0.0005 || fo - f_est > 0.0005) failures++;
      // the AFC word integrated the early (pre-lock) errors: for a positive
      // offset it must have moved up, towards retuning the tuner down
      checks++;
      $display("AFC word %0d", dut.afc_word);
      if (dut.afc_word <= 0) failures++;
    end
    // 2: T/2-spaced
    write_ctrl(8'h39);
    n_mode_sw++;
    wait_syms(6000);
    begin
      int c;
      c = out_sym;
      wait_syms(1000);
      check_window("16-QAM T/2-spaced", c, c + 1000);
    end
    // 3: back to T-spaced at 16-QAM (the equalizer restarts; a unit tap
    // opens the 16-QAM eye more surely than the 64-QAM one), then 64-QAM
    // with the converged taps (transmitter switches too)
    write_ctrl(8'h3D);
    n_mode_sw++;
    wait_syms(4000);
    lv_tx = 8;
    write_ctrl(8'h3E);
    n_qam_sw++;
    wait_syms(6000);
    begin
      int c;
      c = out_sym;
      wait_syms(1000);
      check_window("64-QAM T-spaced", c, c + 1000);
    end
    // 4: 256-QAM, T-spaced
    lv_tx = 16;
    write_ctrl(8'h3F);     // equalizer keeps its taps
    n_qam_sw++;
    wait_syms(10000);
    begin
      int c;
      c = out_sym;
      wait_syms(1000);
      check_window("256-QAM T-spaced", c, c + 1000);
    end
    // 5: 4-QAM, T/2-spaced (equalizer restarts)
    lv_tx = 2;
    write_ctrl(8'h38);
    n_qam_sw++;
    n_mode_sw++;
    wait_syms(6000);
    begin
      int c;
      c = out_sym;
      wait_syms(1000);
      check_window("4-QAM T/2-spaced", c, c + 1000);
    end
    $display("mechanisms: detections=%0d lock_rises=%0d afc_hold_symbols=%0d eq_mode_switches=%0d qam_switches=%0d ted_active=%0d agc_active=%0d",
             n_detect, n_lock_rise, n_afc_hold, n_mode_sw, n_qam_sw, n_ted_nz, n_agc_move);
    checks++; if (n_detect == 0)    begin failures++; $display("no phase detection"); end
    checks++; if (n_lock_rise == 0) begin failures++; $display("never locked"); end
    checks++; if (n_afc_hold == 0)  begin failures++; $display("AFC never held"); end
    checks++; if (n_ted_nz == 0)    begin failures++; $display("timing detector idle"); end
    checks++; if (n_agc_move == 0)  begin failures++; $display("AGC idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
