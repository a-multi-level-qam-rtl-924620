// qam_demod_top: 4/16/64/256-QAM demodulator with a two-loop carrier recovery
// and a dual-mode (T / T/2-spaced) decision-feedback equalizer.
//
// Signal path (clk_s domain, 4 samples/symbol in, 2 samples/symbol after the
// filters):
//   in_s -> quad_mixer (fs/4 LO) -> srrc_filter x2 (decimate to 2 sps)
//        -> phase_derotator (NCO phasor) -> dfe (symbol clock)
//        -> diff_decoder -> i_out / q_out
// Carrier recovery (symbol clock): the equalized signal feeds the
// phase_detector; loop_select routes its errors to the apc_loop_filter, whose
// output steers the NCO (inner loop, closed on chip), and/or to the
// afc_loop_filter, whose output leaves as afc_out for the external LPF and
// tuner (outer loop).  agc and clock_recovery watch the derotated signal and
// drive agc_out and clock_out.  serial_bus_if holds the control register.
//
// Clocking: clk_s is the sample clock (4x the symbol rate).  A two-bit
// counter divides it by four to the symbol clock clk_sym (= div[1]); the
// 2-samples/symbol registers update on the clk_s edges between clk_sym edges,
// so the equalizer can take one sample on the rising and the other on the
// falling clk_sym edge, as its T/2 mode requires.  The clk_sym-rising sample
// is treated as the on-symbol sample.  Reset is synchronous (rst, at least
// one clk_s cycle); the symbol-rate blocks are reset by rst_sym, a copy of
// rst stretched by eight clk_s cycles so that it spans two clk_sym edges.  The analog tuner, ADC and LPF are external.
module qam_demod_top
  import qam_pkg::*;
(
  input  logic        clk_s,
  input  logic        rst,
  input  sample_t     in_s,       // IN, from the ADC
  input  logic        scl,        // serial bus CLOCK
  input  logic        sda_i,      // serial bus DATA (pin level)
  output logic        sda_oe,     // pull DATA low
  output logic        clk_sym,    // symbol clock
  output logic [3:0]  i_out,      // I OUT (level index)
  output logic [3:0]  q_out,      // Q OUT
  output logic        afc_out,    // AFC OUT (to LPF and tuner)
  output logic        agc_out,    // AGC OUT
  output logic        clock_out,  // CLOCK OUT (sampling-clock control)
  output logic        lock        // carrier lock
);

  // ---------------- clocks and strobes ----------------
  logic [1:0] div;
  logic       stb2;    // 2 sps sample strobe (clk_s domain)
  logic       on_sym;  // at this strobe the derotator holds the on-symbol sample

  always_ff @(posedge clk_s) begin
    if (rst) div <= '0;
    else     div <= div + 2'd1;
  end
  assign clk_sym = div[1];

  // The divider stands still during reset, so clk_sym has no edges then.
  // The symbol-rate logic gets its own reset, held for eight clk_s cycles
  // (two clk_sym edges) after rst falls.
  logic [2:0] rst_cnt;
  logic       rst_sym;
  always_ff @(posedge clk_s) begin
    if (rst) begin
      rst_cnt <= '0;
      rst_sym <= 1'b1;
    end else begin
      if (rst_cnt != 3'd7) rst_cnt <= rst_cnt + 3'd1;
      rst_sym <= (rst_cnt != 3'd7);
    end
  end
  assign stb2    = ~div[0];
  // The derotator output registered at div == 0 is the sample the rising
  // clk_sym edge (div 1 -> 2) takes; the AGC and the timing detector read it
  // at the next strobe, div == 2.
  assign on_sym  = (div == 2'd2);

  // ---------------- control register ----------------
  logic [7:0] ctrl, status;
  qam_mode_e  qam_mode;
  logic       t_spaced, adapt;
  logic [1:0] loop_sel;
  logic       apc_en, afc_en;

  serial_bus_if u_sbus (
    .clk    (clk_s),
    .rst    (rst),
    .scl    (scl),
    .sda_i  (sda_i),
    .sda_oe (sda_oe),
    .ctrl   (ctrl),
    .status (status)
  );
  assign qam_mode = qam_mode_e'(ctrl[1:0]);
  assign t_spaced = ctrl[2];
  assign loop_sel = ctrl[4:3];
  assign adapt    = ctrl[5];
  assign status   = {5'd0, afc_en, apc_en, lock};

  // ---------------- front end ----------------
  sample_t mix_i, mix_q, flt_i, flt_q, rot_i, rot_q;
  logic signed [TRIG_W-1:0] nco_cos, nco_sin;
  logic [NCO_PHASE_W-1:0]   nco_freq, nco_phase;

  quad_mixer u_mix (.clk(clk_s), .rst(rst), .in_s(in_s), .i_o(mix_i), .q_o(mix_q));

  srrc_filter u_srrc_i (.clk(clk_s), .rst(rst), .x(mix_i), .ostb(stb2), .y(flt_i));
  srrc_filter u_srrc_q (.clk(clk_s), .rst(rst), .x(mix_q), .ostb(stb2), .y(flt_q));

  nco u_nco (
    .clk     (clk_s),
    .rst     (rst),
    .en      (stb2),
    .freq    (nco_freq),
    .cos_o   (nco_cos),
    .sin_o   (nco_sin),
    .phase_o (nco_phase)
  );

  phase_derotator u_rot (
    .clk   (clk_s),
    .rst   (rst),
    .en    (stb2),
    .xi    (flt_i),
    .xq    (flt_q),
    .cos_i (nco_cos),
    .sin_i (nco_sin),
    .yi    (rot_i),
    .yq    (rot_q)
  );

  logic signed [15:0]    agc_gain, clk_ctrl;
  logic signed [2*W+1:0] ted;

  agc u_agc (
    .clk     (clk_s),
    .rst     (rst),
    .en      (stb2 & on_sym),
    .xi      (rot_i),
    .xq      (rot_q),
    .gain    (agc_gain),
    .agc_out (agc_out)
  );

  clock_recovery u_clkrec (
    .clk     (clk_s),
    .rst     (rst),
    .en      (stb2),
    .sym     (on_sym),
    .xi      (rot_i),
    .xq      (rot_q),
    .ted     (ted),
    .ctrl    (clk_ctrl),
    .clk_out (clock_out)
  );

  // ---------------- symbol-rate back end ----------------
  cplx_t      eq_x, eq_y, eq_d;
  logic [3:0] ki, kq;
  logic       sym_v;

  assign eq_x = '{i: rot_i, q: rot_q};

  always_ff @(posedge clk_sym) begin
    if (rst_sym) sym_v <= 1'b0;
    else     sym_v <= 1'b1;
  end

  dfe u_dfe (
    .clk      (clk_sym),
    .rst      (rst_sym),
    .qam_mode (qam_mode),
    .t_spaced (t_spaced),
    .adapt    (adapt),
    .x        (eq_x),
    .y_o      (eq_y),
    .d_o      (eq_d),
    .ki_o     (ki),
    .kq_o     (kq)
  );

  logic signed [4:0]  pd_e;
  logic               pd_v;
  logic [MAX_PTS-1:0] pd_cand;
  logic [15:0]        pd_hit;

  phase_detector u_pd (
    .clk        (clk_sym),
    .rst        (rst_sym),
    .qam_mode   (qam_mode),
    .vin        (sym_v),
    .xi         (eq_y.i),
    .xq         (eq_y.q),
    .eout       (pd_e),
    .evalid     (pd_v),
    .cand_valid (pd_cand),
    .hit_o      (pd_hit)
  );

  loop_select u_lsel (
    .clk    (clk_sym),
    .rst    (rst_sym),
    .sel    (loop_sel),
    .evalid (pd_v),
    .eout   (pd_e),
    .apc_en (apc_en),
    .afc_en (afc_en),
    .lock   (lock)
  );

  logic signed [NCO_PHASE_W-1:0] apc_integ;
  logic signed [15:0]            afc_word;

  apc_loop_filter u_apc (
    .clk    (clk_sym),
    .rst    (rst_sym),
    .en     (apc_en),
    .evalid (pd_v),
    .eout   (pd_e),
    .freq   (nco_freq),
    .integ  (apc_integ)
  );

  afc_loop_filter u_afc (
    .clk      (clk_sym),
    .rst      (rst_sym),
    .en       (afc_en),
    .evalid   (pd_v),
    .eout     (pd_e),
    .afc_word (afc_word),
    .afc_out  (afc_out)
  );

  logic [1:0] dquad;
  logic       dvalid;

  diff_decoder u_diff (
    .clk      (clk_sym),
    .rst      (rst_sym),
    .qam_mode (qam_mode),
    .vin      (sym_v),
    .ki       (ki),
    .kq       (kq),
    .i_out    (i_out),
    .q_out    (q_out),
    .quad_out (dquad),
    .vout     (dvalid)
  );

  // Internal observation points (loop states) kept for probing.
  logic unused_ok;
  assign unused_ok = ^{nco_phase, agc_gain, clk_ctrl, ted, eq_d, pd_cand,
                       pd_hit, apc_integ, afc_word, dquad, dvalid};

endmodule
