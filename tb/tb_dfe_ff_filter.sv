// tb_dfe_ff_filter: exact integer check of the dual-mode feedforward filter.
// Random complex coefficients are held while random complex data is applied.
//   T-spaced (t_spaced=1): IN changes once per clock, and after rising edge m
//     y(m) = sum_k c_odd[k] x(m-1-k) + sum_k c_even[k] x(m-5-k)
//     (one contiguous 8-tap line, x(j) = IN sampled at rising edge j).
//   T/2-spaced (t_spaced=0): IN changes after every clock edge; xp(j) is the
//     value sampled at rising edge j, xn(j) at the falling edge after it, and
//     y(m) = sum_k c_odd[k] xn(m-2-k) + sum_k c_even[k] xp(m-2-k).
// The regressor outputs must hold the tap values that produced y.
module tb_dfe_ff_filter;
  import qam_pkg::*;

  logic   clk = 0, rst = 1, ts = 1;
  cplx_t  x = '0;
  ccoef_t co [4], ce [4];
  cacc_t  y;
  cplx_t  ro [4], re [4];
  int checks = 0, failures = 0;
  cplx_t  xp [int], xn [int];

  dfe_ff_filter dut (.clk(clk), .rst(rst), .t_spaced(ts), .x(x), .c_odd(co), .c_even(ce),
                     .y(y), .reg_odd(ro), .reg_even(re));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd_x();
    cplx_t v;
    v.i = sample_t'($signed($urandom_range(0, 1000)) - 500);
    v.q = sample_t'($signed($urandom_range(0, 1000)) - 500);
    return v;
  endfunction

  function automatic void acc(inout longint ai, inout longint aq, ccoef_t c, cplx_t v);
    ai += longint'(c.i) * longint'(v.i) - longint'(c.q) * longint'(v.q);
    aq += longint'(c.i) * longint'(v.q) + longint'(c.q) * longint'(v.i);
  endfunction

  task automatic run(bit mode, int n);
    ts = mode;
    rst = 1;
    xp.delete(); xn.delete();
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < n; m++) begin
      longint ei, eq;
      bit     ok;
      x <= rnd_x();
      @(posedge clk);
      xp[m] = x;
      #1;
      if (m >= 10) begin
        ei = 0; eq = 0;
        ok = 1;
        for (int k = 0; k < 4; k++) begin
          if (mode) begin
            acc(ei, eq, co[k], xp[m-1-k]);
            acc(ei, eq, ce[k], xp[m-5-k]);
            if (ro[k] != xp[m-1-k] || re[k] != xp[m-5-k]) ok = 0;
          end else begin
            acc(ei, eq, co[k], xn[m-2-k]);
            acc(ei, eq, ce[k], xp[m-2-k]);
            if (ro[k] != xn[m-2-k] || re[k] != xp[m-2-k]) ok = 0;
          end
        end
        checks++;
        if (longint'(y.i) != ei || longint'(y.q) != eq || !ok) begin
          failures++;
          if (failures < 4) $display("mode=%0d m=%0d ref=%0d,%0d regs_ok=%0d ro0=%0d xn=%0d %0d %0d re0=%0d xp=%0d %0d %0d", mode, m, ei, eq, ok, ro[0].i, xn[m-1].i, xn[m-2].i, xn[m-3].i, re[0].i, xp[m].i, xp[m-1].i, xp[m-2].i);
        end
      end
      if (!mode) begin
        x <= rnd_x();
        @(negedge clk);
        xn[m] = x;
      end
    end
  endtask

  initial begin
    foreach (co[k]) begin
      co[k].i = coef_t'($signed($urandom_range(0, 40000)) - 20000);
      co[k].q = coef_t'($signed($urandom_range(0, 40000)) - 20000);
      ce[k].i = coef_t'($signed($urandom_range(0, 40000)) - 20000);
      ce[k].q = coef_t'($signed($urandom_range(0, 40000)) - 20000);
    end
    run(1'b1, 200);
    run(1'b0, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
