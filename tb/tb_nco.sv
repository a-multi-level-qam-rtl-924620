// tb_nco: checks the NCO against cosine/sine computed in real arithmetic.
// After every enabled clock, cos_o/sin_o must equal 2047*cos/sin of the
// phase before that clock, taken at the centre of its 1/1024-period table bin
// (+/-1 LSB for rounding).  Several frequency words, including negative
// ones, sweep all four quadrants; a disabled cycle must hold the phase.
module tb_nco;
  import qam_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [23:0] freq = '0;
  logic signed [11:0] c, s;
  logic [23:0] ph;
  int checks = 0, failures = 0;

  nco dut (.clk(clk), .rst(rst), .en(en), .freq(freq), .cos_o(c), .sin_o(s), .phase_o(ph));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_trig(logic [23:0] p, bit is_cos);
    real a;
    a = 2.0 * 3.14159265358979 * (real'(p >> 14) + 0.5) / 1024.0;
    return $rtoi((is_cos ? $cos(a) : $sin(a)) * 2047.0 + (((is_cos ? $cos(a) : $sin(a)) >= 0) ? 0.5 : -0.5));
  endfunction

  initial begin
    logic [23:0] freqs [4];
    logic [23:0] held;
    freqs = '{24'h012345, 24'h0FFFFF, 24'hFEDCBA, 24'h400000};
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (freqs[f]) begin
      freq <= freqs[f];
      en   <= 1;
      @(posedge clk);
      for (int n = 0; n < 300; n++) begin
        @(posedge clk);
        #1;
        begin
          int ec, es;
          ec = expect_trig(ph - freq, 1'b1);
          es = expect_trig(ph - freq, 1'b0);
          checks++;
          if ((int'(c) - ec > 1) || (ec - int'(c) > 1) || (int'(s) - es > 1) || (es - int'(s) > 1)) begin
            failures++;
            if (failures < 10) $display("mismatch phase=%h cos=%0d/%0d sin=%0d/%0d", ph - freq, c, ec, s, es);
          end
        end
      end
    end
    // hold when disabled
    en <= 0;
    @(posedge clk); #1 held = ph;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (ph != held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
