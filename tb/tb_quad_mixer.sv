// tb_quad_mixer: random IF samples through the mixer.  Each output pair must
// be within 1.5 LSB of 2*in*cos(theta) and -2*in*sin(theta), where theta is
// the local-oscillator phase at a quarter of the sample rate, sampled at the
// centre of the 1/1024-period table bin, and the output is two clocks after
// its input sample.
module tb_quad_mixer;
  import qam_pkg::*;

  logic clk = 0, rst = 1;
  sample_t in_s = '0, i_o, q_o;
  int checks = 0, failures = 0;
  sample_t hist [$];

  quad_mixer dut (.clk(clk), .rst(rst), .in_s(in_s), .i_o(i_o), .q_o(q_o));

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
    for (int m = 1; m <= 400; m++) begin
      in_s <= sample_t'($signed($urandom_range(0, 2000)) - 1000);
      @(posedge clk);
      hist.push_back(in_s);
      #1;
      if (m >= 3) begin
        real th, ei, eq;
        th = 2.0 * 3.14159265358979 * (real'(((m - 2) * 256) % 1024) + 0.5) / 1024.0;
        ei = 2.0 * real'(hist[m-2]) * real'($rtoi(2047.0 * $cos(th) + ($cos(th) >= 0 ? 0.5 : -0.5))) / 2048.0;
        eq = -2.0 * real'(hist[m-2]) * real'($rtoi(2047.0 * $sin(th) + ($sin(th) >= 0 ? 0.5 : -0.5))) / 2048.0;
        checks++;
        if ((real'(i_o) - ei > 1.5) || (ei - real'(i_o) > 1.5) ||
            (real'(q_o) - eq > 1.5) || (eq - real'(q_o) > 1.5)) begin
          failures++;
          if (failures < 10) $display("m=%0d in=%0d i=%0d/%f q=%0d/%f", m, hist[m-2], i_o, ei, q_o, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
