// tb_agc: the gain word must follow a model acc += 256 - |xi| - |xq| on
// enabled samples (acc[21:6] = gain), rise for a weak signal, fall for a
// strong one, and stay constant for a signal whose mean |I|+|Q| is 256
// (random 64-QAM points).  AGC OUT must carry the word as a pulse density.
module tb_agc;
  import qam_pkg::*;
  logic clk = 0, rst = 1, en = 0, o;
  sample_t xi = '0, xq = '0;
  logic signed [15:0] g;
  int checks = 0, failures = 0;
  longint m_acc = 0;

  agc dut (.clk(clk), .rst(rst), .en(en), .xi(xi), .xq(xq), .gain(g), .agc_out(o));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int n, real scale, bit qam);
    for (int k = 0; k < n; k++) begin
      int a, b;
      if (qam) begin
        a = (2 * int'($urandom_range(0, 7)) - 7) * 32;
        b = (2 * int'($urandom_range(0, 7)) - 7) * 32;
      end else begin
        a = int'($urandom_range(0, 256)) - 128;
        b = int'($urandom_range(0, 256)) - 128;
      end
      xi <= sample_t'($rtoi(real'(a) * scale));
      xq <= sample_t'($rtoi(real'(b) * scale));
      en <= (k % 3 != 2);
      @(posedge clk);
      if (en) m_acc += 256 - (xi < 0 ? -xi : xi) - (xq < 0 ? -xq : xq);
      #1;
      checks++;
      if (g != 16'(m_acc >>> 6)) begin
        failures++;
        if (failures < 10) $display("gain %0d model %0d", g, m_acc >>> 6);
      end
    end
  endtask

  initial begin
    logic signed [15:0] g0;
    int ones;
    repeat (3) @(posedge clk);
    rst <= 0;
    drive(2000, 0.5, 0);           // weak: gain must rise
    checks++; if (g <= 0) begin failures++; $display("gain did not rise"); end
    g0 = g;
    drive(2000, 4.0, 0);           // strong: gain must fall
    checks++; if (g >= g0) begin failures++; $display("gain did not fall"); end
    g0 = g;
    drive(30000, 1.0, 1);          // nominal 64-QAM: gain steady
    checks++; if ((g - g0 > 800) || (g0 - g > 800)) begin failures++; $display("gain drifted %0d -> %0d", g0, g); end
    en <= 0;
    @(posedge clk);
    ones = 0;
    for (int k = 0; k < 4096; k++) begin @(posedge clk); #1 ones += int'(o); end
    checks++;
    if (ones - (int'(g) + 32768) * 4096 / 65536 > 2 || (int'(g) + 32768) * 4096 / 65536 - ones > 2) begin
      failures++; $display("density %0d for word %0d", ones, g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
