// tb_afc_loop_filter: the AFC integrator must follow a model of
// acc += e (on enabled, valid errors; saturating), afc_word = acc[19:4], and
// the AFC OUT bit stream must carry the word as a pulse density: over 4096
// clocks with a held word w the number of ones is (w + 32768) * 4096 / 65536
// within +/-2.  The stream is checked for a positive and a negative word.
module tb_afc_loop_filter;
  logic clk = 0, rst = 1, en = 0, ev = 0;
  logic signed [4:0] e = '0;
  logic signed [15:0] w;
  logic o;
  int checks = 0, failures = 0;
  longint m_acc = 0;

  afc_loop_filter dut (.clk(clk), .rst(rst), .en(en), .evalid(ev), .eout(e), .afc_word(w), .afc_out(o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic density();
    int ones;
    longint exp_ones;
    en <= 0;
    @(posedge clk);
    ones = 0;
    for (int k = 0; k < 4096; k++) begin
      @(posedge clk);
      #1 ones += int'(o);
    end
    exp_ones = (longint'(w) + 32768) * 4096 / 65536;
    checks++;
    if (longint'(ones) - exp_ones > 2 || exp_ones - longint'(ones) > 2) begin
      failures++;
      $display("density: word %0d ones %0d expected %0d", w, ones, exp_ones);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // drive the integrator up
    for (int n = 0; n < 30000; n++) begin
      en <= ($urandom_range(0, 9) != 0);
      ev <= ($urandom_range(0, 1) != 0);
      e  <= (n < 20000) ? 5'(2 * int'($urandom_range(0, 15)) - 13) : 5'(2 * int'($urandom_range(0, 15)) - 17);
      @(posedge clk);
      if (en && ev) begin
        m_acc = m_acc + longint'(e);
        if (m_acc > 524287) m_acc = 524287;
        if (m_acc < -524287) m_acc = -524287;
      end
      #1;
      if (n % 10 == 0) begin
        checks++;
        if (w != 16'(m_acc >>> 4)) begin
          failures++;
          if (failures < 10) $display("n=%0d word=%0d model=%0d", n, w, m_acc >>> 4);
        end
      end
      if (n == 19999) density();
    end
    density();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
