// tb_apc_loop_filter: random phase errors with random valid/enable.  A model
// kept here (integrator += e*2^KI, output = integrator + e*2^KP on an applied
// error, else the integrator) must match freq and integ after every clock.
// A constant error must make the frequency ramp at e*2^KI per detection.
module tb_apc_loop_filter;
  logic clk = 0, rst = 1, en = 0, ev = 0;
  logic signed [4:0] e = '0;
  logic [23:0] freq;
  logic signed [23:0] integ;
  int checks = 0, failures = 0;
  longint m_int = 0, m_freq = 0;

  apc_loop_filter #(.KP_SHIFT(11), .KI_SHIFT(5)) dut (.clk(clk), .rst(rst), .en(en), .evalid(ev),
                                                      .eout(e), .freq(freq), .integ(integ));

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
    for (int n = 0; n < 600; n++) begin
      en <= ($urandom_range(0, 9) != 0);
      ev <= ($urandom_range(0, 2) != 0);
      e  <= (n >= 400) ? 5'sd3 : 5'(2 * int'($urandom_range(0, 15)) - 15);
      @(posedge clk);
      if (en && ev) begin
        m_int  = m_int + longint'(e) * 32;
        m_freq = m_int + longint'(e) * 2048;
      end else m_freq = m_int;
      #1;
      checks++;
      if (longint'(integ) != m_int || freq != 24'(m_freq)) begin
        failures++;
        if (failures < 10) $display("n=%0d integ=%0d/%0d freq=%0d/%0d", n, integ, m_int, freq, 24'(m_freq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
