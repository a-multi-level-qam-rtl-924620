// tb_diff_decoder: data symbols (a quadrant step dq and a point in the first
// quadrant) are differentially encoded here: the transmitted quadrant is the
// running sum of dq, and the channel then rotates the whole stream by a fixed
// unknown multiple of 90 degrees.  For every QAM order and every channel
// rotation the decoder must return, one clock later, the first-quadrant point
// rotated by dq (its quadrant output must equal dq), from the second symbol on.
module tb_diff_decoder;
  import qam_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout;
  qam_mode_e mode = QAM4;
  logic [3:0] ki = '0, kq = '0, io, qo;
  logic [1:0] quad;
  int checks = 0, failures = 0;

  diff_decoder dut (.clk(clk), .rst(rst), .qam_mode(mode), .vin(vin), .ki(ki), .kq(kq),
                    .i_out(io), .q_out(qo), .quad_out(quad), .vout(vout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rotate odd-integer point by r * 90 degrees
  function automatic void rot(int r, inout int x, inout int y);
    int t;
    for (int k = 0; k < (r & 3); k++) begin t = x; x = -y; y = t; end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < 4; m++) begin
      int lv;
      lv = 2 << m;
      mode = qam_mode_e'(m);
      for (int chan = 0; chan < 4; chan++) begin
        int qtx;
        qtx = 0;
        for (int n = 0; n < 200; n++) begin
          int a, b, dq, tx, ty, ex, ey;
          a  = 2 * int'($urandom_range(0, lv / 2 - 1)) + 1;
          b  = 2 * int'($urandom_range(0, lv / 2 - 1)) + 1;
          dq = int'($urandom_range(0, 3));
          qtx = (qtx + dq) & 3;
          tx = a; ty = b; rot(qtx + chan, tx, ty);
          ex = a; ey = b; rot(dq, ex, ey);
          ki <= 4'((tx + lv - 1) / 2);
          kq <= 4'((ty + lv - 1) / 2);
          vin <= (n % 7 != 6);
          @(posedge clk);
          if (!vin) qtx = (qtx - dq) & 3;   // symbol not taken
          #1;
          if (vin && n > 0) begin
            checks++;
            if (!vout || io != 4'((ex + lv - 1) / 2) || qo != 4'((ey + lv - 1) / 2) || quad != 2'(dq)) begin
              failures++;
              if (failures < 10) $display("mode %0d chan %0d n %0d out %0d,%0d q%0d expected %0d,%0d q%0d", m, chan, n, io, qo, quad, (ex + lv - 1) / 2, (ey + lv - 1) / 2, dq);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
