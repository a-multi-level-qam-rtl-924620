// tb_loop_select: fixed modes must give the listed enables; in automatic mode
// both loops run until LOCK_N (here 8) consecutive detected errors within
// +/-LOCK_TH, after which lock rises and the AFC loop is held; LOCK_N
// consecutive large errors drop lock again.  Errors without evalid and single
// interruptions must restart the count.
module tb_loop_select;
  logic clk = 0, rst = 1, ev = 0, apc, afc, lock;
  logic [1:0] sel = 2'd3;
  logic signed [4:0] e = '0;
  int checks = 0, failures = 0;

  loop_select #(.LOCK_N(8), .LOCK_TH(3)) dut (.clk(clk), .rst(rst), .sel(sel), .evalid(ev), .eout(e),
                                              .apc_en(apc), .afc_en(afc), .lock(lock));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit a, bit f, bit l, string what);
    checks++;
    if (apc != a || afc != f || lock != l) begin
      failures++;
      $display("%s: apc=%0d afc=%0d lock=%0d expected %0d %0d %0d", what, apc, afc, lock, a, f, l);
    end
  endtask

  task automatic feed(int n, int val);
    for (int k = 0; k < n; k++) begin
      ev <= 1; e <= 5'(val);
      @(posedge clk);
      ev <= 0;
      @(posedge clk);
    end
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    sel = 0; #1 chk(1, 0, 0, "sel0");
    sel = 1; #1 chk(0, 1, 0, "sel1");
    sel = 2; #1 chk(1, 1, 0, "sel2");
    sel = 3; #1 chk(1, 1, 0, "auto unlocked");
    feed(7, 3);  chk(1, 1, 0, "7 small errors");
    feed(1, 5);  chk(1, 1, 0, "interrupted");
    feed(7, -1); chk(1, 1, 0, "7 more small");
    feed(1, -3); chk(1, 0, 1, "8 small: lock");
    sel = 2; #1 chk(1, 1, 1, "sel2 while locked");
    sel = 3; #1;
    feed(7, 9);  chk(1, 0, 1, "7 large");
    feed(1, -9); chk(1, 1, 0, "8 large: unlock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
