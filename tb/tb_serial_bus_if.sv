// tb_serial_bus_if: a two-wire bus master (open-drain DATA, pulled up when no
// side drives it) writes the control register, reads it back, reads the
// status register in the same transfer (auto-increment), and addresses a
// wrong device, which must not acknowledge.  Checks: ACK bits, the ctrl
// output after the write, the read data, the reset value, and that STOP
// returns the interface to idle.
module tb_serial_bus_if;
  logic clk = 0, rst = 1;
  logic scl = 1, sda_m = 1, sda_oe;
  wire  sda = sda_m & ~sda_oe;
  logic [7:0] ctrl, status = 8'hA5;
  int checks = 0, failures = 0;

  serial_bus_if #(.DEV_ADDR(7'h1C)) dut (.clk(clk), .rst(rst), .scl(scl), .sda_i(sda),
                                         .sda_oe(sda_oe), .ctrl(ctrl), .status(status));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int Q = 100;   // quarter bit period

  task automatic start();
    sda_m = 1; scl = 1; #Q;
    sda_m = 0; #Q;
    scl = 0; #Q;
  endtask

  task automatic stop();
    sda_m = 0; #Q;
    scl = 1; #Q;
    sda_m = 1; #Q;
  endtask

  task automatic wbit(bit b);
    sda_m = b; #Q;
    scl = 1; #(2 * Q);
    scl = 0; #Q;
  endtask

  task automatic rbit(output bit b);
    sda_m = 1; #Q;
    scl = 1; #Q;
    b = sda; #Q;
    scl = 0; #Q;
  endtask

  task automatic wbyte(logic [7:0] v, output bit ack);
    bit a;
    for (int k = 7; k >= 0; k--) wbit(v[k]);
    rbit(a);
    ack = ~a;
  endtask

  task automatic rbyte(output logic [7:0] v, input bit ack);
    bit b;
    for (int k = 7; k >= 0; k--) begin rbit(b); v[k] = b; end
    wbit(~ack);
  endtask

  task automatic expect_bit(bit got, bit want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d expected %0d", what, got, want); end
  endtask

  task automatic expect_byte(logic [7:0] got, logic [7:0] want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %h expected %h", what, got, want); end
  endtask

  initial begin
    bit ack;
    logic [7:0] v;
    repeat (3) @(posedge clk);
    rst <= 0;
    #200;
    expect_byte(ctrl, 8'h3E, "reset value");
    // write ctrl = 0x2B
    start();
    wbyte({7'h1C, 1'b0}, ack); expect_bit(ack, 1, "address ack (write)");
    wbyte(8'h00, ack);         expect_bit(ack, 1, "pointer ack");
    wbyte(8'h2B, ack);         expect_bit(ack, 1, "data ack");
    stop();
    expect_byte(ctrl, 8'h2B, "ctrl after write");
    // set pointer to 0, then read two bytes
    start();
    wbyte({7'h1C, 1'b0}, ack); expect_bit(ack, 1, "address ack (pointer)");
    wbyte(8'h00, ack);         expect_bit(ack, 1, "pointer ack 2");
    stop();
    start();
    wbyte({7'h1C, 1'b1}, ack); expect_bit(ack, 1, "address ack (read)");
    rbyte(v, 1);               expect_byte(v, 8'h2B, "read ctrl");
    rbyte(v, 0);               expect_byte(v, 8'hA5, "read status");
    stop();
    // other device: no ack, no change
    start();
    wbyte({7'h1D, 1'b0}, ack); expect_bit(ack, 0, "foreign address not acked");
    wbyte(8'h00, ack);
    wbyte(8'hFF, ack);
    stop();
    expect_byte(ctrl, 8'h2B, "ctrl unchanged by foreign write");
    // second write with auto-increment onto the read-only register
    start();
    wbyte({7'h1C, 1'b0}, ack);
    wbyte(8'h00, ack);
    wbyte(8'h11, ack);         expect_bit(ack, 1, "data ack 2");
    wbyte(8'h77, ack);         expect_bit(ack, 1, "data ack to status");
    stop();
    expect_byte(ctrl, 8'h11, "ctrl after second write");
    expect_bit(dut.st == dut.S_IDLE, 1, "idle after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
