// tb_inenc: self-checking test of the quadrature encoder input.
// Drives the A/B pins through random forward and backward steps and checks
// that VAL counts them, that it moves exactly three clocks after the pin
// edge, that SETP loads the position, that an illegal step (both lines
// changing) is counted as an error without moving VAL, and that Z and CONN
// pass to the bit outputs.
module tb_inenc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_pin, b_pin, z_pin, conn_pin, setp_wr, a, b, z, conn;
  logic [31:0] setp, val, errors;
  int checks = 0, failures = 0;
  int expected = 0, phase = 0;
  // quadrature sequence for counting up: (A,B) = 00, 10, 11, 01
  logic [1:0] gray [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  inenc dut (.clk, .rst_n, .a_pin, .b_pin, .z_pin, .conn_pin, .setp_wr, .setp,
             .a, .b, .z, .conn, .val, .errors);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic step(input int dir);
    int old;
    old = expected;
    phase = (phase + dir + 4) % 4;
    expected += dir;
    @(negedge clk);
    {a_pin, b_pin} = gray[phase];
    repeat (2) @(posedge clk);
    #1 chk(val == 32'(old), "VAL moved before three clocks");
    @(posedge clk);
    #1 chk(val == 32'(expected), $sformatf("val=%0d exp=%0d", $signed(val), expected));
  endtask

  initial begin
    a_pin = 0; b_pin = 0; z_pin = 0; conn_pin = 1; setp_wr = 0; setp = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 200; n++) step(1);
    for (int n = 0; n < 300; n++) step(-1);          // through zero into negative
    for (int n = 0; n < 300; n++) step(($urandom % 2) ? 1 : -1);
    // SETP
    @(negedge clk); setp = 32'd1000; setp_wr = 1;
    @(negedge clk); setp_wr = 0;
    expected = 1000;
    chk(val == 32'd1000, "SETP");
    for (int n = 0; n < 10; n++) step(1);
    // illegal step: both lines change
    @(negedge clk);
    phase = (phase + 2) % 4;
    {a_pin, b_pin} = gray[phase];
    repeat (5) @(negedge clk);
    chk(errors == 32'd1 && val == 32'(expected), $sformatf("errors=%0d val=%0d", errors, val));
    // Z and CONN pass through
    z_pin = 1; conn_pin = 0;
    repeat (3) @(negedge clk);
    chk(z == 1'b1 && conn == 1'b0, "z/conn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
