// tb_bit_mux: self-checking test of the bit-bus multiplexer.
// Drives random bus values and selects; checks that the output one clock
// later equals the selected line, including the fixed ZERO/ONE lines.
module tb_bit_mux;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bit_bus_t bus;
  logic [BIT_SEL_W-1:0] sel;
  logic q, exp_q;
  int checks = 0, failures = 0;

  bit_mux dut (.clk, .rst_n, .bit_bus(bus), .sel, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; sel = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      bus = {$urandom, $urandom, $urandom, $urandom};
      bus[0] = 1'b0; bus[1] = 1'b1;
      sel = (n < 128) ? BIT_SEL_W'(n) : BIT_SEL_W'($urandom);
      exp_q = bus[sel];
      @(negedge clk);
      bus = ~bus;   // changes after the sampling edge must not matter
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL sel=%0d q=%b exp=%b", sel, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
