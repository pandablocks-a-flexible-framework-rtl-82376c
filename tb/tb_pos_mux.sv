// tb_pos_mux: self-checking test of the position-bus multiplexer.
// Drives random 32x32-bit bus contents and selects; checks the registered
// output one clock later.
module tb_pos_mux;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pos_bus_t bus;
  logic [POS_SEL_W-1:0] sel;
  logic [31:0] q, exp_q;
  int checks = 0, failures = 0;

  pos_mux dut (.clk, .rst_n, .pos_bus(bus), .sel, .q);

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
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int k = 0; k < 32; k++) bus[k] = (k == 0) ? 32'd0 : $urandom;
      sel = (n < 32) ? POS_SEL_W'(n) : POS_SEL_W'($urandom);
      exp_q = bus[sel];
      @(negedge clk);
      for (int k = 0; k < 32; k++) bus[k] = $urandom;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL sel=%0d q=%h exp=%h", sel, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
