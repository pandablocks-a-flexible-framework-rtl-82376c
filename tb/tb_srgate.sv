// tb_srgate: self-checking test of the set/reset gate.
// Drives random SET/RST waveforms and compares with a cycle model: rising SET
// sets, rising RST clears, reset wins on a tie, levels alone do nothing.
module tb_srgate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic set, rst, out;
  logic m_out, set_p, rst_p;
  int checks = 0, failures = 0, sets = 0, ties = 0;

  srgate dut (.clk, .rst_n, .set, .rst, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; rst = 0; m_out = 0; set_p = 0; rst_p = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      set = ($urandom % 4) == 0;
      rst = ($urandom % 5) == 0;
      if (rst && !rst_p) begin m_out = 0; if (set && !set_p) ties++; end
      else if (set && !set_p) begin m_out = 1; sets++; end
      set_p = set; rst_p = rst;
      @(posedge clk); #1;
      checks++;
      if (out !== m_out) begin failures++; $display("FAIL n=%0d out=%b exp=%b", n, out, m_out); end
    end
    checks++;
    if (sets == 0 || ties == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
