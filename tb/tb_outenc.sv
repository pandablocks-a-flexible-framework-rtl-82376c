// tb_outenc: self-checking test of the quadrature encoder output.
// Gives random target positions and step periods; decodes A/B with an
// independent quadrature decoder and checks that the decoded count reaches
// each target, that no step is illegal, and that steps are never closer than
// QPERIOD clocks.
module tb_outenc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, a, b;
  logic [31:0] val, qperiod, count;
  int checks = 0, failures = 0;
  int decoded = 0, last_step = -1000, min_gap = 1 << 30, cyc = 0, illegal = 0;
  logic [1:0] prev = 2'b00;

  outenc dut (.clk, .rst_n, .enable, .val, .qperiod, .a, .b, .count);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent x4 decoder: position of (A,B) in the cycle 00,10,11,01
  function automatic int ph(input logic [1:0] ab);
    case (ab) 2'b00: return 0; 2'b10: return 1; 2'b11: return 2; default: return 3; endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) prev <= {a, b};
    else if ({a, b} != prev) begin
      int d;
      d = (ph({a, b}) - ph(prev) + 4) % 4;
      if (d == 1) decoded <= decoded + 1;
      else if (d == 3) decoded <= decoded - 1;
      else illegal <= illegal + 1;
      if (cyc - last_step < min_gap) min_gap <= cyc - last_step;
      last_step <= cyc;
      prev <= {a, b};
    end
  end

  initial begin
    int target, per;
    enable = 0; val = 0; qperiod = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    for (int k = 0; k < 8; k++) begin
      target = int'($urandom % 400) - 200;
      per = 1 + $urandom % 6;
      @(negedge clk);
      qperiod = per; val = target; min_gap = 1 << 30;
      repeat (per * 450 + 20) @(negedge clk);
      checks++;
      if (decoded != target || count != 32'(target)) begin
        failures++;
        $display("FAIL target=%0d decoded=%0d count=%0d", target, decoded, $signed(count));
      end
      checks++;
      if (min_gap < per) begin failures++; $display("FAIL gap %0d < %0d", min_gap, per); end
    end
    // disabled: holds
    enable = 0; val = 500;
    repeat (100) @(negedge clk);
    checks++;
    if (decoded == 500) begin failures++; $display("FAIL moved while disabled"); end
    checks++;
    if (illegal != 0) begin failures++; $display("FAIL illegal steps %0d", illegal); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
