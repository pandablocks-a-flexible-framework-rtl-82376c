// tb_div: self-checking test of the pulse divider.
// Feeds pulse trains of random widths and gaps for several divisors and
// compares OUTD, OUTN and COUNT each clock with a cycle model written from
// the rule: every DIVISOR-th rising edge goes to OUTD, the rest to OUTN, each
// pulse passed whole one clock later; disabling clears the count.
module tb_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, inp, outd, outn;
  logic [31:0] divisor, count;
  // model state
  logic m_inp_d, m_route, m_outd, m_outn;
  int unsigned m_count;
  int checks = 0, failures = 0, n_outd = 0;

  div dut (.clk, .rst_n, .enable, .inp, .divisor, .outd, .outn, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the same edge as the DUT, from the values it samples
  task automatic model_step();
    int unsigned d;
    logic rise, route;
    d = (divisor == 0) ? 1 : divisor;
    rise = inp && !m_inp_d;
    if (!enable) begin
      m_count = 0; m_route = 0; m_outd = 0; m_outn = 0;
    end else begin
      route = m_route;
      if (rise) begin
        if (m_count + 1 >= d) begin route = 1; m_count = 0; end
        else begin route = 0; m_count = m_count + 1; end
      end
      m_route = route;
      m_outd = inp && route;
      m_outn = inp && !route;
    end
    m_inp_d = inp;
  endtask

  initial begin
    enable = 0; inp = 0; divisor = 3;
    m_inp_d = 0; m_route = 0; m_outd = 0; m_outn = 0; m_count = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      divisor = (t == 5) ? 0 : 32'(1 + t * 2);
      for (int n = 0; n < 800; n++) begin
        @(negedge clk);
        if (n == 0) enable = 0; else if (n == 3) enable = 1;
        if ($urandom % 3 == 0) inp = !inp;
        @(posedge clk);
        model_step();
        #1;
        checks++;
        if (outd !== m_outd || outn !== m_outn || count !== m_count) begin
          failures++;
          $display("FAIL div=%0d n=%0d outd=%b/%b outn=%b/%b count=%0d/%0d",
                   divisor, n, outd, m_outd, outn, m_outn, count, m_count);
        end
        if (outd) n_outd++;
      end
    end
    checks++;
    if (n_outd == 0) begin failures++; $display("FAIL no OUTD pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
