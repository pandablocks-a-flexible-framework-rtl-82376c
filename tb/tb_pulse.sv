// tb_pulse: self-checking test of the pulse generator.
// For a set of DELAY/WIDTH pairs, fires one trigger edge and checks that OUT
// is high after exactly the clock edges E+DELAY .. E+DELAY+WIDTH-1, E being
// the edge that samples the trigger. Then checks that edges during a pulse are
// dropped and counted, and that ENABLE low blocks triggers.
module tb_pulse;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, trig, out;
  logic [31:0] delay, width, dropped;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pulse dut (.clk, .rst_n, .enable, .trig, .delay, .width, .out, .dropped);

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

  initial begin
    int d, w, t0, first, last, highs;
    enable = 1; trig = 0; delay = 0; width = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      d = (k < 3) ? k : $urandom % 20;
      w = (k < 3) ? 1 + k : 1 + $urandom % 20;
      delay = d; width = w;
      @(negedge clk); trig = 1;
      @(posedge clk); t0 = cyc;   // edge sampled on this clock
      first = -1; last = -1; highs = 0;
      for (int c = 0; c < d + w + 10; c++) begin
        if (c > 0) @(posedge clk);
        #1;
        if (c == 0) trig = 0;
        if (out) begin
          highs++;
          if (first < 0) first = cyc - t0;
          last = cyc - t0;
        end
      end
      chk(first == d + 1 && last == d + w && highs == w,
          $sformatf("delay=%0d width=%0d first=%0d last=%0d highs=%0d", d, w, first, last, highs));
    end
    // trigger edges during a running pulse are dropped
    delay = 5; width = 10;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;   // in delay phase
    repeat (6) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;                   // in high phase
    repeat (20) @(negedge clk);
    chk(dropped == 2, $sformatf("dropped=%0d", dropped));
    // disabled: no pulse
    enable = 0; delay = 0; width = 3;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    highs = 0;
    repeat (10) begin @(posedge clk); #1; if (out) highs++; end
    chk(highs == 0, "pulse while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
