// tb_sync_in: self-checking test of the input synchroniser.
// Checks that every line appears at the output exactly two clocks after it is
// sampled, and that reset clears the outputs.
module tb_sync_in;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 6;
  logic [N-1:0] pin, q;
  logic [N-1:0] hist [3];
  int checks = 0, failures = 0;

  sync_in #(.N(N)) dut (.clk, .rst_n, .pin, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pin = '1;
    repeat (3) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1;
    pin = '0;
    hist = '{default: '0};
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      pin = N'($urandom);
      // hist[0] is the value sampled at the last edge, hist[1] the one before
      hist[2] = hist[1]; hist[1] = hist[0];
      @(posedge clk); #1;
      hist[0] = pin;
      if (n >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("FAIL n=%0d q=%b exp=%b", n, q, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
