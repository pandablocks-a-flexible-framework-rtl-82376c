// tb_lut: self-checking test of the 5-input look-up table.
// Programs random and standard truth tables and checks every input
// combination one clock after it is applied (index = {A,B,C,D,E}).
module tb_lut;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] in;
  logic [31:0] func;
  logic out, exp_out;
  int checks = 0, failures = 0;

  lut dut (.clk, .rst_n, .inpa(in[4]), .inpb(in[3]), .inpc(in[2]), .inpd(in[1]), .inpe(in[0]),
           .func, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model(input logic [31:0] f, input logic [4:0] x);
    return f[x];
  endfunction

  initial begin
    in = '0; func = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      unique case (t)
        0: func = 32'hFFFF_0000;   // A
        1: func = 32'h0000_FFFF;   // not A
        2: func = 32'h8000_0000;   // A and B and C and D and E
        3: func = 32'hFFFF_FFFE;   // any input high
        4: func = 32'h9669_6996;   // odd parity
        default: func = $urandom;
      endcase
      for (int x = 0; x < 32; x++) begin
        @(negedge clk);
        in = 5'(x);
        exp_out = model(func, 5'(x));
        @(negedge clk);
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("FAIL func=%h in=%b out=%b", func, in, out);
        end
      end
    end
    // odd parity check against an independent formula
    func = 32'h9669_6996;
    for (int x = 0; x < 32; x++) begin
      @(negedge clk); in = 5'(x);
      @(negedge clk);
      checks++;
      if (out !== ^in) begin failures++; $display("FAIL parity in=%b", in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
