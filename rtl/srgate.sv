// srgate: set/reset gate functional block.
//
// A rising edge on SET drives the output high, a rising edge on RST drives it
// low, and the output holds between edges. If both edges arrive on the same
// clock, reset wins. The output changes on the clock on which the edge is
// seen at the inputs. The framework only names set/reset gates; edge
// sensitivity and reset priority are this design's choice.
module srgate (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic rst,
  output logic out
);

  logic set_d, rst_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      set_d <= 1'b0;
      rst_d <= 1'b0;
      out   <= 1'b0;
    end else begin
      set_d <= set;
      rst_d <= rst;
      if (rst && !rst_d)      out <= 1'b0;
      else if (set && !set_d) out <= 1'b1;
    end
  end

endmodule
