// outenc: position encoder output block (incremental quadrature).
//
// The block keeps its own 32-bit count and, while ENABLE is high, moves it one
// step towards the target position VAL (taken from the position bus) every
// QPERIOD clocks (QPERIOD 0 acts as 1). The quadrature outputs are the Gray
// code of the two low bits of the count: 0 -> 00, 1 -> 10, 2 -> 11, 3 -> 01
// for (A,B), so counting up has A leading B, the same sense as inenc. When
// ENABLE is low the count and outputs hold. A and B are registered.
//
// The framework only names position encoder outputs; the step rate control
// and the absence of absolute protocols are this design's own.
module outenc (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] val,
  input  logic [31:0] qperiod,
  output logic        a,
  output logic        b,
  output logic [31:0] count
);

  logic [31:0] timer;
  logic        step_ok;

  always_comb step_ok = (timer == 32'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer <= '0;
      count <= '0;
      a     <= 1'b0;
      b     <= 1'b0;
    end else if (enable) begin
      if (!step_ok) timer <= timer - 32'd1;
      if (step_ok && count != val) begin
        timer <= (qperiod == 32'd0) ? 32'd0 : qperiod - 32'd1;
        if ($signed(val) > $signed(count)) count <= count + 32'd1;
        else                               count <= count - 32'd1;
      end
      unique case (count[1:0])
        2'd0: {a, b} <= 2'b00;
        2'd1: {a, b} <= 2'b10;
        2'd2: {a, b} <= 2'b11;
        2'd3: {a, b} <= 2'b01;
      endcase
    end
  end

endmodule
