// div: pulse (clock) divider functional block.
//
// While ENABLE is high the block counts rising edges of INP. Every DIVISOR-th
// pulse is passed to OUTD, all other pulses to OUTN, so OUTD carries the input
// divided by DIVISOR and OUTN the rest. Each pulse is passed whole: the output
// follows INP, one clock later, for as long as INP stays high. When ENABLE is
// low the count is cleared and both outputs are low. DIVISOR 0 acts as 1.
// COUNT gives the edges counted since the last OUTD pulse.
// The framework only names clock dividers; the two outputs and the counting
// rule are this design's own.
module div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        inp,
  input  logic [31:0] divisor,
  output logic        outd,
  output logic        outn,
  output logic [31:0] count
);

  logic inp_d, route_d, route_now, rise;
  logic [31:0] div_eff;

  always_comb begin
    div_eff   = (divisor == 32'd0) ? 32'd1 : divisor;
    rise      = inp && !inp_d;
    route_now = rise ? (count + 32'd1 >= div_eff) : route_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inp_d   <= 1'b0;
      route_d <= 1'b0;
      count   <= '0;
      outd    <= 1'b0;
      outn    <= 1'b0;
    end else begin
      inp_d <= inp;
      if (!enable) begin
        route_d <= 1'b0;
        count   <= '0;
        outd    <= 1'b0;
        outn    <= 1'b0;
      end else begin
        route_d <= route_now;
        if (rise) count <= route_now ? 32'd0 : count + 32'd1;
        outd <= inp && route_now;
        outn <= inp && !route_now;
      end
    end
  end

endmodule
