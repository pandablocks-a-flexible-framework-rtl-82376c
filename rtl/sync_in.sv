// sync_in: input block for asynchronous front-panel signals (TTL and LVDS
// inputs) feeding the bit bus.
//
// Each of the N lines passes through a two-flip-flop synchroniser, so that a
// signal changing at any time is seen by the fabric as a clean level in the
// system clock domain. The output lags the pin by two clocks. The number of
// lines is a parameter (6 TTL and 2 LVDS inputs on the carrier); the
// synchroniser itself is this design's choice, as the framework only names
// the input blocks.
module sync_in #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] pin,
  output logic [N-1:0] q
);

  logic [N-1:0] meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= pin;
      q    <= meta;
    end
  end

endmodule
