// bit_mux: run-time selectable connection of one block input to the bit bus.
//
// Every bit-type input of a functional block goes through one of these
// multiplexers: the select register (from the block's CSRs) picks one of the
// 128 bit-bus lines, so blocks can be rewired without rebuilding the logic.
// The TTL and LVDS output blocks are this multiplexer driving a pin.
//
// Timing: the selected line is registered, so the output follows the bus one
// clock later. A select value of 0 gives the constant-zero line, 1 the
// constant-one line (the bus assignment in the top). The 128-line width
// follows the framework; the output register is this design's choice.
module bit_mux
  import panda_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  bit_bus_t             bit_bus,
  input  logic [BIT_SEL_W-1:0] sel,
  output logic                 q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= bit_bus[sel];
  end

endmodule
