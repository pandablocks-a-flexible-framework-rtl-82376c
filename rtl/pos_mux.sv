// pos_mux: run-time selectable connection of one block input to the
// position bus.
//
// Every position-type input of a functional block goes through one of these
// multiplexers: the select register picks one of the 32 position words of 32
// bits. Timing: the selected word is registered, so the output follows the
// bus one clock later. Select 0 is the constant-zero word. The bus size
// follows the framework; the output register is this design's choice.
module pos_mux
  import panda_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  pos_bus_t             pos_bus,
  input  logic [POS_SEL_W-1:0] sel,
  output logic [POS_W-1:0]     q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= pos_bus[sel];
  end

endmodule
