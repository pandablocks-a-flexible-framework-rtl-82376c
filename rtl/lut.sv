// lut: 5-input look-up table functional block.
//
// The five inputs A..E (each taken from the bit bus through a bit_mux) form a
// 5-bit index, A being the most significant bit, into the 32-bit truth table
// FUNC written over the CSR bus. Any Boolean function of five signals can so
// be set at run time. The output is registered: it follows the inputs one
// clock later. The five inputs follow the framework description; the index
// order and the truth-table encoding are this design's own.
module lut (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inpa,
  input  logic        inpb,
  input  logic        inpc,
  input  logic        inpd,
  input  logic        inpe,
  input  logic [31:0] func,   // truth table, bit i is the output for index i
  output logic        out
);

  logic [4:0] idx;
  always_comb idx = {inpa, inpb, inpc, inpd, inpe};

  always_ff @(posedge clk) begin
    if (!rst_n) out <= 1'b0;
    else        out <= func[idx];
  end

endmodule
