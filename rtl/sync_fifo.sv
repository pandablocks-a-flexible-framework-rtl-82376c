// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Writes are accepted when not full; the head word is shown on rd_data while
// rd_valid is high and is removed by rd_ready. A word written on clock t can
// be read from clock t+1. The storage is a plain array with a combinational
// read of the head word; DEPTH must be a power of two. Used to buffer
// captured words in front of the DMA stream.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_wr, do_rd;

  always_comb begin
    level    = wp - rp;
    full     = (level == (AW+1)'(DEPTH));
    rd_valid = (level != '0);
    rd_data  = mem[rp[AW-1:0]];
    do_wr    = wr_en && !full;
    do_rd    = rd_valid && rd_ready;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

endmodule
