// inenc: position encoder input block (incremental quadrature).
//
// The A, B and Z lines and the card's "connected" line come from an encoder
// daughter card and are first synchronised to the system clock (two flip-
// flops). The A/B pair is then decoded at four counts per cycle: a step in the
// order 00 -> 10 -> 11 -> 01 -> 00 (A leading B) counts up, the reverse order
// counts down, and a step where both lines change together is counted in
// ERRORS and does not move the position. A write to SETP loads the position.
// VAL, the 32-bit position, goes to the position bus; the synchronised A, B,
// Z and CONN go to the bit bus. VAL moves three clocks after the edge on the
// pin.
//
// The encoder cards also support absolute protocols (SSI, BiSS-C); their
// framing is not described and they are not implemented here. The decoding
// rule, the error count and the SETP command are this design's own.
module inenc (
  input  logic        clk,
  input  logic        rst_n,
  // from the encoder card
  input  logic        a_pin,
  input  logic        b_pin,
  input  logic        z_pin,
  input  logic        conn_pin,
  // CSR
  input  logic        setp_wr,
  input  logic [31:0] setp,
  // to the buses
  output logic        a,
  output logic        b,
  output logic        z,
  output logic        conn,
  output logic [31:0] val,
  output logic [31:0] errors
);

  logic [3:0] meta, sync;
  logic [1:0] ab_prev;
  logic       up, down, bad;

  always_comb begin
    {a, b, z, conn} = sync;
    up   = (ab_prev == 2'b00 && {a, b} == 2'b10) || (ab_prev == 2'b10 && {a, b} == 2'b11) ||
           (ab_prev == 2'b11 && {a, b} == 2'b01) || (ab_prev == 2'b01 && {a, b} == 2'b00);
    down = (ab_prev == 2'b00 && {a, b} == 2'b01) || (ab_prev == 2'b01 && {a, b} == 2'b11) ||
           (ab_prev == 2'b11 && {a, b} == 2'b10) || (ab_prev == 2'b10 && {a, b} == 2'b00);
    bad  = (ab_prev ^ {a, b}) == 2'b11;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta    <= '0;
      sync    <= '0;
      ab_prev <= '0;
      val     <= '0;
      errors  <= '0;
    end else begin
      meta    <= {a_pin, b_pin, z_pin, conn_pin};
      sync    <= meta;
      ab_prev <= {a, b};
      if (setp_wr)   val <= setp;
      else if (up)   val <= val + 32'd1;
      else if (down) val <= val - 32'd1;
      if (bad) errors <= errors + 32'd1;
    end
  end

endmodule
