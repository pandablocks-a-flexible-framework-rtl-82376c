// pcap: position capture functional block.
//
// PCAP records the state of the shared buses for the processor. A write to
// ARM arms it; while armed, a rising edge of ENABLE starts an acquisition
// (ACTIVE high) and clears a timestamp counter. During the acquisition each
// rising edge of TRIG seen while GATE is high captures, on that clock, the
// timestamp, the 32 position-bus words and the 128 bit-bus lines. The
// captured sample is then written into a FIFO word by word: first the
// timestamp (clocks since ENABLE rose), then each position word whose bit is
// set in POS_MASK (word 0 first), then each 32-bit slice of the bit bus whose
// bit is set in BIT_MASK. The FIFO drains through a valid/ready stream to the
// DMA engine that moves the data to processor memory. The acquisition ends
// when ENABLE falls or DISARM is written.
//
// Writing out one sample takes 37 clocks whatever the masks (one per possible
// word); a trigger that arrives before the previous sample is written out, or
// a full FIFO, ends the acquisition with OVERFLOW set. STATUS bit 0 is armed,
// bit 1 active, bit 2 overflow; CAPTURED counts samples.
//
// The ENABLE, GATE and TRIG inputs, ACTIVE output and the capture of the pos
// and bit buses by DMA follow the framework; the sample layout, masks, FIFO
// and overflow rule are this design's own.
module pcap
  import panda_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024   // 32-bit words
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        gate,
  input  logic        trig,
  input  bit_bus_t    bit_bus,
  input  pos_bus_t    pos_bus,
  input  logic        arm,
  input  logic        disarm,
  input  logic [31:0] pos_mask,
  input  logic [3:0]  bit_mask,
  output logic        active,
  output logic [31:0] status,
  output logic [31:0] captured,
  // capture stream to the DMA engine
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] m_data
);

  localparam int unsigned NWORDS = 1 + POS_BUS_N + BIT_BUS_W / 32;  // 37

  logic        armed, overflow, enable_d, trig_d, busy;
  logic [31:0] tstamp;
  logic [NWORDS-1:0][31:0] snap;
  logic [NWORDS-1:0]       snap_mask;
  logic [$clog2(NWORDS)-1:0] widx;
  logic        capture, push, fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  always_comb begin
    capture = active && gate && trig && !trig_d;
    push    = busy && snap_mask[widx];
    status  = {29'd0, overflow, active, armed};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      active    <= 1'b0;
      overflow  <= 1'b0;
      enable_d  <= 1'b0;
      trig_d    <= 1'b0;
      busy      <= 1'b0;
      tstamp    <= '0;
      snap      <= '0;
      snap_mask <= '0;
      widx      <= '0;
      captured  <= '0;
    end else begin
      enable_d <= enable;
      trig_d   <= trig;
      tstamp   <= tstamp + 32'd1;

      if (arm) begin
        armed    <= 1'b1;
        overflow <= 1'b0;
        captured <= '0;
      end

      if (armed && !active && enable && !enable_d) begin
        active <= 1'b1;
        tstamp <= 32'd1;
      end

      // write out a captured sample, one candidate word per clock
      if (busy) begin
        if (push && fifo_full) begin
          overflow <= 1'b1;
          active   <= 1'b0;
          armed    <= 1'b0;
        end
        if (32'(widx) == NWORDS - 1) begin
          busy <= 1'b0;
          widx <= '0;
        end else widx <= widx + 1'b1;
      end

      if (capture) begin
        if (busy) begin
          overflow <= 1'b1;
          active   <= 1'b0;
          armed    <= 1'b0;
        end else begin
          busy      <= 1'b1;
          widx      <= '0;
          captured  <= captured + 32'd1;
          snap      <= {bit_bus, pos_bus, tstamp};
          snap_mask <= {bit_mask, pos_mask, 1'b1};
        end
      end

      if (disarm || (active && !enable)) begin
        active <= 1'b0;
        armed  <= 1'b0;
      end
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en   (push),
    .wr_data (snap[widx]),
    .full    (fifo_full),
    .rd_valid(m_valid),
    .rd_ready(m_ready),
    .rd_data (m_data),
    .level   (fifo_level)
  );

endmodule
