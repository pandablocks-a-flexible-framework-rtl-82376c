// pcap_dma: DMA engine that writes the position-capture stream into
// processor memory over an AXI write-only master port.
//
// Captured words arrive on a valid/ready stream. They are gathered into a
// local buffer of BURST_LEN words; a full buffer is written as one INCR
// burst of 32-bit beats (AWLEN = BURST_LEN-1, AWSIZE = 4 bytes) to the next
// address of the memory buffer. A FLUSH strobe (given when the acquisition
// ends) writes whatever partial buffer is left as a shorter burst. A START
// strobe loads the buffer base address (byte address, to be aligned to
// 4*BURST_LEN bytes so no burst crosses a 4 KB boundary) and its size in
// words, and clears the counters. When the buffer is full the engine stops
// taking words (FULL), which back-pressures the capture FIFO; an error
// response on B sets ERROR. WRITTEN counts the words acknowledged by memory.
//
// Timing: one burst at a time: fill, address, data beats (one per clock
// when WREADY is high), response. START is taken only between bursts. The transfer by DMA into processor memory
// follows the framework; burst size, buffer scheme and flush rule are this
// design's own.
module pcap_dma #(
  parameter int unsigned BURST_LEN = 16   // beats per burst (AXI3 limit)
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  logic [31:0] base_addr,
  input  logic [31:0] buf_words,
  input  logic        flush,
  output logic [31:0] written,
  output logic        full,
  output logic        error,
  // capture stream in
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [31:0] s_data,
  // AXI write master
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_wvalid,
  input  logic        m_wready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wlast,
  input  logic        m_bvalid,
  output logic        m_bready,
  input  logic [1:0]  m_bresp
);

  localparam int unsigned CW = $clog2(BURST_LEN + 1);
  localparam int unsigned IW = $clog2(BURST_LEN);

  typedef enum logic [1:0] {FILL, ADDR, DATA, RESP} state_e;
  state_e state;

  logic [31:0]   buffer [BURST_LEN];
  logic [CW-1:0] fill_cnt, beat;
  logic [31:0]   addr, limit, queued;
  logic          flush_pend, go;

  always_comb begin
    full      = (queued >= limit);
    s_ready   = (state == FILL) && !start && !full && (32'(fill_cnt) < BURST_LEN);
    go        = (state == FILL) && (fill_cnt != '0) &&
                ((32'(fill_cnt) == BURST_LEN) || full || (flush_pend && !s_valid));
    m_awvalid = (state == ADDR);
    m_awaddr  = addr;
    m_awlen   = 8'(fill_cnt - 1'b1);
    m_awsize  = 3'd2;
    m_awburst = 2'b01;
    m_wvalid  = (state == DATA);
    m_wdata   = buffer[beat[IW-1:0]];
    m_wstrb   = 4'hF;
    m_wlast   = (beat == fill_cnt - 1'b1);
    m_bready  = (state == RESP);
  end

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) buffer[fill_cnt[IW-1:0]] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= FILL;
      fill_cnt   <= '0;
      beat       <= '0;
      addr       <= '0;
      limit      <= '0;
      queued     <= '0;
      written    <= '0;
      error      <= 1'b0;
      flush_pend <= 1'b0;
    end else begin
      if (flush) flush_pend <= 1'b1;
      unique case (state)
        FILL: begin
          if (start) begin
            addr       <= base_addr;
            limit      <= buf_words;
            queued     <= '0;
            written    <= '0;
            error      <= 1'b0;
            fill_cnt   <= '0;
            flush_pend <= 1'b0;
          end else if (go) begin
            state <= ADDR;
          end else if (s_valid && s_ready) begin
            fill_cnt <= fill_cnt + 1'b1;
            queued   <= queued + 32'd1;
          end else if (flush_pend && fill_cnt == '0 && !s_valid) begin
            flush_pend <= 1'b0;
          end
        end
        ADDR: if (m_awready) begin
          state <= DATA;
          beat  <= '0;
        end
        DATA: if (m_wready) begin
          if (m_wlast) state <= RESP;
          else         beat  <= beat + 1'b1;
        end
        RESP: if (m_bvalid) begin
          if (m_bresp != 2'b00) error <= 1'b1;
          written  <= written + 32'(fill_cnt);
          addr     <= addr + 32'(fill_cnt) * 32'd4;
          fill_cnt <= '0;
          state    <= FILL;
        end
        default: state <= FILL;
      endcase
    end
  end

  // Address and data stay stable while the slave stalls
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr) && $stable(m_awlen));
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata) && $stable(m_wlast));

endmodule
