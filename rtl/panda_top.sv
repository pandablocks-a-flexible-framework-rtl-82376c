// panda_top: programmable-logic top of the position-and-acquisition box.
//
// All functional blocks share three buses. The CSR bus carries register
// accesses from the processor (through csr_axi_slave) to each block type's
// control module (fb_regs), one 4 KB page per block type. The bit bus holds
// 128 single-bit signals and the position bus 32 words of 32 bits; every
// block output is given a fixed line of one of them, and every block input
// takes any line through a bit_mux or pos_mux whose select is a register. So
// the wiring between blocks is set at run time by register writes. The
// position capture block (pcap) records the buses and its DMA engine
// (pcap_dma) writes the samples into processor memory over an AXI master.
//
// Blocks present (counts are parameters): TTL inputs (6) and outputs (10),
// LVDS inputs (2) and outputs (2), quadrature encoder inputs (4) and outputs
// (4), 5-input LUTs (8), set/reset gates (4), dividers (4), pulse generators
// (4), sequencers (2) and one PCAP. The I/O counts follow the carrier board;
// the soft-block counts, the page numbers and the bus line allocation below
// are this design's own.
//
// Bit bus lines: 0 ZERO, 1 ONE, then TTLIN, LVDSIN, INENC {A,B,Z,CONN} per
// encoder, LUT OUT, SRGATE OUT, DIV {OUTD,OUTN}, PULSE OUT, SEQ {ACTIVE,
// OUTA..OUTF}, PCAP ACTIVE (see the *_BIT localparams).
// Position bus words: 0 ZERO, 1..N_INENC the encoder positions.
//
// Register map per page (register number: meaning; "sel" is a mux select,
// RO is read-only status):
//   0  REG     0..3 bit bus bits 32k..32k+31 (RO), 4..35 pos bus words (RO)
//   2  TTLOUT  0 VAL sel          4  LVDSOUT 0 VAL sel
//   5  INENC   0 SETP (write loads the position), 1 ERRORS (RO)
//   6  OUTENC  0 ENABLE sel, 1 VAL sel, 2 QPERIOD, 3 COUNT (RO)
//   7  LUT     0..4 INPA..INPE sel, 5 FUNC
//   8  SRGATE  0 SET sel, 1 RST sel
//   9  DIV     0 ENABLE sel, 1 INP sel, 2 DIVISOR, 3 COUNT (RO)
//   10 PULSE   0 ENABLE sel, 1 TRIG sel, 2 DELAY, 3 WIDTH, 4 DROPPED (RO)
//   11 SEQ     0 ENABLE sel, 1..3 BITA..BITC sel, 4..6 POSA..POSC sel,
//              7 TABLE_REPEATS, 8 TABLE_START, 9 TABLE_DATA,
//              10 TABLE_LINES (RO), 11 LINE (RO), 12 LINE_REPEAT (RO)
//   12 PCAP    0 ENABLE sel, 1 GATE sel, 2 TRIG sel, 3 ARM, 4 DISARM,
//              5 POS_MASK, 6 BIT_MASK, 7 STATUS (RO), 8 CAPTURED (RO),
//              9 DMA_ADDR, 10 DMA_WORDS, 11 DMA_START, 12 DMA_WRITTEN (RO),
//              13 DMA_STATUS (RO: bit 0 buffer full, bit 1 error)
//
// Timing: one clock domain. Block outputs are registered onto the buses and
// every mux registers its output, so a signal crossing from one block to the
// next takes two clocks plus the block's own latency.
module panda_top
  import panda_pkg::*;
#(
  parameter int unsigned N_TTLIN    = 6,
  parameter int unsigned N_TTLOUT   = 10,
  parameter int unsigned N_LVDSIN   = 2,
  parameter int unsigned N_LVDSOUT  = 2,
  parameter int unsigned N_INENC    = 4,
  parameter int unsigned N_OUTENC   = 4,
  parameter int unsigned N_LUT      = 8,
  parameter int unsigned N_SRGATE   = 4,
  parameter int unsigned N_DIV      = 4,
  parameter int unsigned N_PULSE    = 4,
  parameter int unsigned N_SEQ      = 2,
  parameter int unsigned SEQ_DEPTH  = 1024,
  parameter int unsigned PCAP_FIFO_DEPTH = 1024,
  parameter int unsigned PCAP_DMA_BURST  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI4-Lite register port from the processor
  input  logic                 s_awvalid,
  output logic                 s_awready,
  input  logic [31:0]          s_awaddr,
  input  logic                 s_wvalid,
  output logic                 s_wready,
  input  logic [31:0]          s_wdata,
  input  logic [3:0]           s_wstrb,
  output logic                 s_bvalid,
  input  logic                 s_bready,
  output logic [1:0]           s_bresp,
  input  logic                 s_arvalid,
  output logic                 s_arready,
  input  logic [31:0]          s_araddr,
  output logic                 s_rvalid,
  input  logic                 s_rready,
  output logic [31:0]          s_rdata,
  output logic [1:0]           s_rresp,
  // front panel
  input  logic [N_TTLIN-1:0]   ttlin_pin,
  output logic [N_TTLOUT-1:0]  ttlout_pin,
  input  logic [N_LVDSIN-1:0]  lvdsin_pin,
  output logic [N_LVDSOUT-1:0] lvdsout_pin,
  // encoder cards
  input  logic [N_INENC-1:0]   inenc_a,
  input  logic [N_INENC-1:0]   inenc_b,
  input  logic [N_INENC-1:0]   inenc_z,
  input  logic [N_INENC-1:0]   inenc_conn,
  output logic [N_OUTENC-1:0]  outenc_a,
  output logic [N_OUTENC-1:0]  outenc_b,
  // AXI write master of the capture DMA into processor memory
  output logic                 m_awvalid,
  input  logic                 m_awready,
  output logic [31:0]          m_awaddr,
  output logic [7:0]           m_awlen,
  output logic [2:0]           m_awsize,
  output logic [1:0]           m_awburst,
  output logic                 m_wvalid,
  input  logic                 m_wready,
  output logic [31:0]          m_wdata,
  output logic [3:0]           m_wstrb,
  output logic                 m_wlast,
  input  logic                 m_bvalid,
  output logic                 m_bready,
  input  logic [1:0]           m_bresp
);

  // ---------------------------------------------------------------- bus map
  localparam int unsigned TTLIN_BIT  = 2;
  localparam int unsigned LVDSIN_BIT = TTLIN_BIT + N_TTLIN;
  localparam int unsigned INENC_BIT  = LVDSIN_BIT + N_LVDSIN;     // 4 per encoder
  localparam int unsigned LUT_BIT    = INENC_BIT + 4 * N_INENC;
  localparam int unsigned SRGATE_BIT = LUT_BIT + N_LUT;
  localparam int unsigned DIV_BIT    = SRGATE_BIT + N_SRGATE;     // 2 per divider
  localparam int unsigned PULSE_BIT  = DIV_BIT + 2 * N_DIV;
  localparam int unsigned SEQ_BIT    = PULSE_BIT + N_PULSE;       // 7 per sequencer
  localparam int unsigned PCAP_BIT   = SEQ_BIT + 7 * N_SEQ;
  localparam int unsigned BITS_USED  = PCAP_BIT + 1;
  localparam int unsigned INENC_POS  = 1;
  localparam int unsigned POS_USED   = INENC_POS + N_INENC;

  if (BITS_USED > BIT_BUS_W) begin : g_bit_overflow
    $error("bit bus over-allocated");
  end
  if (POS_USED > POS_BUS_N) begin : g_pos_overflow
    $error("position bus over-allocated");
  end

  bit_bus_t bit_bus, bit_next;
  pos_bus_t pos_bus, pos_next;

  // ---------------------------------------------------------------- CSR bus
  csr_req_t  csr_req;
  csr_data_t csr_rdata;
  csr_data_t rd_reg, rd_ttlout, rd_lvdsout, rd_inenc, rd_outenc, rd_lut, rd_srgate,
             rd_div, rd_pulse, rd_seq, rd_pcap;

  always_comb csr_rdata = rd_reg | rd_ttlout | rd_lvdsout | rd_inenc | rd_outenc | rd_lut |
                          rd_srgate | rd_div | rd_pulse | rd_seq | rd_pcap;

  csr_axi_slave #(.ADDR_W(32)) u_axi (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .csr_req, .csr_rdata
  );

  // Page 0: read-back of both buses
  logic [0:0][35:0][31:0] reg_regs, reg_status;
  logic [0:0][35:0]       reg_wstb;
  always_comb begin
    for (int k = 0; k < 4; k++)  reg_status[0][k] = bit_bus[32*k +: 32];
    for (int k = 0; k < 32; k++) reg_status[0][4+k] = pos_bus[k];
  end
  fb_regs #(.PAGE(PAGE_REG), .NUM_INST(1), .NUM_REGS(36), .RO_MASK({28'd0, {36{1'b1}}})) u_reg_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_reg), .regs(reg_regs), .wstb(reg_wstb), .status(reg_status)
  );

  // ---------------------------------------------------------------- inputs
  logic [N_TTLIN-1:0]  ttlin_q;
  logic [N_LVDSIN-1:0] lvdsin_q;
  sync_in #(.N(N_TTLIN))  u_ttlin  (.clk, .rst_n, .pin(ttlin_pin),  .q(ttlin_q));
  sync_in #(.N(N_LVDSIN)) u_lvdsin (.clk, .rst_n, .pin(lvdsin_pin), .q(lvdsin_q));

  // ---------------------------------------------------------------- TTL / LVDS outputs
  logic [N_TTLOUT-1:0][0:0][31:0]  ttlout_regs, ttlout_status;
  logic [N_TTLOUT-1:0][0:0]        ttlout_wstb;
  logic [N_LVDSOUT-1:0][0:0][31:0] lvdsout_regs, lvdsout_status;
  logic [N_LVDSOUT-1:0][0:0]       lvdsout_wstb;
  assign ttlout_status  = '0;
  assign lvdsout_status = '0;

  fb_regs #(.PAGE(PAGE_TTLOUT), .NUM_INST(N_TTLOUT), .NUM_REGS(1)) u_ttlout_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_ttlout), .regs(ttlout_regs), .wstb(ttlout_wstb),
    .status(ttlout_status)
  );
  fb_regs #(.PAGE(PAGE_LVDSOUT), .NUM_INST(N_LVDSOUT), .NUM_REGS(1)) u_lvdsout_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_lvdsout), .regs(lvdsout_regs), .wstb(lvdsout_wstb),
    .status(lvdsout_status)
  );
  for (genvar i = 0; i < N_TTLOUT; i++) begin : g_ttlout
    bit_mux u_val (.clk, .rst_n, .bit_bus, .sel(ttlout_regs[i][0][BIT_SEL_W-1:0]), .q(ttlout_pin[i]));
  end
  for (genvar i = 0; i < N_LVDSOUT; i++) begin : g_lvdsout
    bit_mux u_val (.clk, .rst_n, .bit_bus, .sel(lvdsout_regs[i][0][BIT_SEL_W-1:0]), .q(lvdsout_pin[i]));
  end

  // ---------------------------------------------------------------- INENC
  logic [N_INENC-1:0][1:0][31:0] inenc_regs, inenc_status;
  logic [N_INENC-1:0][1:0]       inenc_wstb;
  logic [N_INENC-1:0][3:0]       inenc_bits;
  logic [N_INENC-1:0][31:0]      inenc_val;
  fb_regs #(.PAGE(PAGE_INENC), .NUM_INST(N_INENC), .NUM_REGS(2), .RO_MASK(64'b10)) u_inenc_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_inenc), .regs(inenc_regs), .wstb(inenc_wstb),
    .status(inenc_status)
  );
  for (genvar i = 0; i < N_INENC; i++) begin : g_inenc
    assign inenc_status[i][0] = '0;
    inenc u_inenc (
      .clk, .rst_n,
      .a_pin(inenc_a[i]), .b_pin(inenc_b[i]), .z_pin(inenc_z[i]), .conn_pin(inenc_conn[i]),
      .setp_wr(inenc_wstb[i][0]), .setp(inenc_regs[i][0]),
      .a(inenc_bits[i][0]), .b(inenc_bits[i][1]), .z(inenc_bits[i][2]), .conn(inenc_bits[i][3]),
      .val(inenc_val[i]), .errors(inenc_status[i][1])
    );
  end

  // ---------------------------------------------------------------- OUTENC
  logic [N_OUTENC-1:0][3:0][31:0] outenc_regs, outenc_status;
  logic [N_OUTENC-1:0][3:0]       outenc_wstb;
  fb_regs #(.PAGE(PAGE_OUTENC), .NUM_INST(N_OUTENC), .NUM_REGS(4), .RO_MASK(64'b1000)) u_outenc_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_outenc), .regs(outenc_regs), .wstb(outenc_wstb),
    .status(outenc_status)
  );
  for (genvar i = 0; i < N_OUTENC; i++) begin : g_outenc
    logic        en;
    logic [31:0] val;
    assign outenc_status[i][2:0] = '0;
    bit_mux u_en  (.clk, .rst_n, .bit_bus, .sel(outenc_regs[i][0][BIT_SEL_W-1:0]), .q(en));
    pos_mux u_val (.clk, .rst_n, .pos_bus, .sel(outenc_regs[i][1][POS_SEL_W-1:0]), .q(val));
    outenc u_outenc (
      .clk, .rst_n, .enable(en), .val, .qperiod(outenc_regs[i][2]),
      .a(outenc_a[i]), .b(outenc_b[i]), .count(outenc_status[i][3])
    );
  end

  // ---------------------------------------------------------------- LUT
  logic [N_LUT-1:0][5:0][31:0] lut_regs, lut_status;
  logic [N_LUT-1:0][5:0]       lut_wstb;
  logic [N_LUT-1:0]            lut_out;
  assign lut_status = '0;
  fb_regs #(.PAGE(PAGE_LUT), .NUM_INST(N_LUT), .NUM_REGS(6)) u_lut_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_lut), .regs(lut_regs), .wstb(lut_wstb), .status(lut_status)
  );
  for (genvar i = 0; i < N_LUT; i++) begin : g_lut
    logic [4:0] inp;
    for (genvar k = 0; k < 5; k++) begin : g_inp
      bit_mux u_mux (.clk, .rst_n, .bit_bus, .sel(lut_regs[i][k][BIT_SEL_W-1:0]), .q(inp[k]));
    end
    lut u_lut (
      .clk, .rst_n, .inpa(inp[0]), .inpb(inp[1]), .inpc(inp[2]), .inpd(inp[3]), .inpe(inp[4]),
      .func(lut_regs[i][5]), .out(lut_out[i])
    );
  end

  // ---------------------------------------------------------------- SRGATE
  logic [N_SRGATE-1:0][1:0][31:0] srgate_regs, srgate_status;
  logic [N_SRGATE-1:0][1:0]       srgate_wstb;
  logic [N_SRGATE-1:0]            srgate_out;
  assign srgate_status = '0;
  fb_regs #(.PAGE(PAGE_SRGATE), .NUM_INST(N_SRGATE), .NUM_REGS(2)) u_srgate_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_srgate), .regs(srgate_regs), .wstb(srgate_wstb),
    .status(srgate_status)
  );
  for (genvar i = 0; i < N_SRGATE; i++) begin : g_srgate
    logic set, rst;
    bit_mux u_set (.clk, .rst_n, .bit_bus, .sel(srgate_regs[i][0][BIT_SEL_W-1:0]), .q(set));
    bit_mux u_rst (.clk, .rst_n, .bit_bus, .sel(srgate_regs[i][1][BIT_SEL_W-1:0]), .q(rst));
    srgate u_srgate (.clk, .rst_n, .set, .rst, .out(srgate_out[i]));
  end

  // ---------------------------------------------------------------- DIV
  logic [N_DIV-1:0][3:0][31:0] div_regs, div_status;
  logic [N_DIV-1:0][3:0]       div_wstb;
  logic [N_DIV-1:0][1:0]       div_out;
  fb_regs #(.PAGE(PAGE_DIV), .NUM_INST(N_DIV), .NUM_REGS(4), .RO_MASK(64'b1000)) u_div_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_div), .regs(div_regs), .wstb(div_wstb), .status(div_status)
  );
  for (genvar i = 0; i < N_DIV; i++) begin : g_div
    logic en, inp;
    assign div_status[i][2:0] = '0;
    bit_mux u_en  (.clk, .rst_n, .bit_bus, .sel(div_regs[i][0][BIT_SEL_W-1:0]), .q(en));
    bit_mux u_inp (.clk, .rst_n, .bit_bus, .sel(div_regs[i][1][BIT_SEL_W-1:0]), .q(inp));
    div u_div (
      .clk, .rst_n, .enable(en), .inp, .divisor(div_regs[i][2]),
      .outd(div_out[i][0]), .outn(div_out[i][1]), .count(div_status[i][3])
    );
  end

  // ---------------------------------------------------------------- PULSE
  logic [N_PULSE-1:0][4:0][31:0] pulse_regs, pulse_status;
  logic [N_PULSE-1:0][4:0]       pulse_wstb;
  logic [N_PULSE-1:0]            pulse_out;
  fb_regs #(.PAGE(PAGE_PULSE), .NUM_INST(N_PULSE), .NUM_REGS(5), .RO_MASK(64'b10000)) u_pulse_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_pulse), .regs(pulse_regs), .wstb(pulse_wstb),
    .status(pulse_status)
  );
  for (genvar i = 0; i < N_PULSE; i++) begin : g_pulse
    logic en, trig;
    assign pulse_status[i][3:0] = '0;
    bit_mux u_en   (.clk, .rst_n, .bit_bus, .sel(pulse_regs[i][0][BIT_SEL_W-1:0]), .q(en));
    bit_mux u_trig (.clk, .rst_n, .bit_bus, .sel(pulse_regs[i][1][BIT_SEL_W-1:0]), .q(trig));
    pulse u_pulse (
      .clk, .rst_n, .enable(en), .trig, .delay(pulse_regs[i][2]), .width(pulse_regs[i][3]),
      .out(pulse_out[i]), .dropped(pulse_status[i][4])
    );
  end

  // ---------------------------------------------------------------- SEQ
  logic [N_SEQ-1:0][12:0][31:0] seq_regs, seq_status;
  logic [N_SEQ-1:0][12:0]       seq_wstb;
  logic [N_SEQ-1:0][6:0]        seq_bits;   // {OUTF..OUTA, ACTIVE}
  fb_regs #(.PAGE(PAGE_SEQ), .NUM_INST(N_SEQ), .NUM_REGS(13), .RO_MASK(64'h1C00)) u_seq_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_seq), .regs(seq_regs), .wstb(seq_wstb), .status(seq_status)
  );
  for (genvar i = 0; i < N_SEQ; i++) begin : g_seq
    logic        en;
    logic [2:0]  bits;
    logic [2:0][31:0] pos;
    assign seq_status[i][9:0] = '0;
    bit_mux u_en (.clk, .rst_n, .bit_bus, .sel(seq_regs[i][0][BIT_SEL_W-1:0]), .q(en));
    for (genvar k = 0; k < 3; k++) begin : g_in
      bit_mux u_bit (.clk, .rst_n, .bit_bus, .sel(seq_regs[i][1+k][BIT_SEL_W-1:0]), .q(bits[k]));
      pos_mux u_pos (.clk, .rst_n, .pos_bus, .sel(seq_regs[i][4+k][POS_SEL_W-1:0]), .q(pos[k]));
    end
    seq #(.TABLE_DEPTH(SEQ_DEPTH)) u_seq (
      .clk, .rst_n, .enable(en), .bita(bits[0]), .bitb(bits[1]), .bitc(bits[2]),
      .posa(pos[0]), .posb(pos[1]), .posc(pos[2]),
      .table_repeats(seq_regs[i][7]), .table_start(seq_wstb[i][8]),
      .table_wr(seq_wstb[i][9]), .table_wdata(seq_regs[i][9]),
      .active(seq_bits[i][0]), .out(seq_bits[i][6:1]),
      .table_lines(seq_status[i][10]), .line(seq_status[i][11]), .line_repeat(seq_status[i][12])
    );
  end

  // ---------------------------------------------------------------- PCAP
  logic [0:0][13:0][31:0] pcap_regs, pcap_status;
  logic [0:0][13:0]       pcap_wstb;
  logic                  pcap_en, pcap_gate, pcap_trig, pcap_active, pcap_active_d;
  logic                  pcap_valid, pcap_ready, dma_full, dma_error;
  logic [31:0]           pcap_data;
  fb_regs #(.PAGE(PAGE_PCAP), .NUM_INST(1), .NUM_REGS(14), .RO_MASK(64'h3180)) u_pcap_regs (
    .clk, .rst_n, .req(csr_req), .rdata(rd_pcap), .regs(pcap_regs), .wstb(pcap_wstb),
    .status(pcap_status)
  );
  assign pcap_status[0][6:0]   = '0;
  assign pcap_status[0][11:9]  = '0;
  assign pcap_status[0][13]    = {30'd0, dma_error, dma_full};
  bit_mux u_pcap_en   (.clk, .rst_n, .bit_bus, .sel(pcap_regs[0][0][BIT_SEL_W-1:0]), .q(pcap_en));
  bit_mux u_pcap_gate (.clk, .rst_n, .bit_bus, .sel(pcap_regs[0][1][BIT_SEL_W-1:0]), .q(pcap_gate));
  bit_mux u_pcap_trig (.clk, .rst_n, .bit_bus, .sel(pcap_regs[0][2][BIT_SEL_W-1:0]), .q(pcap_trig));
  pcap #(.FIFO_DEPTH(PCAP_FIFO_DEPTH)) u_pcap (
    .clk, .rst_n, .enable(pcap_en), .gate(pcap_gate), .trig(pcap_trig),
    .bit_bus, .pos_bus,
    .arm(pcap_wstb[0][3]), .disarm(pcap_wstb[0][4]),
    .pos_mask(pcap_regs[0][5]), .bit_mask(pcap_regs[0][6][3:0]),
    .active(pcap_active), .status(pcap_status[0][7]), .captured(pcap_status[0][8]),
    .m_valid(pcap_valid), .m_ready(pcap_ready), .m_data(pcap_data)
  );

  // the end of an acquisition flushes the DMA's partial burst
  always_ff @(posedge clk) begin
    if (!rst_n) pcap_active_d <= 1'b0;
    else        pcap_active_d <= pcap_active;
  end

  pcap_dma #(.BURST_LEN(PCAP_DMA_BURST)) u_pcap_dma (
    .clk, .rst_n,
    .start(pcap_wstb[0][11]), .base_addr(pcap_regs[0][9]), .buf_words(pcap_regs[0][10]),
    .flush(pcap_active_d && !pcap_active),
    .written(pcap_status[0][12]), .full(dma_full), .error(dma_error),
    .s_valid(pcap_valid), .s_ready(pcap_ready), .s_data(pcap_data),
    .m_awvalid, .m_awready, .m_awaddr, .m_awlen, .m_awsize, .m_awburst,
    .m_wvalid, .m_wready, .m_wdata, .m_wstrb, .m_wlast, .m_bvalid, .m_bready, .m_bresp
  );

  // ---------------------------------------------------------------- bus assembly
  always_comb begin
    bit_next = '0;
    bit_next[BIT_ONE] = 1'b1;
    bit_next[TTLIN_BIT +: N_TTLIN]     = ttlin_q;
    bit_next[LVDSIN_BIT +: N_LVDSIN]   = lvdsin_q;
    bit_next[INENC_BIT +: 4*N_INENC]   = inenc_bits;
    bit_next[LUT_BIT +: N_LUT]         = lut_out;
    bit_next[SRGATE_BIT +: N_SRGATE]   = srgate_out;
    bit_next[DIV_BIT +: 2*N_DIV]       = div_out;
    bit_next[PULSE_BIT +: N_PULSE]     = pulse_out;
    bit_next[SEQ_BIT +: 7*N_SEQ]       = seq_bits;
    bit_next[PCAP_BIT]                 = pcap_active;
    pos_next = '0;
    for (int i = 0; i < N_INENC; i++) pos_next[INENC_POS + i] = inenc_val[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_bus <= '0;
      pos_bus <= '0;
    end else begin
      bit_bus <= bit_next;
      pos_bus <= pos_next;
    end
  end

endmodule
