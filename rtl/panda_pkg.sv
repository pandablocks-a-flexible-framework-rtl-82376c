// panda_pkg: sizes, CSR address map and shared types of the functional-block
// framework.
//
// The programmable logic is organised as functional blocks that share three
// buses: a CSR bus for configuration and status, a 128-line bit bus and a
// position bus of 32 words of 32 bits. The CSR space is 128 KB, split into
// 32 pages of 4 KB (one page per block type), each page into 16 instances,
// each instance into 64 registers of 32 bits. These numbers follow the
// framework description; the page number given to each block type and the
// layout of registers inside a page are this design's own choice.
package panda_pkg;

  // Shared buses
  localparam int unsigned BIT_BUS_W = 128;  // single control bits
  localparam int unsigned POS_BUS_N = 32;   // position words
  localparam int unsigned POS_W     = 32;   // bits per position word
  localparam int unsigned BIT_SEL_W = $clog2(BIT_BUS_W);
  localparam int unsigned POS_SEL_W = $clog2(POS_BUS_N);

  typedef logic [BIT_BUS_W-1:0]            bit_bus_t;
  typedef logic [POS_BUS_N-1:0][POS_W-1:0] pos_bus_t;

  // CSR address map: byte address [16:12] page, [11:8] instance, [7:2] register
  localparam int unsigned CSR_ADDR_W = 17;  // 128 KB
  localparam int unsigned PAGE_W     = 5;   // 32 pages of 4 KB
  localparam int unsigned INST_W     = 4;   // 16 instances per block type
  localparam int unsigned REG_W      = 6;   // 64 registers per instance
  localparam int unsigned CSR_DATA_W = 32;

  typedef logic [CSR_DATA_W-1:0] csr_data_t;

  // One CSR access, valid for exactly one clock when wr or rd is set.
  // Read data returns on the following clock (CSR_RD_LATENCY).
  typedef struct packed {
    logic              wr;
    logic              rd;
    logic [PAGE_W-1:0] page;
    logic [INST_W-1:0] inst;
    logic [REG_W-1:0]  regno;
    csr_data_t         wdata;
  } csr_req_t;

  localparam int unsigned CSR_RD_LATENCY = 2;  // request to data at the AXI slave

  // Page of each block type (this design's allocation)
  localparam logic [PAGE_W-1:0] PAGE_REG    = 5'd0;   // bus read-back
  localparam logic [PAGE_W-1:0] PAGE_TTLOUT = 5'd2;
  localparam logic [PAGE_W-1:0] PAGE_LVDSOUT= 5'd4;
  localparam logic [PAGE_W-1:0] PAGE_INENC  = 5'd5;
  localparam logic [PAGE_W-1:0] PAGE_OUTENC = 5'd6;
  localparam logic [PAGE_W-1:0] PAGE_LUT    = 5'd7;
  localparam logic [PAGE_W-1:0] PAGE_SRGATE = 5'd8;
  localparam logic [PAGE_W-1:0] PAGE_DIV    = 5'd9;
  localparam logic [PAGE_W-1:0] PAGE_PULSE  = 5'd10;
  localparam logic [PAGE_W-1:0] PAGE_SEQ    = 5'd11;
  localparam logic [PAGE_W-1:0] PAGE_PCAP   = 5'd12;

  // Fixed lines: bit bus 0 is ZERO, bit bus 1 is ONE, pos bus 0 is ZERO
  localparam int unsigned BIT_ZERO = 0;
  localparam int unsigned BIT_ONE  = 1;
  localparam int unsigned POS_ZERO = 0;

  // Sequencer trigger conditions (4-bit code in frame word 0)
  typedef enum logic [3:0] {
    TRIG_IMMEDIATE = 4'd0,
    TRIG_BITA_0    = 4'd1,
    TRIG_BITA_1    = 4'd2,
    TRIG_BITB_0    = 4'd3,
    TRIG_BITB_1    = 4'd4,
    TRIG_BITC_0    = 4'd5,
    TRIG_BITC_1    = 4'd6,
    TRIG_POSA_GE   = 4'd7,
    TRIG_POSA_LE   = 4'd8,
    TRIG_POSB_GE   = 4'd9,
    TRIG_POSB_LE   = 4'd10,
    TRIG_POSC_GE   = 4'd11,
    TRIG_POSC_LE   = 4'd12
  } seq_trig_e;

endpackage
