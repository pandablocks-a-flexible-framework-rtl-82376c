// fb_regs: control module of one functional-block type.
//
// Each block type owns one 4 KB page of the CSR space. Inside the page the
// instance number selects one of up to 16 instances and the register number
// one of up to 64 registers of 32 bits. This module decodes accesses to its
// page, keeps the writable registers of every instance, pulses a write strobe
// for the register written (blocks use it for commands such as "arm" or
// "push table word") and answers reads with either the stored value or, for
// registers flagged in RO_MASK, a status value supplied by the block.
//
// Timing: a request is valid for one clock. Registers update, and the write
// strobe is high, on the clock after the request. Read data is registered: it
// is valid on the clock after the read request and is zero whenever the
// previous request was not a read of this page, so the CSR read data of all
// pages can be combined with a plain OR.
//
// The page/instance/register split and the 32-bit register width follow the
// framework description; the read latency, the zero-when-idle read data and
// the status mask are this design's own choices.
module fb_regs
  import panda_pkg::*;
#(
  parameter logic [PAGE_W-1:0] PAGE     = '0,
  parameter int unsigned       NUM_INST = 16,   // instances of this block type
  parameter int unsigned       NUM_REGS = 64,   // registers per instance
  parameter logic [63:0]       RO_MASK  = '0    // 1: register reads status, ignores writes
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  csr_req_t                                  req,
  output csr_data_t                                 rdata,
  output logic [NUM_INST-1:0][NUM_REGS-1:0][31:0]   regs,
  output logic [NUM_INST-1:0][NUM_REGS-1:0]         wstb,
  input  logic [NUM_INST-1:0][NUM_REGS-1:0][31:0]   status
);

  logic hit;
  always_comb begin
    hit = (req.page == PAGE) && (32'(req.inst) < NUM_INST) && (32'(req.regno) < NUM_REGS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_INST; i++) regs[i] <= '0;
      wstb  <= '0;
      rdata <= '0;
    end else begin
      wstb  <= '0;
      rdata <= '0;
      if (hit && req.wr && !RO_MASK[req.regno]) begin
        regs[req.inst][req.regno] <= req.wdata;
        wstb[req.inst][req.regno] <= 1'b1;
      end
      if (hit && req.rd)
        rdata <= RO_MASK[req.regno] ? status[req.inst][req.regno] : regs[req.inst][req.regno];
    end
  end

endmodule
