// csr_axi_slave: AXI4-Lite slave that turns processor register accesses into
// CSR bus requests.
//
// The processor reaches the functional blocks' registers through a 128 KB
// window on a general-purpose AXI port. Byte address bits [16:12] select the
// page (block type), [11:8] the instance and [7:2] the register; higher bits
// are ignored and accesses are whole 32-bit words (WSTRB is ignored).
//
// One access is handled at a time. A write is accepted when address and data
// are both valid (AWREADY and WREADY rise together), issues a one-clock CSR
// write on the next clock and answers OKAY on B on the clock after. A read is
// accepted with ARREADY, issues a one-clock CSR read, takes the OR-combined
// read data CSR_RD_LATENCY-1 clocks later and presents it on R. Writes take
// priority when both arrive together. The address split follows the
// framework's CSR map; the protocol subset and timing are this design's own.
module csr_axi_slave
  import panda_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [ADDR_W-1:0] s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  // CSR bus
  output csr_req_t          csr_req,
  input  csr_data_t         csr_rdata
);

  typedef enum logic [2:0] {IDLE, WR_RESP, RD_WAIT, RD_CAPTURE, RD_RESP} state_e;
  state_e state;

  always_comb begin
    s_awready = (state == IDLE) && s_awvalid && s_wvalid;
    s_wready  = s_awready;
    s_arready = (state == IDLE) && s_arvalid && !(s_awvalid && s_wvalid);
    s_bvalid  = (state == WR_RESP);
    s_bresp   = 2'b00;
    s_rvalid  = (state == RD_RESP);
    s_rresp   = 2'b00;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      csr_req <= '0;
      s_rdata <= '0;
    end else begin
      csr_req.wr <= 1'b0;
      csr_req.rd <= 1'b0;
      unique case (state)
        IDLE: begin
          if (s_awready) begin
            csr_req.wr    <= 1'b1;
            csr_req.page  <= s_awaddr[16:12];
            csr_req.inst  <= s_awaddr[11:8];
            csr_req.regno <= s_awaddr[7:2];
            csr_req.wdata <= s_wdata;
            state         <= WR_RESP;
          end else if (s_arready) begin
            csr_req.rd    <= 1'b1;
            csr_req.page  <= s_araddr[16:12];
            csr_req.inst  <= s_araddr[11:8];
            csr_req.regno <= s_araddr[7:2];
            state         <= RD_WAIT;
          end
        end
        WR_RESP:    if (s_bready) state <= IDLE;
        RD_WAIT:    state <= RD_CAPTURE;
        RD_CAPTURE: begin
          s_rdata <= csr_rdata;
          state   <= RD_RESP;
        end
        RD_RESP:    if (s_rready) state <= IDLE;
        default:    state <= IDLE;
      endcase
    end
  end

  // A CSR request is a read or a write, never both
  assert property (@(posedge clk) disable iff (!rst_n) !(csr_req.wr && csr_req.rd));
  // R data holds while the master stalls
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
