// tb_csr_axi_slave: self-checking test of the AXI4-Lite to CSR bridge.
// A register-file model stands on the CSR side (read data one clock after
// the request, zero otherwise). The test issues random writes and reads with
// random valid/ready delays and checks: the page/instance/register decoded
// from the byte address, the write data, one-clock request pulses, read data
// equal to what was written, OKAY responses, the read latency, and that R
// holds while the master stalls.
module tb_csr_axi_slave;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  csr_req_t req;
  csr_data_t csr_rdata;
  logic [31:0] model [logic [14:0]];
  int checks = 0, failures = 0, req_cycles = 0;

  csr_axi_slave dut (.clk, .rst_n,
    .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr), .s_wvalid(wvalid),
    .s_wready(wready), .s_wdata(wdata), .s_wstrb(wstrb), .s_bvalid(bvalid), .s_bready(bready),
    .s_bresp(bresp), .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr),
    .s_rvalid(rvalid), .s_rready(rready), .s_rdata(rdata), .s_rresp(rresp),
    .csr_req(req), .csr_rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // CSR-side model
  logic [14:0] last_key; logic last_wr;
  always @(posedge clk) begin
    csr_rdata <= '0;
    if (req.wr || req.rd) req_cycles++;
    if (req.wr) model[{req.page, req.inst, req.regno}] = req.wdata;
    if (req.rd) csr_rdata <= model.exists({req.page, req.inst, req.regno}) ?
                             model[{req.page, req.inst, req.regno}] : 32'hDEAD_0000;
    if (req.wr) begin last_key <= {req.page, req.inst, req.regno}; last_wr <= 1; end
  end

  task automatic axi_write(input logic [31:0] addr, input logic [31:0] data);
    int n0;
    @(negedge clk);
    awvalid = 1; awaddr = addr;
    repeat ($urandom % 3) @(negedge clk);
    wvalid = 1; wdata = data;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
    n0 = req_cycles;
    bready = 0;
    repeat ($urandom % 3) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    chk(bresp == 2'b00, "bresp");
    #1 bready = 0;
    chk(req_cycles == n0 + 1, "one write request pulse");
  endtask

  task automatic axi_read(input logic [31:0] addr, output logic [31:0] data, output int lat);
    int t;
    @(negedge clk);
    arvalid = 1; araddr = addr;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    t = 0;
    rready = 0;
    while (!rvalid) begin @(posedge clk); #1 t++; end
    lat = t;
    data = rdata;
    repeat ($urandom % 4) begin
      @(posedge clk); #1;
      chk(rvalid && rdata == data, "R holds while stalled");
    end
    @(negedge clk) rready = 1;
    @(posedge clk); #1 rready = 0;
    chk(rresp == 2'b00, "rresp");
  endtask

  initial begin
    logic [31:0] got, addrs[$], vals[$];
    int lat;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; araddr = 0; wstrb = 4'hF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [31:0] a, d;
      a = {15'h4000 | 15'($urandom), 17'($urandom)} & 32'hFFFF_FFFC;  // high bits ignored
      d = $urandom;
      axi_write(a, d);
      chk(last_key == {a[16:12], a[11:8], a[7:2]}, "write address decode");
      chk(model[{a[16:12], a[11:8], a[7:2]}] == d, "write data");
      addrs.push_back(a & 32'h0001_FFFF); vals.push_back(d);
    end
    for (int n = 99; n >= 0; n--) begin
      logic dup;
      dup = 0;
      for (int m = n + 1; m < 100; m++) if (addrs[m] == addrs[n]) dup = 1;
      axi_read(addrs[n], got, lat);
      if (!dup) chk(got == vals[n], $sformatf("read %h got %h exp %h", addrs[n], got, vals[n]));
      chk(lat == 2, $sformatf("read latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
