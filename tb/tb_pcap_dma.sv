// tb_pcap_dma: self-checking test of the capture DMA engine.
// A stream source sends numbered words with random gaps; an AXI memory model
// with random AWREADY/WREADY/BVALID delays stores the bursts. Checks: memory
// holds every word in order from the base address, bursts are full length
// except the flushed tail, AWSIZE/AWBURST/WLAST are right, WRITTEN counts the
// words, the engine stops at the buffer size (FULL) and an error response
// sets ERROR.
module tb_pcap_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, flush, full, error, s_valid, s_ready;
  logic [31:0] base_addr, buf_words, written, s_data;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [31:0] awaddr, wdata;
  logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst, bresp;
  logic [3:0] wstrb;
  int checks = 0, failures = 0;
  logic [31:0] mem [int];
  int bursts[$];
  logic force_err = 0;

  pcap_dma #(.BURST_LEN(16)) dut (.clk, .rst_n, .start, .base_addr, .buf_words, .flush,
    .written, .full, .error, .s_valid, .s_ready, .s_data,
    .m_awvalid(awvalid), .m_awready(awready), .m_awaddr(awaddr), .m_awlen(awlen),
    .m_awsize(awsize), .m_awburst(awburst), .m_wvalid(wvalid), .m_wready(wready),
    .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_bvalid(bvalid), .m_bready(bready),
    .m_bresp(bresp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // AXI memory model: one burst at a time
  logic [31:0] cur_addr; int beats_left = 0, blen = 0; logic in_burst = 0, resp_due = 0;
  always @(negedge clk) begin
    awready = !in_burst && !resp_due && ($urandom % 3 == 0);
    wready  = in_burst && ($urandom % 2 == 0);
    bvalid  = resp_due && ($urandom % 2 == 0);
    bresp   = force_err ? 2'b10 : 2'b00;
  end
  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) begin
      cur_addr = awaddr; blen = awlen + 1; beats_left = blen; in_burst = 1;
      bursts.push_back(blen);
      chk(awsize == 3'd2 && awburst == 2'b01, "AWSIZE/AWBURST");
    end else if (wvalid && wready && in_burst) begin
      mem[cur_addr] = wdata;
      cur_addr += 4; beats_left--;
      chk(wlast == (beats_left == 0) && wstrb == 4'hF, "WLAST/WSTRB");
      if (beats_left == 0) begin in_burst = 0; resp_due = 1; end
    end else if (bvalid && bready) resp_due = 0;
  end

  // stream source
  int sent = 0, to_send = 0;
  always @(negedge clk) begin
    if (s_valid && !s_ready) ;            // hold
    else begin
      s_valid = (sent < to_send) && ($urandom % 4 != 0);
      s_data = 32'hC0DE_0000 + 32'(sent);
    end
  end
  always @(posedge clk) if (s_valid && s_ready) sent++;

  initial begin
    s_valid = 0; s_data = 0; start = 0; flush = 0; base_addr = 0; buf_words = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // run 1: 100 words into a 1000-word buffer at 0x1000, then flush
    base_addr = 32'h1000; buf_words = 1000;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    to_send = 100;
    wait (sent == 100);
    repeat (5) @(negedge clk);
    flush = 1; @(negedge clk) flush = 0;
    repeat (300) @(negedge clk);
    chk(written == 100, $sformatf("written=%0d", written));
    for (int i = 0; i < 100; i++)
      chk(mem.exists(32'h1000 + 4*i) && mem[32'h1000 + 4*i] == 32'hC0DE_0000 + 32'(i),
          $sformatf("word %0d", i));
    chk(bursts.size() == 7, $sformatf("bursts=%0d", bursts.size()));
    for (int i = 0; i < bursts.size(); i++)
      chk(bursts[i] == ((i < 6) ? 16 : 4), $sformatf("burst %0d len %0d", i, bursts[i]));
    chk(!full && !error, "not full, no error");
    // run 2: buffer of 40 words, 60 offered: stops at 40
    base_addr = 32'h8000; buf_words = 40;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    sent = 0; to_send = 60;
    repeat (600) @(negedge clk);
    chk(full && sent == 40 && written == 40, $sformatf("full=%b sent=%0d written=%0d", full, sent, written));
    chk(mem[32'h8000 + 4*39] == 32'hC0DE_0000 + 39 && !mem.exists(32'h8000 + 4*40), "stops at buffer end");
    // run 3: error response
    force_err = 1; base_addr = 32'h9000; buf_words = 100;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    sent = 0; to_send = 16;
    repeat (300) @(negedge clk);
    chk(error, "error response flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
