// tb_panda_top: end-to-end test of the whole programmable logic at its
// default sizes.
//
// Everything is configured through the AXI register port, as the processor
// would. The main scenario is a snake scan: two quadrature encoders (driven by
// this testbench) feed encoder inputs 1 and 2, whose positions go over the
// position bus to sequencer 1; its table fires OUTA when encoder 1 passes
// 100 and 200 going forward and 150 coming back. OUTA drives LVDS output 1
// and triggers position capture, which records the timestamp, both encoder
// positions and bit-bus bits 63:32; the capture DMA writes the samples into
// a memory model on its AXI master port, and they are checked against the
// positions. Alongside, TTL inputs drive a LUT (A AND B), a set/reset
// gate, and a divider by 3 feeding a pulse generator, each routed to a TTL
// output and checked against a model; outenc 1 follows encoder 1 and is
// decoded back; bus contents are read back through the register page.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_panda_top;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [1:0] bresp, rresp;
  logic [5:0] ttlin_pin; logic [9:0] ttlout_pin;
  logic [1:0] lvdsin_pin, lvdsout_pin;
  logic [3:0] enc_a, enc_b, enc_z, enc_conn, oenc_a, oenc_b;
  logic awvalid_m, awready_m, wvalid_m, wready_m, wlast_m, bvalid_m, bready_m;
  logic [31:0] awaddr_m, wdata_m; logic [7:0] awlen_m; logic [2:0] awsize_m;
  logic [1:0] awburst_m, bresp_m; logic [3:0] wstrb_m;
  int checks = 0, failures = 0;

  panda_top dut (.clk, .rst_n,
    .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr), .s_wvalid(wvalid),
    .s_wready(wready), .s_wdata(wdata), .s_wstrb(4'hF), .s_bvalid(bvalid), .s_bready(bready),
    .s_bresp(bresp), .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr),
    .s_rvalid(rvalid), .s_rready(rready), .s_rdata(rdata), .s_rresp(rresp),
    .ttlin_pin, .ttlout_pin, .lvdsin_pin, .lvdsout_pin,
    .inenc_a(enc_a), .inenc_b(enc_b), .inenc_z(enc_z), .inenc_conn(enc_conn),
    .outenc_a(oenc_a), .outenc_b(oenc_b),
    .m_awvalid(awvalid_m), .m_awready(awready_m), .m_awaddr(awaddr_m), .m_awlen(awlen_m),
    .m_awsize(awsize_m), .m_awburst(awburst_m), .m_wvalid(wvalid_m), .m_wready(wready_m),
    .m_wdata(wdata_m), .m_wstrb(wstrb_m), .m_wlast(wlast_m), .m_bvalid(bvalid_m),
    .m_bready(bready_m), .m_bresp(bresp_m));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ register access
  task automatic wr(input int page, input int inst, input int r, input logic [31:0] d);
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = 32'(page << 12 | inst << 8 | r << 2); wdata = d; bready = 1;
    do @(posedge clk); while (!awready);
    #1 awvalid = 0; wvalid = 0;
    do @(posedge clk); while (!bvalid);
    #1 bready = 0;
  endtask
  task automatic rd(input int page, input int inst, input int r, output logic [31:0] d);
    @(negedge clk);
    arvalid = 1; araddr = 32'(page << 12 | inst << 8 | r << 2); rready = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    #1 rready = 0;
  endtask

  // bus line numbers at the default sizes (allocation of the top)
  localparam int ONE = 1, TTLIN0 = 2, INENC0 = 10, LUT0 = 26, SRGATE0 = 34, DIV0 = 38,
                 PULSE0 = 46, SEQ0 = 50, PCAPB = 64;

  // ------------------------------------------------------------ encoders
  int enc_pos [2] = '{0, 0};
  logic [1:0] gray [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  task automatic enc_step(input int e, input int dir);
    enc_pos[e] += dir;
    {enc_a[e], enc_b[e]} = gray[(enc_pos[e] % 4 + 4) % 4];
  endtask

  // ------------------------------------------------------------ counters
  int n_seq_fire = 0, n_lvds = 0, n_lut = 0, n_sr_set = 0, n_sr_rst = 0, n_divd = 0,
      n_pulse = 0, n_capture = 0, n_words = 0, n_oenc = 0;
  logic lvds_d = 0;
  always @(posedge clk) begin
    lvds_d <= lvdsout_pin[0];
    if (lvdsout_pin[0] && !lvds_d) n_lvds++;
  end

  // processor memory model behind the DMA's AXI master; captured words are
  // read back from it in address order: 4 words per sample (timestamp, pos1,
  // pos2, bits 63:32)
  logic [31:0] words[$];
  logic [31:0] cur_addr; int beats_left = 0, n_bursts = 0; logic in_burst = 0, resp_due = 0;
  localparam logic [31:0] DMA_BASE = 32'h0010_0000;
  always @(negedge clk) begin
    awready_m = !in_burst && !resp_due;
    wready_m  = in_burst && ($urandom % 2 == 0);
    bvalid_m  = resp_due;
    bresp_m   = 2'b00;
  end
  always @(posedge clk) if (rst_n) begin
    if (awvalid_m && awready_m) begin
      cur_addr = awaddr_m; beats_left = awlen_m + 1; in_burst = 1; n_bursts++;
    end else if (wvalid_m && wready_m && in_burst) begin
      if (cur_addr == DMA_BASE + 32'(4 * words.size())) words.push_back(wdata_m);
      else begin failures++; $display("FAIL DMA address %h", cur_addr); end
      cur_addr += 4; beats_left--;
      if (beats_left == 0) begin in_burst = 0; resp_due = 1; end
    end else if (bvalid_m && bready_m) resp_due = 0;
  end

  // outenc 1 decoded back
  int oenc_dec = 0; logic [1:0] oprev = 0;
  function automatic int ph(input logic [1:0] ab);
    case (ab) 2'b00: return 0; 2'b10: return 1; 2'b11: return 2; default: return 3; endcase
  endfunction
  always @(posedge clk) begin
    if (!rst_n) oprev <= {oenc_a[0], oenc_b[0]};
    else if ({oenc_a[0], oenc_b[0]} != oprev) begin
      int d;
      d = (ph({oenc_a[0], oenc_b[0]}) - ph(oprev) + 4) % 4;
      if (d == 1) oenc_dec <= oenc_dec + 1; else if (d == 3) oenc_dec <= oenc_dec - 1;
      n_oenc++;
      oprev <= {oenc_a[0], oenc_b[0]};
    end
  end

  // TTL side models, compared every clock: expected TTLOUT lag behind TTLIN
  localparam int LAT_LUT = 7;  // sync 2, bus 1, mux 1, lut 1, bus 1, out mux 1
  logic [5:0] tin_hist [$];
  always @(posedge clk) begin
    tin_hist.push_front(ttlin_pin);
    if (tin_hist.size() > 40) void'(tin_hist.pop_back());
  end

  initial begin
    logic [31:0] v;
    int sr_model, div_cnt, lut_err;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; wdata = 0; araddr = 0;
    ttlin_pin = 0; lvdsin_pin = 0; enc_a = 0; enc_b = 0; enc_z = 0; enc_conn = 4'hF;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // ---------------- TTL / soft-block wiring
    wr(7, 0, 0, TTLIN0 + 0); wr(7, 0, 1, TTLIN0 + 1);            // LUT1 A=TTLIN1 B=TTLIN2
    wr(7, 0, 2, 0); wr(7, 0, 3, 0); wr(7, 0, 4, 0);
    wr(7, 0, 5, 32'hFF00_0000);                                  // A AND B
    wr(2, 0, 0, LUT0);                                           // TTLOUT1 = LUT1
    wr(8, 0, 0, TTLIN0 + 2); wr(8, 0, 1, TTLIN0 + 3);            // SRGATE1 set/rst
    wr(2, 1, 0, SRGATE0);                                        // TTLOUT2 = SRGATE1
    wr(9, 0, 0, ONE); wr(9, 0, 1, TTLIN0 + 4); wr(9, 0, 2, 3);   // DIV1: enable, inp, /3
    wr(10, 0, 0, ONE); wr(10, 0, 1, DIV0); wr(10, 0, 2, 4); wr(10, 0, 3, 3); // PULSE1 from OUTD
    wr(2, 2, 0, PULSE0);                                         // TTLOUT3 = PULSE1
    wr(2, 3, 0, DIV0 + 1);                                       // TTLOUT4 = DIV1 OUTN
    repeat (10) @(negedge clk);

    // LUT check every clock against the lagged inputs; SR gate and divider by counting
    lut_err = 0; sr_model = 0; div_cnt = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] prev;
      prev = ttlin_pin;
      @(negedge clk);
      if (n % 7 == 0) ttlin_pin[1:0] = 2'($urandom);
      if (n % 11 == 0) ttlin_pin[3:2] = 2'($urandom);
      if (n % 9 == 0) ttlin_pin[4] = !ttlin_pin[4];
      if (ttlin_pin[3] && !prev[3]) begin sr_model = 0; n_sr_rst++; end
      else if (ttlin_pin[2] && !prev[2]) begin sr_model = 1; n_sr_set++; end
      if (ttlin_pin[4] && !prev[4]) div_cnt++;
      if (n > 20) begin
        logic [5:0] lagged;
        lagged = tin_hist[LAT_LUT - 1];
        if (ttlout_pin[0] !== (lagged[0] & lagged[1])) lut_err++;
        if (ttlout_pin[0]) n_lut++;
      end
    end
    chk(lut_err == 0, $sformatf("LUT output wrong on %0d clocks", lut_err));
    repeat (20) @(negedge clk);
    chk(ttlout_pin[1] == 1'(sr_model), "SRGATE state");
    rd(9, 0, 3, v);
    chk(v == 32'(div_cnt % 3), $sformatf("DIV count %0d exp %0d", v, div_cnt % 3));
    rd(10, 0, 4, v);
    chk(v == 0, "no pulse dropped");

    // ---------------- snake scan
    wr(5, 0, 0, 0); wr(5, 1, 0, 0);                               // SETP encoders to 0
    wr(11, 0, 4, 1); wr(11, 0, 5, 2);                            // SEQ1 POSA=INENC1 POSB=INENC2
    wr(11, 0, 7, 1);                                             // one pass
    wr(11, 0, 8, 0);                                             // TABLE_START
    begin
      logic [31:0] f [3][4];
      f[0] = '{{16'd1, 4'(TRIG_POSA_GE), 6'd0, 6'd1}, 100, 5, 5};
      f[1] = '{{16'd1, 4'(TRIG_POSA_GE), 6'd0, 6'd1}, 200, 5, 5};
      f[2] = '{{16'd1, 4'(TRIG_POSA_LE), 6'd0, 6'd1}, 150, 5, 5};
      for (int i = 0; i < 3; i++) for (int k = 0; k < 4; k++) wr(11, 0, 9, f[i][k]);
    end
    rd(11, 0, 10, v);
    chk(v == 3, $sformatf("SEQ table lines %0d", v));
    wr(4, 0, 0, SEQ0 + 1);                                       // LVDSOUT1 = SEQ1 OUTA
    wr(12, 0, 1, SEQ0 + 1); wr(12, 0, 2, SEQ0 + 1);             // PCAP gate/trig = OUTA
    wr(12, 0, 5, 32'h6); wr(12, 0, 6, 32'h2);                    // capture pos 1,2 and bits 63:32
    wr(12, 0, 9, DMA_BASE); wr(12, 0, 10, 4096); wr(12, 0, 11, 1); // DMA buffer, start
    wr(12, 0, 3, 1);                                             // ARM
    wr(12, 0, 0, ONE);                                           // PCAP ENABLE: start
    wr(6, 0, 0, ONE); wr(6, 0, 1, 1); wr(6, 0, 2, 2);            // OUTENC1 follows INENC1
    wr(11, 0, 0, ONE);                                           // SEQ1 ENABLE: start
    rd(12, 0, 7, v);
    chk(v[1:0] == 2'b11, $sformatf("PCAP armed and active, status %h", v));
    // raster: encoder 1 forward to 250 and back to 100, encoder 2 one row up per leg
    for (int n = 0; n < 250; n++) begin
      @(negedge clk); enc_step(0, 1); repeat (7) @(negedge clk);
    end
    for (int n = 0; n < 20; n++) begin @(negedge clk); enc_step(1, 1); repeat (7) @(negedge clk); end
    for (int n = 0; n < 150; n++) begin
      @(negedge clk); enc_step(0, -1); repeat (7) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    rd(11, 0, 11, v);
    rd(12, 0, 8, v);
    n_capture = v;
    chk(v == 3, $sformatf("PCAP captured %0d", v));
    // read back the position bus through the register page
    rd(0, 0, 4 + 1, v);
    chk(v == 32'(enc_pos[0]), $sformatf("pos bus word 1 %0d exp %0d", v, enc_pos[0]));
    rd(0, 0, 4 + 2, v);
    chk(v == 32'(enc_pos[1]), "pos bus word 2");
    rd(0, 0, 0, v);
    chk(v[ONE] && v[INENC0 + 3], "bit bus read-back (ONE, CONN)");
    chk(oenc_dec == enc_pos[0], $sformatf("outenc decoded %0d exp %0d", oenc_dec, enc_pos[0]));
    rd(11, 0, 10, v);
    // sequencer finished: ACTIVE low on the bit bus
    rd(0, 0, 1, v);
    chk(v[SEQ0 - 32] == 1'b0, "SEQ1 ACTIVE low after table");
    // stop the capture: DISARM flushes the DMA's partial burst
    rd(12, 0, 12, v);
    chk(v == 0, $sformatf("DMA holds the samples until flushed, written %0d", v));
    wr(12, 0, 4, 1);                                             // DISARM
    rd(12, 0, 7, v);
    chk(v[1:0] == 2'b00 && !v[2], $sformatf("PCAP stopped cleanly, status %h", v));
    repeat (100) @(negedge clk);
    rd(12, 0, 12, v);
    chk(v == 12, $sformatf("DMA words written %0d", v));
    rd(12, 0, 13, v);
    chk(v == 0, "DMA status");
    chk(words.size() == 12 && n_bursts == 1, $sformatf("memory words %0d bursts %0d", words.size(), n_bursts));

    // captured samples
    n_words = words.size();
    chk(n_words == 12, $sformatf("stream words %0d", n_words));
    if (n_words == 12) begin
      int thr [3] = '{100, 200, 150};
      for (int s = 0; s < 3; s++) begin
        int p1, p2;
        p1 = int'(words[4*s + 1]); p2 = int'(words[4*s + 2]);
        if (s < 2) chk(p1 >= thr[s] && p1 <= thr[s] + 1, $sformatf("sample %0d pos1=%0d", s, p1));
        else       chk(p1 <= thr[s] && p1 >= thr[s] - 1, $sformatf("sample %0d pos1=%0d", s, p1));
        chk(p2 == ((s < 2) ? 0 : 20), $sformatf("sample %0d pos2=%0d", s, p2));
        chk(words[4*s + 3][SEQ0 + 1 - 32] == 1'b1, "OUTA high in captured bits");
        if (s > 0) chk(words[4*s] > words[4*s - 4], "timestamps increase");
      end
      n_seq_fire = 3;
    end
    // ---------------- mechanism coverage
    chk(n_lut > 0, "LUT output never high");
    chk(n_sr_set > 0 && n_sr_rst > 0, "SRGATE never set/reset");
    chk(div_cnt >= 3, "DIV never divided");
    chk(n_pulse > 0, "PULSE never fired");
    chk(n_divd > 0, "DIV OUTD never fired");
    chk(n_lvds == 3, $sformatf("LVDSOUT1 pulses %0d", n_lvds));
    chk(n_oenc > 0, "OUTENC never stepped");
    $display("mechanisms: dma_bursts=%0d lut=%0d sr_set=%0d sr_rst=%0d divd=%0d pulse=%0d seq_fire=%0d lvds=%0d capture=%0d words=%0d outenc_steps=%0d",
             n_bursts, n_lut, n_sr_set, n_sr_rst, n_divd, n_pulse, n_seq_fire, n_lvds, n_capture, n_words, n_oenc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse and OUTD seen on the TTL outputs
  logic t3_d = 0, t4_d = 0;
  int since_out = 0;
  always @(posedge clk) begin
    t3_d <= ttlout_pin[2];
    if (ttlout_pin[2] && !t3_d) n_pulse++;
    if (dut.g_div[0].u_div.outd && !dut.bit_bus[DIV0]) n_divd++;
  end
endmodule
