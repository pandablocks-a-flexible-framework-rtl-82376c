// tb_pcap: self-checking test of position capture.
// Arms the block, raises ENABLE, sends triggers with GATE high and low while
// the buses change, and drains the output stream with random back-pressure.
// Checks each sample word by word against a model built from the bus values
// at the trigger clock (timestamp, masked position words, masked bit-bus
// slices), the sample count, that gated-off triggers are ignored, that a
// trigger arriving too soon after another sets OVERFLOW and ends the
// acquisition, and that ENABLE low ends it.
module tb_pcap;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, gate, trig, arm, disarm, active, m_valid, m_ready;
  bit_bus_t bit_bus;
  pos_bus_t pos_bus;
  logic [31:0] pos_mask, status, captured, m_data;
  logic [3:0] bit_mask;
  int checks = 0, failures = 0;
  int cyc = 0, t_enable = 0;
  logic [31:0] expq[$];

  pcap #(.FIFO_DEPTH(64)) dut (.clk, .rst_n, .enable, .gate, .trig, .bit_bus, .pos_bus, .arm,
    .disarm, .pos_mask, .bit_mask, .active, .status, .captured, .m_valid, .m_ready, .m_data);

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

  // bus contents change every clock
  always @(negedge clk) begin
    for (int k = 0; k < 32; k++) pos_bus[k] = $urandom;
    bit_bus = {$urandom, $urandom, $urandom, $urandom};
  end
  always @(posedge clk) cyc <= cyc + 1;

  // stream sink with random back-pressure
  int got = 0;
  always @(posedge clk) begin
    if (m_valid && m_ready) begin
      if (expq.size() == 0) begin
        failures++; checks++; $display("FAIL unexpected word %h", m_data);
      end else begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (m_data !== e) begin failures++; $display("FAIL word %0d got %h exp %h", got, m_data, e); end
      end
      got++;
    end
  end
  always @(negedge clk) m_ready = ($urandom % 3) != 0;

  // one trigger pulse; model the sample from the bus at the sampling edge
  task automatic fire(input logic g, input logic keep = 1'b1);
    @(negedge clk); trig = 1; gate = g;
    @(posedge clk);
    if (g && keep) begin
      expq.push_back(32'(cyc - t_enable));
      for (int k = 0; k < 32; k++) if (pos_mask[k]) expq.push_back(pos_bus[k]);
      for (int k = 0; k < 4; k++)  if (bit_mask[k]) expq.push_back(bit_bus[32*k +: 32]);
    end
    @(negedge clk); trig = 0;
  endtask

  initial begin
    enable = 0; gate = 0; trig = 0; arm = 0; disarm = 0; m_ready = 0;
    pos_mask = 32'h8000_0013; bit_mask = 4'b1001;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    chk(status[0] && !active, "armed, not active");
    enable = 1;
    @(posedge clk); t_enable = cyc; // timestamp counts clocks since this edge
    @(negedge clk);
    chk(active, "active after ENABLE");
    for (int n = 0; n < 10; n++) begin
      fire((n % 3) != 2);
      repeat (40 + $urandom % 10) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d words not received", expq.size()));
    chk(captured == 7, $sformatf("captured=%0d", captured));
    // ENABLE low ends the acquisition
    enable = 0;
    repeat (2) @(negedge clk);
    chk(!active && !status[0] && !status[2], "end on ENABLE low");
    // overflow: two triggers too close together
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    enable = 1;
    @(posedge clk); t_enable = cyc;
    @(negedge clk);
    fire(1);
    fire(1, 1'b0);
    repeat (100) @(negedge clk);
    chk(status[2] && !active, "overflow on fast triggers");
    chk(expq.size() == 0, "first sample of overflow run delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
