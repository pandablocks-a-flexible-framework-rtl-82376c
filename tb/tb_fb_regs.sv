// tb_fb_regs: self-checking test of the block control module.
// Uses 4 instances of 8 registers on page 3 with registers 6 and 7 read-only.
// Checks write/read-back against a reference model, the write strobe, status
// reads, that writes to read-only registers, to other pages and to
// out-of-range instances or registers are ignored, and that read data is zero
// when not addressed.
module tb_fb_regs;
  import panda_pkg::*;
  localparam int NI = 4, NR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  csr_req_t req;
  csr_data_t rdata;
  logic [NI-1:0][NR-1:0][31:0] regs, status;
  logic [NI-1:0][NR-1:0]       wstb;
  logic [31:0] model [NI][NR];
  int checks = 0, failures = 0;

  fb_regs #(.PAGE(5'd3), .NUM_INST(NI), .NUM_REGS(NR), .RO_MASK(64'hC0)) dut (
    .clk, .rst_n, .req, .rdata, .regs, .wstb, .status);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic access(input logic wr, input logic [4:0] page, input logic [3:0] inst,
                        input logic [5:0] r, input logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    req = '{wr: wr, rd: !wr, page: page, inst: inst, regno: r, wdata: d};
    @(negedge clk);
    req = '0;
    rd = rdata;
  endtask

  initial begin
    logic [31:0] rd;
    req = '0;
    for (int i = 0; i < NI; i++) for (int r = 0; r < NR; r++) begin
      model[i][r] = (r >= 6) ? 32'hA000_0000 + 32'(i * 16 + r) : 32'd0;
      status[i][r] = 32'hA000_0000 + 32'(i * 16 + r);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [4:0] pg; logic [3:0] in; logic [5:0] r; logic [31:0] d; logic wr;
      pg = ($urandom % 4 == 0) ? 5'($urandom) : 5'd3;
      in = ($urandom % 8 == 0) ? 4'($urandom) : 4'($urandom % NI);
      r  = ($urandom % 8 == 0) ? 6'($urandom) : 6'($urandom % NR);
      d  = $urandom;
      wr = $urandom % 2;
      access(wr, pg, in, r, d, rd);
      if (wr) begin
        logic hit;
        hit = pg == 5'd3 && in < NI && r < NR && r < 6;
        if (hit) model[in][r] = d;
        // strobe is visible during the clock after the request
        chk(hit ? (wstb[in][r] === 1'b1 && $countones(wstb) == 1) : (wstb === '0), "wstb");
        chk(rd === 32'd0, "rdata zero after write");
      end else begin
        logic [31:0] exp;
        exp = (pg == 5'd3 && in < NI && r < NR) ? model[in][r] : 32'd0;
        chk(rd === exp, $sformatf("read p%0d i%0d r%0d got %h exp %h", pg, in, r, rd, exp));
      end
    end
    for (int i = 0; i < NI; i++) for (int r = 0; r < 6; r++)
      chk(regs[i][r] === model[i][r], "regs output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
