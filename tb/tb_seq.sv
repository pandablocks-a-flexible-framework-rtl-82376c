// tb_seq: self-checking test of the sequencer.
// Loads a three-frame table (immediate trigger with two repeats, a
// position-compare trigger, a bit trigger) played twice, and checks: the
// number of frames stored, that the sequencer waits on each unmet condition
// and fires on the clock after the condition appears, the exact length of
// every OUT1 phase and the minimum length of every OUT2 phase, the order of
// all output values, that ACTIVE drops at the end, and that ENABLE low aborts.
module tb_seq;
  import panda_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, bita, bitb, bitc, table_start, table_wr, active;
  logic [31:0] posa, posb, posc, table_repeats, table_wdata, table_lines, line, line_repeat;
  logic [5:0] out;
  int checks = 0, failures = 0;

  seq #(.TABLE_DEPTH(16)) dut (.clk, .rst_n, .enable, .bita, .bitb, .bitc, .posa, .posb, .posc,
    .table_repeats, .table_start, .table_wr, .table_wdata, .active, .out, .table_lines,
    .line, .line_repeat);

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

  // record runs of constant output while active
  int run_val[$], run_len[$];
  logic [5:0] cur; int len = 0; logic recording = 0;
  always @(posedge clk) begin
    #1;
    if (recording) begin
      if (out == cur) len++;
      else begin
        run_val.push_back(cur); run_len.push_back(len);
        cur = out; len = 1;
      end
    end
  end

  task automatic push_frame(input int rep, input seq_trig_e trg, input logic [5:0] o1,
                            input logic [5:0] o2, input int pos, input int t1, input int t2);
    logic [31:0] w [4];
    w[0] = {16'(rep), 4'(trg), o2, o1};
    w[1] = pos; w[2] = t1; w[3] = t2;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); table_wr = 1; table_wdata = w[k];
      @(negedge clk); table_wr = 0;
    end
  endtask

  initial begin
    int exp_val[$], exp_min[$];
    logic exact[$];
    enable = 0; bita = 0; bitb = 0; bitc = 0; posa = 50; posb = 0; posc = 0;
    table_start = 0; table_wr = 0; table_wdata = 0; table_repeats = 2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); table_start = 1; @(negedge clk); table_start = 0;
    push_frame(2, TRIG_IMMEDIATE, 6'h01, 6'h00, 0, 3, 4);
    push_frame(1, TRIG_POSA_GE,   6'h03, 6'h02, 100, 2, 5);
    push_frame(1, TRIG_BITA_1,    6'h20, 6'h10, 0, 1, 1);
    @(negedge clk);
    chk(table_lines == 3, $sformatf("table_lines=%0d", table_lines));

    cur = 0; len = 0; recording = 1;
    enable = 1;
    repeat (60) @(negedge clk);
    chk(active && line == 1 && out == 6'h00, "waiting for POSA >= 100");
    posa = 150;
    @(negedge clk);
    chk(out == 6'h03, "fires on the clock after POSA >= 100");
    repeat (30) @(negedge clk);
    chk(active && line == 2 && out == 6'h02, "waiting for BITA");
    bita = 1;
    @(negedge clk);
    chk(out == 6'h20, "fires on the clock after BITA");
    repeat (80) @(negedge clk);
    chk(!active && out == 6'h00, "done after two passes");
    recording = 0;
    run_val.push_back(cur); run_len.push_back(len);

    // expected runs: value, length, exact(1) or minimum(0)
    exp_val = '{0, 1, 0, 1, 0, 3, 2, 32, 16, 1, 0, 1, 0, 3, 2, 32, 16, 0};
    exp_min = '{1, 3, 4, 3, 4, 2, 5, 1,  1,  3, 4, 3, 4, 2, 5, 1,  1,  1};
    exact   = '{0, 1, 0, 1, 0, 1, 0, 1,  0,  1, 0, 1, 0, 1, 0, 1,  0,  0};
    chk(run_val.size() == exp_val.size(), $sformatf("runs=%0d", run_val.size()));
    for (int i = 0; i < exp_val.size() && i < run_val.size(); i++) begin
      chk(run_val[i] == exp_val[i] &&
          (exact[i] ? run_len[i] == exp_min[i] : run_len[i] >= exp_min[i]),
          $sformatf("run %0d: value %h len %0d, expected %h len %s%0d", i, run_val[i], run_len[i],
                    exp_val[i], exact[i] ? "" : ">=", exp_min[i]));
    end

    // restart, then abort with ENABLE low
    enable = 0; bita = 0; posa = 0;
    @(negedge clk); enable = 1;
    repeat (30) @(negedge clk);
    chk(active, "restarted");
    enable = 0;
    @(negedge clk);
    chk(!active && out == 0, "abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
