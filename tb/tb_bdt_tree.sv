// tb_bdt_tree: self-checking test of bdt_tree with its default 7-node tree.
// Applies the worked example x = [-, 12, -, -, 3, -, -, 5] (expected leaf
// value 0.4) and 330 random vectors (a third of them with features placed
// exactly on thresholds), one per cycle, and compares every score
// with a reference that walks the tree from the root.  Also checks the
// 2-cycle latency and II = 1 (back-to-back inputs).
`timescale 1ns/1ps
module tb_bdt_tree;
  import conifer_pkg::*;

  localparam int NF = TREE7_FEATURES;
  localparam int N  = 330;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid = 1'b0;
  fixed_t x [NF];
  logic   out_valid;
  fixed_t score;

  int checks = 0, failures = 0;

  bdt_tree dut (.*);

  always #5 clk = ~clk;

  // reference: walk from the root
  function automatic fixed_t walk(fixed_t v [NF]);
    int n = 0;
    while (model_int(TREE7_FEATURE[n]) >= 0)
      n = (v[model_int(TREE7_FEATURE[n])] <= fixed_t'(TREE7_THRESHOLD[n])) ? model_int(TREE7_CHILD_LEFT[n])
                                                                       : model_int(TREE7_CHILD_RIGHT[n]);
    return fixed_t'(TREE7_VALUE[n]);
  endfunction

  fixed_t exp_q [$];
  int     sent_cycle [$];
  int     cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // outputs are sampled, and inputs driven, on the falling edge
  always @(negedge clk) if (out_valid) begin
    fixed_t e;
    int     c0;
    e  = exp_q.pop_front();
    c0 = sent_cycle.pop_front();
    checks++;
    if (score !== e) begin
      failures++;
      $display("FAIL score %0d expected %0d", score, e);
    end
    checks++;
    if (cycle - c0 != 2) begin
      failures++;
      $display("FAIL latency %0d", cycle - c0);
    end
  end

  initial begin
    for (int i = 0; i < NF; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      fixed_t v [NF];
      for (int i = 0; i < NF; i++) v[i] = fixed_t'($urandom_range(0, 24 * 1024)) - fixed_t'(6 * 1024);
      if (k == 0) begin   // the worked example: x1 = 12, x4 = 3, x7 = 5
        v[1] = 12 * 1024; v[4] = 3 * 1024; v[7] = 5 * 1024;
      end
      if (k == 1) begin   // on the thresholds (<= is true): x4 = 7, x7 = 2 -> leaf 3
        v[4] = 7 * 1024; v[7] = 2 * 1024;
      end
      if (k % 3 == 2)     // put features exactly on their thresholds half of the time
        for (int n = 0; n < TREE7_NODES; n++)
          if (model_int(TREE7_FEATURE[n]) >= 0 && $urandom_range(0, 1) == 1)
            v[model_int(TREE7_FEATURE[n])] = fixed_t'(TREE7_THRESHOLD[n]);
      x        = v;
      in_valid = 1'b1;
      exp_q.push_back(walk(v));
      sent_cycle.push_back(cycle);
      if (k == 0) begin
        checks++;
        if (walk(v) != fixed_t'(410)) begin failures++; $display("FAIL reference example"); end
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
