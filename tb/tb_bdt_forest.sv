// tb_bdt_forest: self-checking test of bdt_forest at its default size
// (20 trees of depth 5, 10 features).  Random feature vectors in [-3, 3)
// are applied one per cycle; each result is compared with a reference that
// walks every tree from the root and adds the leaf values.  Checks the
// 7-cycle latency and II = 1.
`timescale 1ns/1ps
module tb_bdt_forest;
  import conifer_pkg::*;

  localparam int NF = FOREST_FEATURES;
  localparam int SW = X_W + $clog2(FOREST_TREES);

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fixed_t x [NF];
  logic   out_valid;
  logic signed [SW-1:0] score;
  int checks = 0, failures = 0, cycle = 0;
  longint e;
  int     c0;

  bdt_forest dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic longint ref_forest(fixed_t v [NF]);
    longint s = 0;
    for (int t = 0; t < FOREST_TREES; t++) begin
      int n = 0;
      while (model_int(FOREST_FEATURE[t][n]) >= 0)
        n = (v[model_int(FOREST_FEATURE[t][n])] <= fixed_t'(FOREST_THRESHOLD[t][n]))
              ? model_int(FOREST_CHILD_LEFT[t][n]) : model_int(FOREST_CHILD_RIGHT[t][n]);
      s += longint'(model_int(FOREST_VALUE[t][n]));
    end
    return s;
  endfunction

  longint q [$];
  int     tq [$];

  always @(negedge clk) if (out_valid) begin
    e  = q.pop_front();
    c0 = tq.pop_front();
    checks += 2;
    if (longint'(score) != e) begin failures++; $display("FAIL score %0d expected %0d", score, e); end
    if (cycle - c0 != 7) begin failures++; $display("FAIL latency %0d", cycle - c0); end
  end

  initial begin
    fixed_t v [NF];
    for (int i = 0; i < NF; i++) x[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      for (int i = 0; i < NF; i++) v[i] = (k == 0) ? '0 : fixed_t'($urandom_range(0, 6 * 1024 - 1)) - fixed_t'(3 * 1024);
      x = v;
      in_valid = 1'b1;
      q.push_back(ref_forest(v));
      tq.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
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
