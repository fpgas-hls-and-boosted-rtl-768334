// tb_tree_engine: self-checking test of tree_engine (default 512-word node
// memory, 16 features).  Loads the 49-node depth-5 example tree through the
// write port, runs 200 inferences on random feature vectors and compares
// the score with a reference walk.  Checks the cycle count from start to
// done, 3 cycles per inner node on the path plus 2 for the leaf, and the
// reported number of steps.  Then reloads a different tree (the 7-node
// example) into the same memory and checks that it is used.
`timescale 1ns/1ps
module tb_tree_engine;
  import conifer_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              wr_en = 1'b0;
  logic [FPU_AW-1:0] wr_addr = '0;
  fpu_node_t         wr_node;
  logic              start = 1'b0;
  fixed_t            x [FPU_NVARS];
  logic              busy, done;
  fixed_t            y;
  logic [FPU_AW-1:0] steps;
  int checks = 0, failures = 0;

  tree_engine dut (.*);

  always #5 clk = ~clk;

  // model held by the testbench: feature/threshold/children/value per node
  int m_feat [64], m_thr [64], m_cl [64], m_cr [64], m_val [64];
  int m_n;

  task automatic load_model();
    for (int n = 0; n < m_n; n++) begin
      wr_node.is_leaf     = (m_feat[n] < 0);
      wr_node.feature     = FPU_FW'((m_feat[n] < 0) ? 0 : m_feat[n]);
      wr_node.threshold   = fixed_t'(m_thr[n]);
      wr_node.score       = fixed_t'(m_val[n]);
      wr_node.child_left  = FPU_AW'((m_cl[n] < 0) ? 0 : m_cl[n]);
      wr_node.child_right = FPU_AW'((m_cr[n] < 0) ? 0 : m_cr[n]);
      wr_addr = FPU_AW'(n);
      wr_en   = 1'b1;
      @(negedge clk);
    end
    wr_en = 1'b0;
  endtask

  task automatic run_one(int k);
    int n, d, cyc;
    for (int i = 0; i < FPU_NVARS; i++) x[i] = fixed_t'($urandom_range(0, 6 * 1024 - 1)) - fixed_t'(3 * 1024);
    n = 0; d = 0;
    while (m_feat[n] >= 0) begin
      n = (x[m_feat[n]] <= fixed_t'(m_thr[n])) ? m_cl[n] : m_cr[n];
      d++;
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks += 3;
    if (y !== fixed_t'(m_val[n])) begin failures++; $display("FAIL %0d y=%0d expected %0d", k, y, m_val[n]); end
    // cyc counts falling edges from the one after the edge that samples start
    if (cyc - 1 != 3 * d + 2) begin failures++; $display("FAIL %0d cycles=%0d expected %0d", k, cyc - 1, 3 * d + 2); end
    if (int'(steps) != d) begin failures++; $display("FAIL %0d steps=%0d expected %0d", k, steps, d); end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < FPU_NVARS; i++) x[i] = '0;
    wr_node = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 49-node example tree
    m_n = EX_NODES;
    for (int n = 0; n < EX_NODES; n++) begin
      m_feat[n] = EX_FEATURE[n]; m_thr[n] = EX_THRESHOLD[n]; m_val[n] = EX_VALUE[n];
      m_cl[n] = ex_child(n, 1'b0); m_cr[n] = ex_child(n, 1'b1);
    end
    load_model();
    for (int k = 0; k < 200; k++) run_one(k);
    // 7-node example tree, loaded over the first 7 words
    m_n = TREE7_NODES;
    for (int n = 0; n < TREE7_NODES; n++) begin
      m_feat[n] = model_int(TREE7_FEATURE[n]); m_thr[n] = model_int(TREE7_THRESHOLD[n]);
      m_val[n]  = model_int(TREE7_VALUE[n]);
      m_cl[n] = model_int(TREE7_CHILD_LEFT[n]); m_cr[n] = model_int(TREE7_CHILD_RIGHT[n]);
    end
    load_model();
    for (int k = 0; k < 50; k++) run_one(1000 + k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
