// tb_fpu: self-checking test of the Forest Processing Unit at reduced size
// (NTE = 6 tree engines, 64-word node memories).  It loads a model through
// the LOAD instruction - the depth-5 example tree, the 7-node example tree,
// three trees of the default static forest and one empty engine (root leaf
// of score 0) - with gaps in the node stream, then issues 60 INFER
// instructions with random features and compares y with a reference that
// walks every tree and sums the leaves.  Checks the INFER latency
// (5 + 3*deepest path + ceil(log2 NTE) cycles), the load_done pulse, and that
// a second LOAD of a different model replaces the first.
`timescale 1ns/1ps
module tb_fpu;
  import conifer_pkg::*;

  localparam int NTE = 6, NN = 64, NV = FPU_NVARS;
  localparam int YW  = X_W + $clog2(NTE);

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cmd_valid = 1'b0, cmd_ready;
  fpu_instr_e cmd_instr = INSTR_LOAD;
  fixed_t     cmd_x [NV];
  logic       node_valid = 1'b0, node_ready;
  fpu_node_t  node_data;
  logic       load_done, y_valid, busy;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0, n_load_done = 0;

  fpu #(.NTE(NTE), .NNODES(NN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && load_done) n_load_done++;

  int m_feat [NTE][NN], m_thr [NTE][NN], m_cl [NTE][NN], m_cr [NTE][NN], m_val [NTE][NN];

  task automatic clear_models();
    for (int t = 0; t < NTE; t++)
      for (int n = 0; n < NN; n++) begin
        m_feat[t][n] = -2; m_thr[t][n] = 0; m_cl[t][n] = -2; m_cr[t][n] = -2; m_val[t][n] = 0;
      end
  endtask

  task automatic set_models(int variant);
    clear_models();
    for (int n = 0; n < EX_NODES; n++) begin
      m_feat[0][n] = EX_FEATURE[n]; m_thr[0][n] = EX_THRESHOLD[n]; m_val[0][n] = EX_VALUE[n];
      m_cl[0][n] = ex_child(n, 1'b0); m_cr[0][n] = ex_child(n, 1'b1);
    end
    for (int n = 0; n < TREE7_NODES; n++) begin
      m_feat[1][n] = model_int(TREE7_FEATURE[n]); m_thr[1][n] = model_int(TREE7_THRESHOLD[n]);
      m_val[1][n]  = model_int(TREE7_VALUE[n]);
      m_cl[1][n] = model_int(TREE7_CHILD_LEFT[n]); m_cr[1][n] = model_int(TREE7_CHILD_RIGHT[n]);
    end
    for (int t = 2; t < NTE - 1; t++)
      for (int n = 0; n < FOREST_NODES; n++) begin
        int s = t + variant;
        m_feat[t][n] = model_int(FOREST_FEATURE[s][n]); m_thr[t][n] = model_int(FOREST_THRESHOLD[s][n]);
        m_val[t][n]  = model_int(FOREST_VALUE[s][n]);
        m_cl[t][n] = model_int(FOREST_CHILD_LEFT[s][n]); m_cr[t][n] = model_int(FOREST_CHILD_RIGHT[s][n]);
      end
    // engine NTE-1 stays empty: a root leaf of score 0
  endtask

  task automatic do_load();
    int n_before;
    n_before = n_load_done;
    cmd_instr = INSTR_LOAD;
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1;
    @(negedge clk);                         // taken on this rising edge
    cmd_valid = 1'b0;
    for (int t = 0; t < NTE; t++)
      for (int n = 0; n < NN; n++) begin
        while ($urandom_range(0, 3) == 0) begin node_valid = 1'b0; @(negedge clk); end
        node_data.is_leaf     = (m_feat[t][n] < 0);
        node_data.feature     = FPU_FW'((m_feat[t][n] < 0) ? 0 : m_feat[t][n]);
        node_data.threshold   = fixed_t'(m_thr[t][n]);
        node_data.score       = fixed_t'(m_val[t][n]);
        node_data.child_left  = FPU_AW'((m_cl[t][n] < 0) ? 0 : m_cl[t][n]);
        node_data.child_right = FPU_AW'((m_cr[t][n] < 0) ? 0 : m_cr[t][n]);
        node_valid = 1'b1;
        checks++;
        if (!node_ready) begin failures++; $display("FAIL node not accepted"); end
        @(negedge clk);
      end
    node_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_load_done != n_before + 1 || busy) begin failures++; $display("FAIL load_done"); end
  endtask

  task automatic do_infer(int k);
    longint s;
    int dmax, cyc;
    for (int i = 0; i < NV; i++) cmd_x[i] = fixed_t'($urandom_range(0, 6 * 1024 - 1)) - fixed_t'(3 * 1024);
    s = 0; dmax = 0;
    for (int t = 0; t < NTE; t++) begin
      int n = 0, d = 0;
      while (m_feat[t][n] >= 0) begin
        n = (cmd_x[m_feat[t][n]] <= fixed_t'(m_thr[t][n])) ? m_cl[t][n] : m_cr[t][n];
        d++;
      end
      s += longint'(m_val[t][n]);
      if (d > dmax) dmax = d;
    end
    cmd_instr = INSTR_INFER;
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    cyc = 1;
    while (!y_valid && cyc < 200) begin @(negedge clk); cyc++; end
    checks += 2;
    if (longint'(y) != s) begin failures++; $display("FAIL %0d y=%0d expected %0d", k, y, s); end
    // cyc counts falling edges from the one after the edge that takes the command
    if (cyc - 1 != 5 + 3 * dmax + $clog2(NTE)) begin
      failures++; $display("FAIL %0d latency %0d expected %0d", k, cyc - 1, 5 + 3 * dmax + $clog2(NTE));
    end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < NV; i++) cmd_x[i] = '0;
    node_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    set_models(0);
    do_load();
    for (int k = 0; k < 60; k++) do_infer(k);
    set_models(5);
    do_load();
    for (int k = 0; k < 30; k++) do_infer(100 + k);
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
