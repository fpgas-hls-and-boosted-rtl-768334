// tb_conifer_top: end-to-end test of conifer_top with every parameter at its
// default (20-tree static forest accelerator, FPU with 200 engines of 512
// nodes).
//  1. The FPU is loaded (102,400 nodes) with the same 20 trees that are built
//     into the static forest; engines 20..199 get an empty tree (score 0).
//  2. The accelerator processes 12 samples of 10 floats from a memory model
//     with random read/write stalls.
//  3. The same samples, truncated to fixed point, are sent to the FPU; both
//     results must equal the reference (every tree walked, leaves summed)
//     and each other.
//  4. The FPU is reloaded with a different model (trees 5..19 then 0..4 of
//     the forest in engines 0..19) and re-checked: run-time reconfiguration.
// Counts each mechanism - FPU load, FPU inference, reload, read stall,
// write stall, accelerator run - and fails if one never happened.
`timescale 1ns/1ps
module tb_conifer_top;
  import conifer_pkg::*;

  localparam int NF  = FOREST_FEATURES;
  localparam int NS  = 12;
  localparam int XB  = 64, SB = 1024;
  localparam int YW  = X_W + $clog2(FPU_NTE);

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        acc_start = 1'b0;
  logic [31:0] acc_n_samples = '0, acc_x_base = XB, acc_score_base = SB;
  logic        acc_busy, acc_done;
  logic [31:0] acc_n_f, acc_n_c;
  logic        acc_rd_valid, acc_rd_ready = 1'b0;
  logic [31:0] acc_rd_addr;
  logic        acc_rsp_valid = 1'b0;
  logic [31:0] acc_rsp_data = '0;
  logic        acc_wr_valid, acc_wr_ready = 1'b0;
  logic [31:0] acc_wr_addr, acc_wr_data;
  logic        fpu_cmd_valid = 1'b0, fpu_cmd_ready;
  fpu_instr_e  fpu_cmd_instr = INSTR_LOAD;
  fixed_t      fpu_cmd_x [FPU_NVARS];
  logic        fpu_node_valid = 1'b0, fpu_node_ready;
  fpu_node_t   fpu_node_data;
  logic        fpu_load_done, fpu_y_valid, fpu_busy;
  logic signed [YW-1:0] fpu_y;

  int checks = 0, failures = 0, cycle = 0;
  int n_acc_done = 0, n_writes = 0, n_rd_stall = 0, n_wr_stall = 0;
  int n_fpu_load = 0, n_fpu_infer = 0, n_reload = 0;

  conifer_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- memory model for the accelerator ----------------
  logic [31:0] mem [2048];
  logic [31:0] rq_data [$];
  int          rq_due [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    acc_rd_ready <= ($urandom_range(0, 3) != 0);
    acc_wr_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && acc_rd_valid && !acc_rd_ready) n_rd_stall <= n_rd_stall + 1;
    if (rst_n && acc_wr_valid && !acc_wr_ready) n_wr_stall <= n_wr_stall + 1;
    if (rst_n && acc_rd_valid && acc_rd_ready) begin
      rq_data.push_back(mem[acc_rd_addr[10:0]]);
      rq_due.push_back(cycle + $urandom_range(1, 3));
    end
    if (rq_due.size() > 0 && rq_due[0] <= cycle) begin
      acc_rsp_valid <= 1'b1;
      acc_rsp_data  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end else begin
      acc_rsp_valid <= 1'b0;
    end
    if (rst_n && acc_wr_valid && acc_wr_ready) begin
      mem[acc_wr_addr[10:0]] <= acc_wr_data;
      n_writes <= n_writes + 1;
    end
    if (rst_n && acc_done) n_acc_done <= n_acc_done + 1;
    if (rst_n && fpu_load_done) n_fpu_load <= n_fpu_load + 1;
    if (rst_n && fpu_y_valid) n_fpu_infer <= n_fpu_infer + 1;
  end

  // ---------------- reference model ----------------
  function automatic logic [31:0] f32_of_scaled(longint m, int scale);  // m * 2**-scale, |m| < 2**24
    longint a;
    int     p;
    if (m == 0) return 32'd0;
    a = (m < 0) ? -m : m;
    p = 0;
    for (int i = 0; i < 63; i++) if (a >= (longint'(1) << i)) p = i;
    return {(m < 0), 8'(p - scale + 127), 23'((a << (23 - p)) & 64'h7f_ffff)};
  endfunction

  // the FPU model: engine e holds forest tree map[e] (or nothing when -1)
  int map [FPU_NTE];

  function automatic longint ref_sum(fixed_t v [FPU_NVARS], bit use_map);
    longint s = 0;
    for (int e = 0; e < FOREST_TREES; e++) begin
      int t = use_map ? map[e] : e;
      int n = 0;
      while (model_int(FOREST_FEATURE[t][n]) >= 0)
        n = (v[model_int(FOREST_FEATURE[t][n])] <= fixed_t'(FOREST_THRESHOLD[t][n]))
              ? model_int(FOREST_CHILD_LEFT[t][n]) : model_int(FOREST_CHILD_RIGHT[t][n]);
      s += longint'(model_int(FOREST_VALUE[t][n]));
    end
    return s;
  endfunction

  fixed_t samples [NS][FPU_NVARS];

  task automatic fpu_load();
    while (!fpu_cmd_ready) @(negedge clk);
    fpu_cmd_instr = INSTR_LOAD;
    fpu_cmd_valid = 1'b1;
    @(negedge clk);
    fpu_cmd_valid = 1'b0;
    for (int e = 0; e < FPU_NTE; e++)
      for (int n = 0; n < FPU_NNODES; n++) begin
        fpu_node_data = '0;
        fpu_node_data.is_leaf = 1'b1;             // empty engines and padding
        if (e < FOREST_TREES && n < FOREST_NODES) begin
          int t = map[e];
          int f = model_int(FOREST_FEATURE[t][n]);
          fpu_node_data.is_leaf     = (f < 0);
          fpu_node_data.feature     = FPU_FW'((f < 0) ? 0 : f);
          fpu_node_data.threshold   = fixed_t'(FOREST_THRESHOLD[t][n]);
          fpu_node_data.score       = (f < 0) ? fixed_t'(FOREST_VALUE[t][n]) : '0;
          fpu_node_data.child_left  = FPU_AW'((f < 0) ? 0 : model_int(FOREST_CHILD_LEFT[t][n]));
          fpu_node_data.child_right = FPU_AW'((f < 0) ? 0 : model_int(FOREST_CHILD_RIGHT[t][n]));
        end
        fpu_node_valid = 1'b1;
        @(negedge clk);
      end
    fpu_node_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic fpu_infer(int s, output longint y);
    while (!fpu_cmd_ready) @(negedge clk);
    fpu_cmd_x     = samples[s];
    fpu_cmd_instr = INSTR_INFER;
    fpu_cmd_valid = 1'b1;
    @(negedge clk);
    fpu_cmd_valid = 1'b0;
    while (!fpu_y_valid) @(negedge clk);
    y = longint'(fpu_y);
    @(negedge clk);
  endtask

  initial begin
    longint r, y;
    for (int i = 0; i < 2048; i++) mem[i] = '0;
    for (int i = 0; i < FPU_NVARS; i++) fpu_cmd_x[i] = '0;
    fpu_node_data = '0;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < FPU_NVARS; i++) begin
        // multiples of 2**-10 in [-3, 3): exact in both float and fixed point
        samples[s][i] = (i < NF) ? fixed_t'($urandom_range(0, 6 * 1024 - 1)) - fixed_t'(3 * 1024) : '0;
        if (i < NF) mem[XB + NF * s + i] = f32_of_scaled(longint'(samples[s][i]), 10);
      end
    for (int e = 0; e < FPU_NTE; e++) map[e] = (e < FOREST_TREES) ? e : -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    fpu_load();
    acc_n_samples = NS;
    acc_start = 1'b1;
    @(negedge clk);
    acc_start = 1'b0;
    while (n_acc_done < 1) @(negedge clk);
    checks++;
    if (n_writes != NS) begin failures++; $display("FAIL accelerator wrote %0d scores", n_writes); end

    for (int s = 0; s < NS; s++) begin
      r = ref_sum(samples[s], 1'b0);
      fpu_infer(s, y);
      checks += 3;
      if (y != r) begin failures++; $display("FAIL fpu sample %0d: %0d expected %0d", s, y, r); end
      if (mem[SB + s] !== f32_of_scaled(r, 10)) begin
        failures++; $display("FAIL accelerator sample %0d: %h expected %h", s, mem[SB + s], f32_of_scaled(r, 10));
      end
      if (mem[SB + s] !== f32_of_scaled(y, 10)) begin failures++; $display("FAIL designs disagree on %0d", s); end
    end

    // reconfigure the FPU with another model
    for (int e = 0; e < FOREST_TREES; e++) map[e] = (e + 5) % FOREST_TREES;
    map[3] = 0;   // tree 0 twice, tree 8 absent: a different sum
    fpu_load();
    n_reload++;
    for (int s = 0; s < NS; s++) begin
      r = ref_sum(samples[s], 1'b1);
      fpu_infer(s, y);
      checks++;
      if (y != r) begin failures++; $display("FAIL reloaded fpu sample %0d: %0d expected %0d", s, y, r); end
    end

    $display("mechanisms: fpu_load=%0d fpu_infer=%0d reload=%0d acc_runs=%0d rd_stall=%0d wr_stall=%0d",
             n_fpu_load, n_fpu_infer, n_reload, n_acc_done, n_rd_stall, n_wr_stall);
    checks += 6;
    if (n_fpu_load  != 2)      begin failures++; $display("FAIL fpu loads"); end
    if (n_fpu_infer != 2 * NS) begin failures++; $display("FAIL fpu inferences"); end
    if (n_reload    == 0)      begin failures++; $display("FAIL no reload"); end
    if (n_acc_done  != 1)      begin failures++; $display("FAIL accelerator runs"); end
    if (n_rd_stall  == 0)      begin failures++; $display("FAIL no read stall"); end
    if (n_wr_stall  == 0)      begin failures++; $display("FAIL no write stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
