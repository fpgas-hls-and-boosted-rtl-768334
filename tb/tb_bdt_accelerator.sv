// tb_bdt_accelerator: self-checking test of bdt_accelerator with the default
// 20-tree forest.  A memory model in the testbench holds 40 samples of 10
// random floats in [-3, 3) and answers reads after 1-3 cycles, in order,
// with random read and write stalls.  Every score written back is checked
// (address and float value) against a reference: each float truncated
// towards minus infinity to a multiple of 2**-10, every tree walked from the
// root, leaf values summed and converted back to a float.  Also checks n_f,
// n_c, the done pulse and a run with zero samples.
`timescale 1ns/1ps
module tb_bdt_accelerator;
  import conifer_pkg::*;

  localparam int NF = FOREST_FEATURES;
  localparam int NS = 40;
  localparam int XB = 100, SB = 2000;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] n_samples = '0, x_base = XB, score_base = SB;
  logic        busy, done;
  logic [31:0] n_f, n_c;
  logic        rd_valid, rd_ready = 1'b0;
  logic [31:0] rd_addr;
  logic        rsp_valid = 1'b0;
  logic [31:0] rsp_data = '0;
  logic        wr_valid, wr_ready = 1'b0;
  logic [31:0] wr_addr, wr_data;
  int checks = 0, failures = 0, n_done = 0, n_writes = 0;

  bdt_accelerator dut (.*);

  always #5 clk = ~clk;

  logic [31:0] mem [4096];
  logic [31:0] rq_data [$];
  int          rq_due [$];
  int          cycle = 0;

  // memory model
  always @(posedge clk) begin
    cycle <= cycle + 1;
    rd_ready <= ($urandom_range(0, 3) != 0);
    wr_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && rd_valid && rd_ready) begin
      rq_data.push_back(mem[rd_addr[11:0]]);
      rq_due.push_back(cycle + $urandom_range(1, 3));
    end
    if (rq_due.size() > 0 && rq_due[0] <= cycle) begin
      rsp_valid <= 1'b1;
      rsp_data  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end else begin
      rsp_valid <= 1'b0;
    end
    if (rst_n && wr_valid && wr_ready) begin
      mem[wr_addr[11:0]] <= wr_data;
      n_writes <= n_writes + 1;
    end
    if (rst_n && done) n_done <= n_done + 1;
  end

  // IEEE-754 single precision helpers (the simulator's shortreal is 64-bit)
  function automatic logic [31:0] f32_of_scaled(longint m, int scale);  // m * 2**-scale, |m| < 2**24
    longint a;
    int     p;
    if (m == 0) return 32'd0;
    a = (m < 0) ? -m : m;
    p = 0;
    for (int i = 0; i < 63; i++) if (a >= (longint'(1) << i)) p = i;
    return {(m < 0), 8'(p - scale + 127), 23'((a << (23 - p)) & 64'h7f_ffff)};
  endfunction

  function automatic real f32_to_real(logic [31:0] b);
    real v;
    int  e;
    if (b[30:23] == 0) return 0.0;
    e = int'(b[30:23]) - 127;
    v = 1.0 + real'(b[22:0]) / 8388608.0;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return b[31] ? -v : v;
  endfunction

  function automatic logic [31:0] expected(int s);
    fixed_t v [NF];
    longint sum = 0;
    for (int i = 0; i < NF; i++)
      v[i] = fixed_t'($rtoi($floor(f32_to_real(mem[XB + NF * s + i]) * 1024.0)));
    for (int t = 0; t < FOREST_TREES; t++) begin
      int n = 0;
      while (model_int(FOREST_FEATURE[t][n]) >= 0)
        n = (v[model_int(FOREST_FEATURE[t][n])] <= fixed_t'(FOREST_THRESHOLD[t][n]))
              ? model_int(FOREST_CHILD_LEFT[t][n]) : model_int(FOREST_CHILD_RIGHT[t][n]);
      sum += longint'(model_int(FOREST_VALUE[t][n]));
    end
    return f32_of_scaled(sum, 10);
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    for (int i = 0; i < NS * NF; i++) begin
      // multiples of 2**-20 in [-3, 3): finer than the datapath, so truncation matters
      mem[XB + i] = f32_of_scaled(longint'($urandom_range(0, 6 * 1048576 - 1)) - 3 * 1048576, 20);
    end
    mem[XB] = 32'h0; // an exact zero
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks += 2;
    if (n_f != 32'(NF)) begin failures++; $display("FAIL n_f"); end
    if (n_c != 32'd1)   begin failures++; $display("FAIL n_c"); end
    // zero samples: immediate done
    start = 1'b1; n_samples = 0;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    checks++;
    if (n_done != 1 || busy) begin failures++; $display("FAIL zero-sample run"); end
    // full run
    start = 1'b1; n_samples = NS;
    @(negedge clk);
    start = 1'b0;
    while (n_done < 2) @(negedge clk);
    checks++;
    if (n_writes != NS) begin failures++; $display("FAIL %0d writes", n_writes); end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (mem[SB + s] !== expected(s)) begin
        failures++;
        $display("FAIL sample %0d: %h expected %h", s, mem[SB + s], expected(s));
      end
    end
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
