// tb_adder_tree: self-checking test of adder_tree.  Two instances - the
// default 20 inputs (5 levels) and 7 inputs (odd counts at every level) -
// get random signed inputs every cycle, including the extreme values; each
// sum is compared with a plain software sum, and the latency (5 and 3
// cycles) and one-result-per-cycle throughput are checked.
`timescale 1ns/1ps
module tb_adder_tree;
  localparam int W = 18;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] a [20];
  logic signed [W-1:0] b [7];
  logic        va, vb;
  logic signed [W+4:0] sa;
  logic signed [W+2:0] sb;
  int checks = 0, failures = 0, cycle = 0;

  adder_tree u_a (.clk, .rst_n, .in_valid, .in_data(a), .out_valid(va), .sum(sa));
  adder_tree #(.N_IN(7), .IN_W(W)) u_b (.clk, .rst_n, .in_valid, .in_data(b), .out_valid(vb), .sum(sb));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  longint qa [$], qb [$];
  longint s1, s2, e;
  logic signed [W-1:0] r;
  int     ta [$], tb_ [$];

  always @(negedge clk) begin
    if (va) begin
      checks += 2;
      if (longint'(sa) != qa.pop_front()) begin failures++; $display("FAIL sum20"); end
      if (cycle - ta.pop_front() != 5) begin failures++; $display("FAIL latency20"); end
    end
    if (vb) begin
      checks += 2;
      begin e = qb.pop_front(); if (longint'(sb) != e) begin failures++; $display("FAIL sum7 %0d %0d", sb, e); end end
      if (cycle - tb_.pop_front() != 3) begin failures++; $display("FAIL latency7"); end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      s1 = 0;
      s2 = 0;
      for (int i = 0; i < 20; i++) begin
        r = (k == 0) ? {1'b0, {(W-1){1'b1}}} : (k == 1) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
        a[i] = r;
        s1 = s1 + longint'(r);
      end
      for (int i = 0; i < 7; i++) begin
        r = (k == 1) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
        b[i] = r;
        s2 = s2 + longint'(r);
      end
      in_valid = 1'b1;
      qa.push_back(s1); ta.push_back(cycle);
      qb.push_back(s2); tb_.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
