// bdt_forest: static (model-specific) boosted-decision-tree ensemble.
//
// All N_TREES trees (bdt_tree) see the same feature vector and are evaluated
// in parallel; their scores are summed in pairs by a pipelined adder tree
// (adder_tree).  The model - every threshold, feature index, child index and
// leaf value - is a set of module parameters, so it is "baked into" the
// logic: changing the model means re-synthesising.
//
// Interface: in_valid/x in, out_valid/score out, no back-pressure.
// Timing: latency 2 + ceil(log2(N_TREES)) cycles (7 for the default 20
// trees), initiation interval 1.  Every tree is padded to N_NODES nodes
// (unused nodes are never reached).
//
// Following the conifer reference design: parallel trees, pairwise summation, 20 trees
// of depth 5 with a 7-cycle latency.  The number format and the default
// model contents other than tree 0 (the depth-5 example tree) are this
// design's choice, see conifer_pkg.
module bdt_forest
  import conifer_pkg::*;
#(
  parameter int N_FEATURES = FOREST_FEATURES,
  parameter int N_TREES    = FOREST_TREES,
  parameter int N_NODES    = FOREST_NODES,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] FEATURE     = FOREST_FEATURE,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] THRESHOLD   = FOREST_THRESHOLD,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] CHILD_LEFT  = FOREST_CHILD_LEFT,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] CHILD_RIGHT = FOREST_CHILD_RIGHT,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] VALUE       = FOREST_VALUE,
  parameter int SCORE_W    = X_W + ((N_TREES > 1) ? $clog2(N_TREES) : 0),
  parameter int LATENCY    = 2 + ((N_TREES > 1) ? $clog2(N_TREES) : 0)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  fixed_t                    x [N_FEATURES],
  output logic                      out_valid,
  output logic signed [SCORE_W-1:0] score
);

  fixed_t             tree_score [N_TREES];
  logic [N_TREES-1:0] tree_valid;

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    bdt_tree #(
      .N_FEATURES  (N_FEATURES),
      .N_NODES     (N_NODES),
      .FEATURE     (FEATURE[t]),
      .THRESHOLD   (THRESHOLD[t]),
      .CHILD_LEFT  (CHILD_LEFT[t]),
      .CHILD_RIGHT (CHILD_RIGHT[t]),
      .VALUE       (VALUE[t])
    ) u_tree (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .x         (x),
      .out_valid (tree_valid[t]),
      .score     (tree_score[t])
    );
  end

  adder_tree #(
    .N_IN  (N_TREES),
    .IN_W  (X_W),
    .OUT_W (SCORE_W)
  ) u_sum (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tree_valid[0]),
    .in_data   (tree_score),
    .out_valid (out_valid),
    .sum       (score)
  );

  // all trees share one schedule
  a_trees_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    (tree_valid == '0) || (tree_valid == '1))
    else $error("bdt_forest: trees out of step");

endmodule
