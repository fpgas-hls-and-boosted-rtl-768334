// bdt_tree: one decision tree of a static (model-specific) BDT, evaluated by
// "inverting the problem": instead of walking from the root to a leaf, every
// node asks whether the decision path reaches it.
//
// How it works
//   Stage 1 (registered): every inner node compares its feature with its
//     threshold at the same time,  cmp[i] = x[FEATURE[i]] <= THRESHOLD[i].
//     Thresholds are constants, so each comparator is specialised for its
//     value.
//   Stage 2 (registered): node activations are formed from the root down
//     (act[0] = 1; a left child is active when its parent is active and the
//     parent's comparison is true, a right child when it is false).  Exactly
//     one leaf ends up active; its constant VALUE is selected by an AND-OR
//     of the one-hot leaf activations and registered as the tree score.
//   Nodes that no other node points to (padding) are never active.
//
// Interface: in_valid/x in, out_valid/score out, no back-pressure.
// Timing: latency 2 clock cycles, a new input can be accepted every cycle
// (II = 1).  Only the valid bits are reset (synchronous, active low).
//
// The tree arrays use the flat layout of conifer_pkg (feature / threshold /
// child_left / child_right / value per node, -2 for a leaf).  The parallel
// compare, activation cascade and leaf select follow the conifer reference design; the
// placement of the two pipeline registers is this design's choice, made so
// that a 20-tree forest of depth 5 has the 7-cycle latency reported for it.
// Defaults: the 7-node example tree (x4 <= 7, x7 <= 2, x1 <= 9 at the inner
// nodes, leaf values 0.5, 0.4, -0.5, -1).
module bdt_tree
  import conifer_pkg::*;
#(
  parameter int N_FEATURES = TREE7_FEATURES,
  parameter int N_NODES    = TREE7_NODES,
  parameter logic signed [0:N_NODES-1][MODEL_W-1:0] FEATURE     = TREE7_FEATURE,
  parameter logic signed [0:N_NODES-1][MODEL_W-1:0] THRESHOLD   = TREE7_THRESHOLD,
  parameter logic signed [0:N_NODES-1][MODEL_W-1:0] CHILD_LEFT  = TREE7_CHILD_LEFT,
  parameter logic signed [0:N_NODES-1][MODEL_W-1:0] CHILD_RIGHT = TREE7_CHILD_RIGHT,
  parameter logic signed [0:N_NODES-1][MODEL_W-1:0] VALUE       = TREE7_VALUE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fixed_t x [N_FEATURES],
  output logic   out_valid,
  output fixed_t score
);

  // parent of node i, -1 when no node points to it (root or padding)
  function automatic int parent_of(int i);
    for (int p = 0; p < N_NODES; p++)
      if (model_int(CHILD_LEFT[p]) == i || model_int(CHILD_RIGHT[p]) == i) return p;
    return -1;
  endfunction

  function automatic bit is_leaf(int i);
    return model_int(FEATURE[i]) < 0;
  endfunction

  // ---------------- stage 1: all comparisons in parallel ----------------
  logic [N_NODES-1:0] cmp_q;
  logic               v1_q;

  for (genvar i = 0; i < N_NODES; i++) begin : g_cmp
    if (!is_leaf(i)) begin : g_inner
      localparam int F = model_int(FEATURE[i]);
      localparam fixed_t T = fixed_t'(THRESHOLD[i]);
      always_ff @(posedge clk) cmp_q[i] <= (x[F] <= T);
    end else begin : g_leaf
      // leaves do no comparison
      always_ff @(posedge clk) cmp_q[i] <= 1'b1;
    end
  end

  // ---------------- stage 2: activation cascade and leaf select ----------------
  logic [N_NODES-1:0] act;

  for (genvar i = 0; i < N_NODES; i++) begin : g_act
    localparam int P  = parent_of(i);
    localparam int PS = (P < 0) ? 0 : P;   // in-range index for the unused branches
    if (i == 0) begin : g_root
      assign act[i] = 1'b1;
    end else if (P < 0) begin : g_orphan
      assign act[i] = 1'b0;
    end else if (model_int(CHILD_LEFT[PS]) == i) begin : g_left
      assign act[i] = act[PS] & cmp_q[PS];
    end else begin : g_right
      assign act[i] = act[PS] & ~cmp_q[PS];
    end
  end

  fixed_t leaf_sel;
  always_comb begin
    leaf_sel = '0;
    for (int i = 0; i < N_NODES; i++)
      if (is_leaf(i) && act[i]) leaf_sel |= fixed_t'(VALUE[i]);
  end

  always_ff @(posedge clk) score <= leaf_sel;

  always_ff @(posedge clk)
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end

  // exactly one leaf is reached for every valid input
  property p_one_leaf;
    @(posedge clk) disable iff (!rst_n) v1_q |-> $onehot(act & leaf_mask());
  endproperty
  function automatic logic [N_NODES-1:0] leaf_mask();
    logic [N_NODES-1:0] m;
    for (int i = 0; i < N_NODES; i++) m[i] = is_leaf(i) && (i == 0 || parent_of(i) >= 0);
    return m;
  endfunction
  a_one_leaf: assert property (p_one_leaf) else $error("bdt_tree: leaf activation not one-hot");

endmodule
