// conifer_pkg: types and constants shared by the boosted-decision-tree (BDT)
// inference hardware.
//
// Number format. Features, thresholds and scores are signed fixed point with
// X_W = 18 bits of which X_FRAC = 10 are fraction bits (8 integer bits incl.
// sign), the conventional default precision of the conifer tool flow.  The
// raw integer value of a number v is round(v * 2**X_FRAC).
//
// Tree representation (shared by the static forest and the Forest
// Processing Unit): trees are stored "flat", one entry per node, with the
// node's feature index, threshold, left/right child index and leaf value in
// separate arrays.  The value NODE_LEAF (-2) in the feature or child arrays
// marks a leaf.  The comparison at a node is  x[feature] <= threshold ; the
// path goes to the left child when it is true.
//
// Static model parameters are packed arrays indexed [tree][node] or [node],
// each element MODEL_W bits wide, so that a whole model can be passed down as
// module parameters.
//
// The default static forest (20 trees of depth 5) holds, as tree 0, the
// example tree of the conifer reference design; the remaining 19 trees are complete
// depth-5 trees whose contents come from small arithmetic formulas below
// (feature = (7t+3n) mod 10, threshold = ((37t+101n) mod 41 - 20)/8,
// value = ((53t+29n) mod 33 - 16)/16), standing in for a trained model.
//
// Forest Processing Unit: a node is stored as one memory word (fpu_node_t);
// child indices are addresses in the tree engine's node memory.
package conifer_pkg;

  // ---------------- number format ----------------
  parameter int X_W    = 18;
  parameter int X_FRAC = 10;
  typedef logic signed [X_W-1:0] fixed_t;

  // width of each element of a static model parameter array
  parameter int MODEL_W = 18;
  parameter int NODE_LEAF = -2;

  // value of one model array element as a signed integer
  function automatic int model_int(logic [MODEL_W-1:0] v);
    return v[MODEL_W-1] ? int'(v) - (1 << MODEL_W) : int'(v);
  endfunction

  // ---------------- default static tree (7 nodes, depth 2) ----------------
  parameter int TREE7_NODES    = 7;
  parameter int TREE7_DEPTH    = 2;
  parameter int TREE7_FEATURES = 8;
  typedef logic signed [0:TREE7_NODES-1][MODEL_W-1:0] tree7_arr_t;
  parameter tree7_arr_t TREE7_FEATURE     = '{4, 7, 1, -2, -2, -2, -2};
  parameter tree7_arr_t TREE7_THRESHOLD   = '{7*1024, 2*1024, 9*1024, -2, -2, -2, -2};
  parameter tree7_arr_t TREE7_CHILD_LEFT  = '{1, 3, 5, -2, -2, -2, -2};
  parameter tree7_arr_t TREE7_CHILD_RIGHT = '{2, 4, 6, -2, -2, -2, -2};
  // values 0.5, 0.4, -0.5, -1 at the leaves; -1 at the inner nodes (unused)
  parameter tree7_arr_t TREE7_VALUE       = '{-1024, -1024, -1024, 512, 410, -512, -1024};

  // ---------------- default static forest (20 trees, depth 5) ----------------
  parameter int FOREST_TREES    = 20;
  parameter int FOREST_NODES    = 63;   // 2**(depth+1) - 1
  parameter int FOREST_DEPTH    = 5;
  parameter int FOREST_FEATURES = 10;
  typedef logic signed [0:FOREST_TREES-1][0:FOREST_NODES-1][MODEL_W-1:0] forest_arr_t;

  // the 49-node example tree, breadth-first numbering
  parameter int EX_NODES = 49;
  typedef int ex_arr_t [EX_NODES];
  parameter ex_arr_t EX_FEATURE = '{
    1, 1, 2, 1, 5, 1, -2, 7, 0, 5, 5, 4, 1, 8, 4, 6, 2, 0, 2, 8, 9, 5, 9, 2, 0,
    -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2};
  parameter ex_arr_t EX_THRESHOLD = '{
    1147, -1403, 963, -2161, 1270, 1567, -2, -1331, 563, -1393, 1812, -72, 2120,
    -307, -266, -952, 481, -911, 1751, -1178, -72, -881, 1137, -1055, 1004,
    -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2, -2};
  parameter ex_arr_t EX_VALUE = '{
    0, 0, 0, 0, 0, 0, 2089, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    -2007, 2089, 2089, 2089, 2089, -20, 2089, 1208, 1833, 645, -655, 1321, 2089,
    184, 1290, 2089, 1864, 686, -594, 1710, 2089, 850, 2089, 1270};
  // inner nodes of the example tree in breadth-first order; node 6 is a leaf,
  // every other inner node n has children 2k+1, 2k+2 in the numbering
  // k = rank of n among the inner nodes (node 6 skipped).

  // field selectors for forest_field()
  typedef enum int {F_FEATURE, F_THRESHOLD, F_CHILD_LEFT, F_CHILD_RIGHT, F_VALUE} field_e;

  function automatic int ex_child(int n, bit right);
    int k;
    if (EX_FEATURE[n] < 0) return NODE_LEAF;
    k = (n > 6) ? n - 1 : n;          // rank among inner nodes
    return 2 * k + 1 + (right ? 1 : 0);
  endfunction

  function automatic int forest_elem(field_e f, int t, int n);
    if (t == 0) begin
      if (n >= EX_NODES) return NODE_LEAF;   // padding: unreachable node
      case (f)
        F_FEATURE:     return EX_FEATURE[n];
        F_THRESHOLD:   return EX_THRESHOLD[n];
        F_CHILD_LEFT:  return ex_child(n, 1'b0);
        F_CHILD_RIGHT: return ex_child(n, 1'b1);
        default:       return EX_VALUE[n];
      endcase
    end
    if (n < FOREST_NODES / 2) begin   // inner node of a complete tree
      case (f)
        F_FEATURE:     return (7 * t + 3 * n) % FOREST_FEATURES;
        F_THRESHOLD:   return (((37 * t + 101 * n) % 41) - 20) * 128;
        F_CHILD_LEFT:  return 2 * n + 1;
        F_CHILD_RIGHT: return 2 * n + 2;
        default:       return 0;
      endcase
    end
    if (f == F_VALUE) return (((53 * t + 29 * n) % 33) - 16) * 64;
    return NODE_LEAF;
  endfunction

  function automatic forest_arr_t forest_field(field_e f);
    forest_arr_t a;
    for (int t = 0; t < FOREST_TREES; t++)
      for (int n = 0; n < FOREST_NODES; n++)
        a[t][n] = MODEL_W'(forest_elem(f, t, n));
    return a;
  endfunction

  parameter forest_arr_t FOREST_FEATURE     = forest_field(F_FEATURE);
  parameter forest_arr_t FOREST_THRESHOLD   = forest_field(F_THRESHOLD);
  parameter forest_arr_t FOREST_CHILD_LEFT  = forest_field(F_CHILD_LEFT);
  parameter forest_arr_t FOREST_CHILD_RIGHT = forest_field(F_CHILD_RIGHT);
  parameter forest_arr_t FOREST_VALUE       = forest_field(F_VALUE);

  // ---------------- Forest Processing Unit ----------------
  parameter int FPU_NTE    = 200;   // tree engines
  parameter int FPU_NNODES = 512;   // node memory words per tree engine
  parameter int FPU_NVARS  = 16;    // features per input vector
  parameter int FPU_AW     = $clog2(FPU_NNODES);
  parameter int FPU_FW     = $clog2(FPU_NVARS);

  typedef struct packed {
    logic              is_leaf;
    logic [FPU_FW-1:0] feature;
    fixed_t            threshold;
    fixed_t            score;
    logic [FPU_AW-1:0] child_left;
    logic [FPU_AW-1:0] child_right;
  } fpu_node_t;

  typedef enum logic {INSTR_LOAD = 1'b0, INSTR_INFER = 1'b1} fpu_instr_e;

endpackage
