// tree_engine: one Tree Engine of the Forest Processing Unit (FPU).
//
// The engine holds one decision tree as data in its own node memory (one
// fpu_node_t per address; child fields are addresses of other nodes, the
// root is at address 0) and evaluates it by walking from the root:
//   FETCH  : read the node at the current address (synchronous memory read)
//   DECIDE : at a leaf, output its score and finish; otherwise compare
//            x[feature] <= threshold and register the result
//   STEP   : next address = result ? child_left : child_right
// Each inner node on the path therefore costs 3 cycles, and the next node
// cannot be read before the comparison of the current one is known - the
// loop-carried dependence that gives the traversal loop an initiation
// interval of 3.
//
// Interface
//   wr_en/wr_addr/wr_node : write port of the node memory (model loading)
//   start                 : one-cycle pulse, begins an inference on x; x must
//                           stay stable until done
//   busy                  : an inference is running
//   done/y                : done rises when the leaf is reached and stays high
//                           (with y = leaf score) until the next start
//   steps                 : number of inner nodes visited in the last walk
// Timing: for a leaf at depth d, done rises 3*d + 2 cycles after the clock
// edge that samples start.
// Reset (synchronous, active low) clears the control state; the node memory
// is not reset and must be loaded before use.
//
// The node-at-an-address storage, the read/compare/next-pointer loop and its
// 3-cycle iteration follow the conifer reference design; the fixed three-state schedule,
// the write port and the done/steps outputs are this design's choices.  A
// feature index >= NVARS reads as 0.
module tree_engine
  import conifer_pkg::*;
#(
  parameter int NNODES = FPU_NNODES,
  parameter int NVARS  = FPU_NVARS
) (
  input  logic              clk,
  input  logic              rst_n,
  // node memory write port
  input  logic              wr_en,
  input  logic [FPU_AW-1:0] wr_addr,
  input  fpu_node_t         wr_node,
  // inference
  input  logic              start,
  input  fixed_t            x [NVARS],
  output logic              busy,
  output logic              done,
  output fixed_t            y,
  output logic [FPU_AW-1:0] steps
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DECIDE, S_STEP} state_e;

  fpu_node_t         mem [NNODES];
  fpu_node_t         node_q;
  logic [FPU_AW-1:0] addr_q;
  logic              cmp_q;
  state_e            state_q;

  // node memory: one write port, one synchronous read port
  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < NNODES) mem[wr_addr] <= wr_node;
    if (state_q == S_FETCH) node_q <= mem[addr_q];
  end

  fixed_t feat_val;
  always_comb begin
    feat_val = '0;
    for (int v = 0; v < NVARS; v++)
      if (int'(node_q.feature) == v) feat_val = x[v];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      addr_q  <= '0;
      cmp_q   <= 1'b0;
      y       <= '0;
      steps   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          addr_q  <= '0;
          done    <= 1'b0;
          steps   <= '0;
          state_q <= S_FETCH;
        end
        S_FETCH: state_q <= S_DECIDE;
        S_DECIDE: begin
          if (node_q.is_leaf) begin
            y       <= node_q.score;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            cmp_q   <= (feat_val <= node_q.threshold);
            state_q <= S_STEP;
          end
        end
        S_STEP: begin
          addr_q  <= cmp_q ? node_q.child_left : node_q.child_right;
          steps   <= steps + 1'b1;
          state_q <= S_FETCH;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("tree_engine: start while busy");

endmodule
