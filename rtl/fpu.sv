// fpu: Forest Processing Unit - a reconfigurable BDT inference engine whose
// model is loaded as data at run time instead of being built into the logic.
//
// Structure
//   data bus   : takes instructions.  LOAD streams nodes into the node
//                memories; INFER broadcasts one feature vector to all engines.
//   NTE tree engines (tree_engine): one tree each, with private node memory,
//                all walking their trees in parallel.
//   aggregator : pipelined adder tree (adder_tree) summing the engine scores.
//   The number of engines bounds the number of trees of a model that fits.
//
// Instructions (cmd_valid/cmd_ready handshake, cmd_instr):
//   INSTR_LOAD  : the unit then accepts NTE*NNODES nodes on node_valid/
//                 node_ready/node_data, engine-major (engine 0 addresses
//                 0..NNODES-1, then engine 1, ...), and pulses load_done
//                 after the last one.  Engines without a tree should be given
//                 a root leaf of score 0.
//   INSTR_INFER : cmd_x is captured; all engines start together; when every
//                 engine has reached a leaf the scores are summed, and y_valid
//                 pulses with y = sum of the tree scores.
//   Node memories keep their contents between instructions, so one LOAD
//   serves any number of INFERs.
// Timing: counted from the clock edge that takes an INFER command, y_valid
//   rises after 1 (capture) + 1 (start) + the slowest engine's walk
//   (3*depth + 2) + 1 + ceil(log2(NTE)) cycles.  LOAD takes one cycle per
//   accepted node.  Reset is synchronous, active low; it clears control
//   state, not the node memories.
//
// Following the conifer reference design: instruction-driven load/infer, static node
// memories kept between calls, independent tree engines, summing aggregator,
// 200 engines by default.  The bus protocol, node order, memory depth (512)
// and number of features (16) are this design's choices.
module fpu
  import conifer_pkg::*;
#(
  parameter int NTE    = FPU_NTE,
  parameter int NNODES = FPU_NNODES,
  parameter int NVARS  = FPU_NVARS,
  parameter int Y_W    = X_W + ((NTE > 1) ? $clog2(NTE) : 0)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction port
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  fpu_instr_e            cmd_instr,
  input  fixed_t                cmd_x [NVARS],
  // node stream for LOAD
  input  logic                  node_valid,
  output logic                  node_ready,
  input  fpu_node_t             node_data,
  output logic                  load_done,
  // result of INFER
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y,
  output logic                  busy
);

  localparam int TE_W = (NTE > 1) ? $clog2(NTE) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_START, S_WAIT, S_AGG} state_e;

  state_e            state_q;
  logic [TE_W-1:0]   te_q;
  logic [FPU_AW-1:0] addr_q;
  fixed_t            x_q [NVARS];
  logic              start_q;
  logic              agg_valid_q;

  logic [NTE-1:0]    te_done;
  logic [NTE-1:0]    te_busy;
  fixed_t            te_y [NTE];
  logic              sum_valid;

  wire node_beat = (state_q == S_LOAD) && node_valid;
  wire last_node = (int'(te_q) == NTE - 1) && (int'(addr_q) == NNODES - 1);

  assign cmd_ready  = (state_q == S_IDLE);
  assign node_ready = (state_q == S_LOAD);
  assign busy       = (state_q != S_IDLE);

  // ---------------- data bus / control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      te_q        <= '0;
      addr_q      <= '0;
      start_q     <= 1'b0;
      agg_valid_q <= 1'b0;
      load_done   <= 1'b0;
    end else begin
      start_q     <= 1'b0;
      agg_valid_q <= 1'b0;
      load_done   <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          if (cmd_instr == INSTR_LOAD) begin
            te_q    <= '0;
            addr_q  <= '0;
            state_q <= S_LOAD;
          end else begin
            x_q     <= cmd_x;
            state_q <= S_START;
          end
        end
        S_LOAD: if (node_beat) begin
          if (last_node) begin
            load_done <= 1'b1;
            state_q   <= S_IDLE;
          end else if (int'(addr_q) == NNODES - 1) begin
            addr_q <= '0;
            te_q   <= te_q + 1'b1;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        S_START: begin
          start_q <= 1'b1;
          state_q <= S_WAIT;
        end
        S_WAIT: if (!start_q && te_busy == '0 && te_done == '1) begin
          agg_valid_q <= 1'b1;
          state_q     <= S_AGG;
        end
        S_AGG: if (sum_valid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- tree engines ----------------
  for (genvar t = 0; t < NTE; t++) begin : g_te
    tree_engine #(
      .NNODES (NNODES),
      .NVARS  (NVARS)
    ) u_te (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (node_beat && int'(te_q) == t),
      .wr_addr (addr_q),
      .wr_node (node_data),
      .start   (start_q),
      .x       (x_q),
      .busy    (te_busy[t]),
      .done    (te_done[t]),
      .y       (te_y[t]),
      .steps   ()
    );
  end

  // ---------------- aggregator ----------------
  adder_tree #(
    .N_IN  (NTE),
    .IN_W  (X_W),
    .OUT_W (Y_W)
  ) u_agg (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (agg_valid_q),
    .in_data   (te_y),
    .out_valid (sum_valid),
    .sum       (y)
  );

  assign y_valid = sum_valid && (state_q == S_AGG);

endmodule
