// conifer_top: the two FPGA implementations of boosted-decision-tree (BDT)
// inference, side by side.
//
//   acc_* : static, model-specific forest (bdt_forest, 20 trees of depth 5)
//           inside its memory-to-memory accelerator wrapper (bdt_accelerator).
//           Lowest latency and II = 1 in the forest, but the model is fixed
//           at build time.
//   fpu_* : Forest Processing Unit (fpu) with 200 tree engines, whose model
//           is loaded as data at run time through its instruction port.
// The two share only clock and reset; see the sub-modules for protocols
// and timing.  All parameters are the sub-modules' defaults.
module conifer_top
  import conifer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // static forest accelerator: control
  input  logic        acc_start,
  input  logic [31:0] acc_n_samples,
  input  logic [31:0] acc_x_base,
  input  logic [31:0] acc_score_base,
  output logic        acc_busy,
  output logic        acc_done,
  output logic [31:0] acc_n_f,
  output logic [31:0] acc_n_c,
  // static forest accelerator: memory
  output logic        acc_rd_valid,
  input  logic        acc_rd_ready,
  output logic [31:0] acc_rd_addr,
  input  logic        acc_rsp_valid,
  input  logic [31:0] acc_rsp_data,
  output logic        acc_wr_valid,
  input  logic        acc_wr_ready,
  output logic [31:0] acc_wr_addr,
  output logic [31:0] acc_wr_data,
  // Forest Processing Unit
  input  logic        fpu_cmd_valid,
  output logic        fpu_cmd_ready,
  input  fpu_instr_e  fpu_cmd_instr,
  input  fixed_t      fpu_cmd_x [FPU_NVARS],
  input  logic        fpu_node_valid,
  output logic        fpu_node_ready,
  input  fpu_node_t   fpu_node_data,
  output logic        fpu_load_done,
  output logic        fpu_y_valid,
  output logic signed [X_W+$clog2(FPU_NTE)-1:0] fpu_y,
  output logic        fpu_busy
);

  bdt_accelerator u_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (acc_start),
    .n_samples  (acc_n_samples),
    .x_base     (acc_x_base),
    .score_base (acc_score_base),
    .busy       (acc_busy),
    .done       (acc_done),
    .n_f        (acc_n_f),
    .n_c        (acc_n_c),
    .rd_valid   (acc_rd_valid),
    .rd_ready   (acc_rd_ready),
    .rd_addr    (acc_rd_addr),
    .rsp_valid  (acc_rsp_valid),
    .rsp_data   (acc_rsp_data),
    .wr_valid   (acc_wr_valid),
    .wr_ready   (acc_wr_ready),
    .wr_addr    (acc_wr_addr),
    .wr_data    (acc_wr_data)
  );

  fpu u_fpu (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (fpu_cmd_valid),
    .cmd_ready  (fpu_cmd_ready),
    .cmd_instr  (fpu_cmd_instr),
    .cmd_x      (fpu_cmd_x),
    .node_valid (fpu_node_valid),
    .node_ready (fpu_node_ready),
    .node_data  (fpu_node_data),
    .load_done  (fpu_load_done),
    .y_valid    (fpu_y_valid),
    .y          (fpu_y),
    .busy       (fpu_busy)
  );

endmodule
