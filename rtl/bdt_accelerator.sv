// bdt_accelerator: memory-to-memory wrapper around the static forest, the
// "accelerator" form of a model-specific BDT.
//
// For n = 0 .. n_samples-1 it reads the N_FEATURES input words of sample n
// from memory word addresses x_base + N_FEATURES*n + i, converts each from
// IEEE-754 single precision to the datapath's fixed point (float_conv_pkg),
// runs them through bdt_forest and writes the score, converted back to a
// float, to word address score_base + n.  n_f and n_c report the model's
// number of features and of output classes (one score per sample).
//
// Memory port (stand-in for the memory-mapped bus of an FPGA card):
//   rd_valid/rd_ready/rd_addr : read requests, any number outstanding
//   rsp_valid/rsp_data        : read data, in request order, no back-pressure
//   wr_valid/wr_ready/wr_addr/wr_data : writes
// Control: start (one-cycle pulse, with n_samples/x_base/score_base) and a
// done pulse when the last score has been written; busy while running.
// Timing: per sample N_FEATURES read requests back to back, the response
// latency, the forest latency (bdt_forest LATENCY), one cycle, and the
// write handshake.  Samples are processed one after the other.
//
// Following the conifer reference design: the read-infer-write loop over N samples, the
// float data type on the bus cast to fixed point in the FPGA, and the n_f/n_c
// outputs.  The port protocol, word addressing and the sample-by-sample
// (not overlapped) schedule are this design's choices.
module bdt_accelerator
  import conifer_pkg::*;
  import float_conv_pkg::*;
#(
  parameter int N_FEATURES = FOREST_FEATURES,
  parameter int N_TREES    = FOREST_TREES,
  parameter int N_NODES    = FOREST_NODES,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] FEATURE     = FOREST_FEATURE,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] THRESHOLD   = FOREST_THRESHOLD,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] CHILD_LEFT  = FOREST_CHILD_LEFT,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] CHILD_RIGHT = FOREST_CHILD_RIGHT,
  parameter logic signed [0:N_TREES-1][0:N_NODES-1][MODEL_W-1:0] VALUE       = FOREST_VALUE,
  parameter int ADDR_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [31:0]       n_samples,
  input  logic [ADDR_W-1:0] x_base,
  input  logic [ADDR_W-1:0] score_base,
  output logic              busy,
  output logic              done,
  output logic [31:0]       n_f,
  output logic [31:0]       n_c,
  // memory read
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rsp_valid,
  input  logic [31:0]       rsp_data,
  // memory write
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data
);

  localparam int SCORE_W = X_W + ((N_TREES > 1) ? $clog2(N_TREES) : 0);
  localparam int CNT_W   = $clog2(N_FEATURES + 1);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_RUN, S_WAIT, S_WRITE} state_e;

  state_e                   state_q;
  logic [31:0]              n_q, total_q;
  logic [ADDR_W-1:0]        score_base_q, rd_ptr_q;
  logic [CNT_W-1:0]         req_cnt_q, rsp_cnt_q;
  fixed_t                   x_buf [N_FEATURES];
  logic                     fo_in_valid;
  logic                     fo_valid;
  logic signed [SCORE_W-1:0] fo_score;

  assign n_f = 32'(N_FEATURES);
  assign n_c = 32'd1;

  assign rd_valid    = (state_q == S_READ) && (int'(req_cnt_q) < N_FEATURES);
  assign rd_addr     = rd_ptr_q;
  assign wr_valid    = (state_q == S_WRITE);
  assign wr_addr     = score_base_q + ADDR_W'(n_q);
  assign busy        = (state_q != S_IDLE);
  assign fo_in_valid = (state_q == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      done      <= 1'b0;
      n_q       <= '0;
      total_q   <= '0;
      req_cnt_q <= '0;
      rsp_cnt_q <= '0;
      rd_ptr_q  <= '0;
      wr_data   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          n_q          <= '0;
          total_q      <= n_samples;
          score_base_q <= score_base;
          rd_ptr_q     <= x_base;
          req_cnt_q    <= '0;
          rsp_cnt_q    <= '0;
          if (n_samples == 0) done <= 1'b1;
          else                state_q <= S_READ;
        end
        S_READ: begin
          if (rd_valid && rd_ready) begin
            req_cnt_q <= req_cnt_q + 1'b1;
            rd_ptr_q  <= rd_ptr_q + 1'b1;
          end
          if (rsp_valid) begin
            x_buf[rsp_cnt_q] <= fixed_t'(float_to_fixed(rsp_data, X_FRAC));
            rsp_cnt_q        <= rsp_cnt_q + 1'b1;
            if (int'(rsp_cnt_q) == N_FEATURES - 1) state_q <= S_RUN;
          end
        end
        S_RUN: state_q <= S_WAIT;
        S_WAIT: if (fo_valid) begin
          wr_data <= fixed_to_float(64'(fo_score), X_FRAC);
          state_q <= S_WRITE;
        end
        S_WRITE: if (wr_ready) begin
          req_cnt_q <= '0;
          rsp_cnt_q <= '0;
          if (n_q + 1 == total_q) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_READ;
          end
          n_q <= n_q + 1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  bdt_forest #(
    .N_FEATURES  (N_FEATURES),
    .N_TREES     (N_TREES),
    .N_NODES     (N_NODES),
    .FEATURE     (FEATURE),
    .THRESHOLD   (THRESHOLD),
    .CHILD_LEFT  (CHILD_LEFT),
    .CHILD_RIGHT (CHILD_RIGHT),
    .VALUE       (VALUE),
    .SCORE_W     (SCORE_W)
  ) u_forest (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fo_in_valid),
    .x         (x_buf),
    .out_valid (fo_valid),
    .score     (fo_score)
  );

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   rsp_valid |-> (state_q == S_READ && rsp_cnt_q < req_cnt_q))
    else $error("bdt_accelerator: unexpected read response");

endmodule
