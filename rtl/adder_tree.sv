// adder_tree: pipelined pairwise reduction ("adder tree") that sums N_IN
// signed numbers.
//
// It aggregates the tree scores of a forest: in the static forest the scores
// of all trees, in the Forest Processing Unit the scores of all tree engines.
// Level l adds neighbouring pairs of level l-1 (an odd element is passed on
// unchanged), so there are LEVELS = ceil(log2(N_IN)) levels, each one
// registered.  Inputs are sign-extended to OUT_W bits; with the default
// OUT_W = IN_W + ceil(log2(N_IN)) the sum cannot overflow.
//
// Interface: in_valid/in_data in, out_valid/sum out, no back-pressure.
// Timing: latency LEVELS cycles (0 for N_IN = 1, when the sum is the input),
// one new set of inputs per cycle.  Valid bits have a synchronous active-low
// reset; the data registers are not reset.
// The pairwise structure follows the conifer reference design; registering every level
// is this design's choice.
module adder_tree #(
  parameter int N_IN   = 20,
  parameter int IN_W   = 18,
  parameter int LEVELS = (N_IN > 1) ? $clog2(N_IN) : 0,
  parameter int OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data [N_IN],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum
);

  // number of partial sums at level l
  function automatic int count(int l);
    int c = N_IN;
    for (int k = 0; k < l; k++) c = (c + 1) / 2;
    return c;
  endfunction

  logic signed [OUT_W-1:0] lvl [LEVELS+1][N_IN];
  logic [LEVELS:0]         vld;

  always_comb begin
    for (int k = 0; k < N_IN; k++) lvl[0][k] = {{(OUT_W-IN_W){in_data[k][IN_W-1]}}, in_data[k]};
    vld[0] = in_valid;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int NI = count(l);
    localparam int NO = count(l + 1);
    always_ff @(posedge clk) begin
      for (int k = 0; k < N_IN; k++) begin
        if (k >= NO)              lvl[l+1][k] <= '0;
        else if (2 * k + 1 < NI)  lvl[l+1][k] <= lvl[l][2*k] + lvl[l][2*k+1];
        else                      lvl[l+1][k] <= lvl[l][2*k];
      end
    end
    always_ff @(posedge clk)
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
  end

  assign sum       = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
