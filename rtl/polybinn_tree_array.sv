// polybinn_tree_array: the M x N array of decision trees of one POLYBiNN.
//
// Each tree is a sum of products over at most six binary features: one AND
// term per path from the root to a leaf that votes 1, the terms ORed. Any
// such function of six inputs is one 6-input look-up table, so each tree
// is written here as a 64-entry truth table indexed by its six features.
// The features and the table of every tree come from polybinn_model_pkg
// (window WIN, class m, tree n). Purely combinational.
module polybinn_tree_array
  import polybinn_model_pkg::*;
#(
  parameter int N_FEAT = 784,
  parameter int M      = 10,
  parameter int N      = 20,
  parameter int WIN    = 0
) (
  input  logic [N_FEAT-1:0]       feat,
  output logic [M-1:0][N-1:0]     d
);
  for (genvar m = 0; m < M; m++) begin : g_class
    for (genvar n = 0; n < N; n++) begin : g_tree
      localparam logic [63:0] LUT = tree_lut(WIN, m, n);
      logic [K-1:0] sel;
      for (genvar k = 0; k < K; k++) begin : g_in
        assign sel[k] = feat[tree_feature(WIN, m, n, k, N_FEAT)];
      end
      assign d[m][n] = LUT[sel];
    end
  end
endmodule
