// tb_polybinn_tree_array: random binary feature vectors; every tree output
// is compared with the tree's truth table looked up at its six features,
// and each tree must be seen giving both 0 and 1.
module tb_polybinn_tree_array;
  import polybinn_model_pkg::*;
  localparam int NF = 40, M = 3, N = 5, WIN = 2;
  logic [NF-1:0] feat = '0;
  logic [M-1:0][N-1:0] d;
  logic [M-1:0][N-1:0] seen0 = '0, seen1 = '0;
  int checks = 0, failures = 0;
  initial begin #1_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  polybinn_tree_array #(.N_FEAT(NF), .M(M), .N(N), .WIN(WIN)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      feat = {$urandom, $urandom};
      #1;
      for (int m = 0; m < M; m++)
        for (int n = 0; n < N; n++) begin
          logic [63:0] lut; int j; logic e;
          lut = tree_lut(WIN, m, n);
          j = 0;
          for (int k = 0; k < K; k++) j |= int'(feat[tree_feature(WIN, m, n, k, NF)]) << k;
          e = lut[j];
          checks++;
          if (d[m][n] !== e) begin
            failures++;
            if (failures < 5) $display("FAIL m=%0d n=%0d d=%b exp=%b", m, n, d[m][n], e);
          end
          if (e) seen1[m][n] = 1; else seen0[m][n] = 1;
        end
    end
    checks++;
    if (~&seen0 || ~&seen1) begin failures++; $display("FAIL: some tree constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
