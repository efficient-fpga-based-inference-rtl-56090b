// decision_fusion: final classification of POLYCiNN from the w window
// classifiers.
//
// The W confidences C_wm (2 bits) of each class m are summed by M
// accumulators, then a tree of pipelined comparators (argmax) picks the
// class with the highest sum (as published). Equal sums go to the lower class
// index (this design's choice, not mentioned).
//
// Timing: one vector per cycle; out_valid follows in_valid by
// 1 (sums) + ceil(log2 M) (comparator levels) + 1 (output) cycles.
module decision_fusion #(
  parameter int W = 9,
  parameter int M = 10,
  localparam int SW = $clog2(3 * W + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [W-1:0][M-1:0][1:0]  conf,
  output logic                      out_valid,
  output logic [M-1:0]              onehot,
  output logic [M-1:0][SW-1:0]      score
);
  localparam int L  = (M > 1) ? $clog2(M) : 1;
  localparam int P  = 2 ** L;
  localparam int IW = (M > 1) ? $clog2(M) : 1;

  typedef struct packed {
    logic          valid;
    logic [SW-1:0] sum;
    logic [IW-1:0] idx;
  } cand_t;

  // ---- accumulators
  logic [M-1:0][SW-1:0] sum_c;
  always_comb begin
    for (int m = 0; m < M; m++) begin
      sum_c[m] = '0;
      for (int w = 0; w < W; w++) sum_c[m] += SW'(conf[w][m]);
    end
  end

  cand_t stage [L+1][P];
  logic  vpipe [L+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) stage[0][i] <= '0;
      vpipe[0] <= 1'b0;
      score    <= '0;
    end else begin
      for (int i = 0; i < P; i++)
        stage[0][i] <= (i < M) ? cand_t'{1'b1, sum_c[i % M], IW'(i)} : '0;
      vpipe[0] <= in_valid;
      if (in_valid) score <= sum_c;
    end
  end

  function automatic cand_t pick(cand_t a, cand_t b);
    if (!b.valid) return a;
    if (!a.valid) return b;
    return (b.sum > a.sum) ? b : a;
  endfunction

  for (genvar l = 0; l < L; l++) begin : g_lvl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < P; i++) stage[l+1][i] <= '0;
        vpipe[l+1] <= 1'b0;
      end else begin
        for (int i = 0; i < P; i++)
          stage[l+1][i] <= (i < (P >> (l + 1))) ? pick(stage[l][2*i], stage[l][2*i+1]) : '0;
        vpipe[l+1] <= vpipe[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      onehot    <= '0;
    end else begin
      out_valid <= vpipe[L];
      onehot    <= M'(1) << stage[L][0].idx;
    end
  end
endmodule
