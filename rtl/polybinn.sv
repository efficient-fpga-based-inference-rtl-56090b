// polybinn: POLYBiNN classifier, a forest of binary decision trees per
// class (AdaBoost), evaluated in parallel, plus the voting logic.
//
// Pipeline (one image per cycle):
//   cycle 1  feature_binarizer: every pixel >= threshold (0.5 of range)
//   cycle 2  polybinn_tree_array (M x N six-input trees) and
//            polybinn_class_vote per class, registered as D_m, C_m
//   cycles 3..  polybinn_argmax (ceil(log2 M) comparator levels + output)
// Latency = 2 + ceil(log2 M) + 1 = 7 cycles for M = 10; the published design
// reports 70 ns at 100 MHz for its MNIST design, i.e. about 7 cycles.
//
// Interface: in_valid with N_FEAT pixels of PIX_W bits; out_valid with a
// one-hot class. No back-pressure (as the fixed pipeline of the published design).
// SIMPLIFIED selects the priority-encoder voting. The tree model is the
// placeholder of polybinn_model_pkg (window WIN).
module polybinn
  import polybinn_model_pkg::*;
#(
  parameter int N_FEAT = 784,
  parameter int PIX_W  = 8,
  parameter int M      = 10,
  parameter int N      = 20,
  parameter bit SIMPLIFIED = 1'b0,
  parameter int WIN    = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [N_FEAT-1:0][PIX_W-1:0] pixels,
  output logic                       out_valid,
  output logic [M-1:0]               onehot
);
  localparam int LATENCY = 2 + ((M > 1) ? $clog2(M) : 1) + 1;

  logic              bin_valid;
  logic [N_FEAT-1:0] feat;
  feature_binarizer #(.N(N_FEAT), .W(PIX_W)) u_bin (
    .clk, .rst_n, .in_valid, .feat(pixels), .out_valid(bin_valid), .bits(feat));

  function automatic logic [N-1:0][7:0] conf_vec(int m);
    for (int n = 0; n < N; n++) conf_vec[n] = tree_conf(WIN, m, n);
  endfunction

  logic [M-1:0][N-1:0] d;
  polybinn_tree_array #(.N_FEAT(N_FEAT), .M(M), .N(N), .WIN(WIN)) u_trees (
    .feat, .d);

  logic [M-1:0]      dec;
  logic [M-1:0][1:0] conf;
  for (genvar m = 0; m < M; m++) begin : g_vote
    polybinn_class_vote #(.N(N), .CONF(conf_vec(m))) u_vote (
      .d(d[m]), .dec(dec[m]), .conf(conf[m]));
  end

  logic              v_valid;
  logic [M-1:0]      dec_q;
  logic [M-1:0][1:0] conf_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_valid <= 1'b0;
      dec_q   <= '0;
      conf_q  <= '0;
    end else begin
      v_valid <= bin_valid;
      dec_q   <= dec;
      conf_q  <= conf;
    end
  end

  polybinn_argmax #(.M(M), .SIMPLIFIED(SIMPLIFIED)) u_argmax (
    .clk, .rst_n, .in_valid(v_valid), .dec(dec_q), .conf(conf_q),
    .out_valid, .onehot);
endmodule
