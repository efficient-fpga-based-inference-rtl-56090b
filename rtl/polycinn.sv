// polycinn: POLYCiNN classifier, a stack of POLYBiNN decision forests over
// overlapped image windows, with LBP features and a downsampled image.
//
// Data path (as published):
//   lbp_layer         16-bin LBP histogram per channel for each of the
//                     NW = 9 windows (16x16, stride 8 on 32x32)
//   image_downsampler 8x8 image; window w uses its 6x6 sub-window at the
//                     same window position (stride 1)
//   feature_binarizer per window, learned threshold per feature
//   polybinn_tree_array + polybinn_class_vote per window: C_wm
//   decision_fusion   sum of C_wm over windows per class, argmax
// The tree model and the thresholds come from polybinn_model_pkg (a
// placeholder: trained values are not given in the published design).
//
// Interface: the image is streamed one row per cycle (COLS pixels x CH
// channels x PB bits, the 4 MSBs of each 8-bit colour value) with
// in_valid/in_ready. out_valid pulses once per image with the one-hot
// class and the per-class fused scores.
// Timing: ROWS + 1 cycles per image; out_valid is high in the 11th cycle
// after the cycle that transfers the last row: 3 (LBP) + 1 (binarize) +
// 1 (trees and vote) + 1 + ceil(log2 M) + 1 (fusion) for M = 10.
module polycinn
  import polybinn_model_pkg::*;
#(
  parameter int ROWS   = 32,
  parameter int COLS   = 32,
  parameter int CH     = 3,
  parameter int PB     = 4,
  parameter int WIN    = 16,
  parameter int STRIDE = 8,
  parameter int F      = 4,
  parameter int DWIN   = 6,
  parameter int M      = 10,
  parameter int N      = 100,    // trees per class per window
  localparam int NWY = (ROWS - WIN) / STRIDE + 1,
  localparam int NWX = (COLS - WIN) / STRIDE + 1,
  localparam int NW  = NWY * NWX,
  localparam int HW  = $clog2(WIN * WIN + 1),
  localparam int SW  = $clog2(3 * NW + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [COLS-1:0][CH-1:0][PB-1:0] in_row,
  output logic                            out_valid,
  output logic [M-1:0]                    onehot,
  output logic [M-1:0][SW-1:0]            score
);
  localparam int DR = ROWS / F, DC = COLS / F;
  localparam int NL = CH * 16;              // LBP features per window
  localparam int ND = DWIN * DWIN * CH;     // DI features per window
  localparam int NF = NL + ND;

  initial begin
    if (DR - DWIN + 1 != NWY || DC - DWIN + 1 != NWX)
      $error("downsampled windows must match the image windows");
  end

  logic lbp_valid, ds_valid;
  logic [NW-1:0][CH-1:0][15:0][HW-1:0]   hist;
  logic [DR-1:0][DC-1:0][CH-1:0][PB-1:0] di, di_q;

  lbp_layer #(.ROWS(ROWS), .COLS(COLS), .CH(CH), .PB(PB), .WIN(WIN), .STRIDE(STRIDE)) u_lbp (
    .clk, .rst_n, .in_valid, .in_ready, .in_row, .out_valid(lbp_valid), .hist);

  image_downsampler #(.ROWS(ROWS), .COLS(COLS), .CH(CH), .PB(PB), .F(F)) u_ds (
    .clk, .rst_n, .in_valid, .in_ready, .in_row, .out_valid(ds_valid), .di);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        di_q <= '0;
    else if (ds_valid) di_q <= di;
  end

  logic [NW-1:0]             bin_valid;
  logic [NW-1:0][M-1:0][1:0] conf_c;
  logic [NW-1:0][M-1:0][1:0] conf_q;
  logic                      conf_valid;

  for (genvar w = 0; w < NW; w++) begin : g_win
    localparam int WY = w / NWX, WX = w % NWX;

    logic [NF-1:0][HW-1:0] fv;
    always_comb begin
      for (int ch = 0; ch < CH; ch++)
        for (int b = 0; b < 16; b++) fv[ch*16+b] = hist[w][ch][b];
      for (int y = 0; y < DWIN; y++)
        for (int x = 0; x < DWIN; x++)
          for (int ch = 0; ch < CH; ch++)
            fv[NL + (y*DWIN + x)*CH + ch] = HW'(di_q[WY+y][WX+x][ch]);
    end

    logic [NF-1:0] fb;
    feature_binarizer #(.N(NF), .W(HW), .THRESH(thresholds(w))) u_bin (
      .clk, .rst_n, .in_valid(lbp_valid), .feat(fv), .out_valid(bin_valid[w]), .bits(fb));

    logic [M-1:0][N-1:0] d;
    polybinn_tree_array #(.N_FEAT(NF), .M(M), .N(N), .WIN(w + 1)) u_trees (.feat(fb), .d);

    for (genvar m = 0; m < M; m++) begin : g_vote
      logic dec_unused;
      polybinn_class_vote #(.N(N), .CONF(conf_vec(w + 1, m))) u_vote (
        .d(d[m]), .dec(dec_unused), .conf(conf_c[w][m]));
    end
  end

  function automatic logic [NF-1:0][HW-1:0] thresholds(int w);
    for (int i = 0; i < NF; i++)
      thresholds[i] = HW'((i < NL) ? feature_threshold(w, i, WIN * WIN / 4)
                                   : feature_threshold(w, i, 2 ** PB - 1));
  endfunction

  function automatic logic [N-1:0][7:0] conf_vec(int win, int m);
    for (int n = 0; n < N; n++) conf_vec[n] = tree_conf(win, m, n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conf_q     <= '0;
      conf_valid <= 1'b0;
    end else begin
      conf_valid <= bin_valid[0];
      conf_q     <= conf_c;
    end
  end

  decision_fusion #(.W(NW), .M(M)) u_fusion (
    .clk, .rst_n, .in_valid(conf_valid), .conf(conf_q), .out_valid, .onehot, .score);
endmodule
