// tb_polycinn: POLYCiNN at a reduced image size (16x16x3, 4-bit pixels,
// 3x3 windows of 8x8 with stride 4, 8x8 downsampled image with 6x6
// windows, 10 classes, 20 trees per class and window). Random images are
// streamed one row per cycle, first with gaps, then back to back. The
// expected class is computed here from the definitions: LBP codes and
// histograms, 2x2 block means, learned thresholds and trees of the model,
// weighted votes, sum of confidences over windows and argmax.
// Checks: class and scores per image, latency of 11 cycles after the last
// row, one image per ROWS + 1 cycles at full rate.
module tb_polycinn;
  import polybinn_model_pkg::*;
  localparam int R = 16, C = 16, CH = 3, PB = 4, WN = 8, ST = 4, F = 2, DW = 6, M = 10, N = 20;
  localparam int NWX = 3, NW = 9, NL = CH * 16, ND = DW * DW * CH, NF = NL + ND, LAT = 11;
  typedef logic [R-1:0][C-1:0][CH-1:0][PB-1:0] img_t;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [C-1:0][CH-1:0][PB-1:0] in_row = '0;
  logic [M-1:0] onehot;
  logic [M-1:0][4:0] score;
  int checks = 0, failures = 0, cyc = 0;
  int exp_cls [$], t_last [$];
  int exp_score [$];   // M entries per image
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  polycinn #(.ROWS(R), .COLS(C), .CH(CH), .PB(PB), .WIN(WN), .STRIDE(ST), .F(F), .DWIN(DW),
             .M(M), .N(N)) dut (.*);

  task automatic reference(input img_t img, output int cls, output int sc [M]);
    int hist [NW][CH][16];
    int di [R/F][C/F][CH];
    foreach (hist[w, ch, b]) hist[w][ch][b] = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int ch = 0; ch < CH; ch++) begin
      int p, code;
      p = img[r][c][ch]; code = 0;
      if (r > 0     && img[r-1][c][ch] >= p) code |= 8;
      if (c < C - 1 && img[r][c+1][ch] >  p) code |= 4;
      if (r < R - 1 && img[r+1][c][ch] >  p) code |= 2;
      if (c > 0     && img[r][c-1][ch] >= p) code |= 1;
      for (int w = 0; w < NW; w++)
        if (r >= (w / NWX) * ST && r < (w / NWX) * ST + WN && c >= (w % NWX) * ST && c < (w % NWX) * ST + WN)
          hist[w][ch][code]++;
    end
    for (int y = 0; y < R / F; y++) for (int x = 0; x < C / F; x++) for (int ch = 0; ch < CH; ch++) begin
      int s; s = 0;
      for (int a = 0; a < F; a++) for (int b = 0; b < F; b++) s += img[y*F+a][x*F+b][ch];
      di[y][x][ch] = s / (F * F);
    end
    for (int m = 0; m < M; m++) sc[m] = 0;
    for (int w = 0; w < NW; w++) begin
      int fv [NF]; bit fb [NF];
      for (int ch = 0; ch < CH; ch++) for (int b = 0; b < 16; b++) fv[ch*16+b] = hist[w][ch][b];
      for (int y = 0; y < DW; y++) for (int x = 0; x < DW; x++) for (int ch = 0; ch < CH; ch++)
        fv[NL + (y*DW + x)*CH + ch] = di[w / NWX + y][w % NWX + x][ch];
      for (int i = 0; i < NF; i++)
        fb[i] = fv[i] >= ((i < NL) ? feature_threshold(w, i, WN * WN / 4) : feature_threshold(w, i, 15));
      for (int m = 0; m < M; m++) begin
        real s, t; int q;
        s = 0; t = 0;
        for (int n = 0; n < N; n++) begin
          logic [63:0] lut; int j;
          lut = tree_lut(w + 1, m, n);
          j = 0;
          for (int k = 0; k < K; k++) j |= int'(fb[tree_feature(w + 1, m, n, k, NF)]) << k;
          t += tree_conf(w + 1, m, n);
          if (lut[j]) s += tree_conf(w + 1, m, n);
        end
        q = $floor(4.0 * s / t);
        if (q > 3) q = 3;
        sc[m] += q;
      end
    end
    cls = 0;
    for (int m = 1; m < M; m++) if (sc[m] > sc[cls]) cls = m;
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    int e, t; int es [M];
    e = exp_cls.pop_front(); t = t_last.pop_front();
    for (int m = 0; m < M; m++) es[m] = exp_score.pop_front();
    checks += 3;
    if (onehot !== M'(1) << e) begin failures++; if (failures < 5) $display("FAIL class %b exp %0d", onehot, e); end
    for (int m = 0; m < M; m++) if (score[m] != 5'(es[m])) begin failures++; $display("FAIL score m=%0d %0d exp %0d", m, score[m], es[m]); break; end
    if (cyc - t != LAT) begin failures++; if (failures < 5) $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    int t0, k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    k = 0;
    for (int i = 0; i < 24; i++) begin
      img_t img; int cls; int sc [M];
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int ch = 0; ch < CH; ch++)
        img[r][c][ch] = 4'($urandom);
      reference(img, cls, sc);
      exp_cls.push_back(cls);
      for (int m = 0; m < M; m++) exp_score.push_back(sc[m]);
      if (i == 12) t0 = cyc;
      for (int r = 0; r < R; r++) begin
        if (i < 12) while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_row = img[r];
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        if (r == R - 1) t_last.push_back(cyc);
        @(negedge clk);
      end
    end
    in_valid = 0;
    checks++;
    if (cyc - t0 > 12 * (R + 1) + 1) begin failures++; $display("FAIL rate: %0d cycles for 12 images", cyc - t0); end
    else $display("12 images in %0d cycles at full rate (ROWS+1 = %0d per image)", cyc - t0, R + 1);
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_cls.size() != 0) begin failures++; $display("FAIL %0d images missing", exp_cls.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
