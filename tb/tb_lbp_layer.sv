// tb_lbp_layer: random images (8x8, 2 channels, 3x3 windows of 4x4 with
// stride 2, plus images with equal and extreme pixels) streamed one row per
// cycle, with and without gaps. The expected histograms come from the LBP
// definition written directly on the image: top and left neighbours >=
// pixel, right and bottom neighbours > pixel, 0 outside the image, code
// {top, right, bottom, left}. Checks: out_valid 3 cycles after the last
// row, one image per ROWS + 1 cycles at full rate (in_ready low exactly one
// cycle per image), and that all 16 code values occur.
module tb_lbp_layer;
  localparam int R = 8, C = 8, CH = 2, PB = 4, WN = 4, ST = 2;
  localparam int NWY = (R - WN) / ST + 1, NWX = (C - WN) / ST + 1, NW = NWY * NWX, HW = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [C-1:0][CH-1:0][PB-1:0] in_row = '0;
  logic [NW-1:0][CH-1:0][15:0][HW-1:0] hist;
  int checks = 0, failures = 0, cyc = 0, n_ready_low = 0;
  int code_seen [16];
  typedef logic [NW-1:0][CH-1:0][15:0][HW-1:0] hist_t;
  hist_t exp_q [$];
  int t_last [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  lbp_layer #(.ROWS(R), .COLS(C), .CH(CH), .PB(PB), .WIN(WN), .STRIDE(ST)) dut (.*);

  function automatic hist_t reference(logic [R-1:0][C-1:0][CH-1:0][PB-1:0] img);
    hist_t h; h = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int ch = 0; ch < CH; ch++) begin
          int p, code;
          p = img[r][c][ch];
          code = 0;
          if (r > 0     && img[r-1][c][ch] >= p) code |= 8;
          if (c < C - 1 && img[r][c+1][ch] >  p) code |= 4;
          if (r < R - 1 && img[r+1][c][ch] >  p) code |= 2;
          if (c > 0     && img[r][c-1][ch] >= p) code |= 1;
          code_seen[code]++;
          for (int wy = 0; wy < NWY; wy++)
            for (int wx = 0; wx < NWX; wx++)
              if (r >= wy*ST && r < wy*ST + WN && c >= wx*ST && c < wx*ST + WN)
                h[wy*NWX+wx][ch][code]++;
        end
    return h;
  endfunction

  // drive on the falling edge; a row moves on the next rising edge
  task automatic send_image(logic [R-1:0][C-1:0][CH-1:0][PB-1:0] img, bit gaps);
    for (int r = 0; r < R; r++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_row = img[r];
      #1;
      while (!in_ready) begin n_ready_low++; @(negedge clk); #1; end
      if (r == R - 1) t_last.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (!in_ready && !in_valid) n_ready_low++;
    if (out_valid) begin
      hist_t e; int tl;
      e = exp_q.pop_front(); tl = t_last.pop_front();
      checks += 2;
      if (hist !== e) begin failures++; if (failures < 5) $display("FAIL histogram mismatch"); end
      if (cyc - tl != 3) begin failures++; $display("FAIL latency %0d", cyc - tl); end
    end
  end

  initial begin
    int t0, n_img;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    n_img = 0;
    for (int i = 0; i < 40; i++) begin
      logic [R-1:0][C-1:0][CH-1:0][PB-1:0] img;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int ch = 0; ch < CH; ch++)
            img[r][c][ch] = (i % 10 == 3) ? 4'd7 : (i % 10 == 5) ? 4'(2 * $urandom_range(0, 1) * 7)
                                               : 4'($urandom);
      exp_q.push_back(reference(img));
      send_image(img, i < 20);
      n_img++;
      if (i == 19) begin repeat (3) @(negedge clk); n_ready_low = 0; t0 = cyc; end
    end
    // full-rate part: 20 images, one cycle with in_ready low per image
    checks += 2;
    if (cyc - t0 > 20 * (R + 1) + 1) begin failures++; $display("FAIL rate: %0d cycles for 20 images", cyc - t0); end
    else $display("20 images in %0d cycles (ROWS+1 = %0d per image)", cyc - t0, R + 1);
    if (n_ready_low != 20 && n_ready_low != 19) begin failures++; $display("FAIL in_ready low %0d times", n_ready_low); end
    repeat (6) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d images missing", exp_q.size()); end
    for (int k = 0; k < 16; k++) if (code_seen[k] == 0) begin failures++; $display("FAIL code %0d never seen", k); break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
