// tb_image_downsampler: random 32x32 3-channel 4-bit images streamed one
// row per cycle with gaps and with in_ready low on some cycles; the
// expected 8x8 image is the mean of each 4x4 block per channel, rounded
// down. Checks out_valid 1 cycle after the last accepted row.
module tb_image_downsampler;
  localparam int R = 32, C = 32, CH = 3, PB = 4, F = 4, DR = 8, DC = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready = 1, out_valid;
  logic [C-1:0][CH-1:0][PB-1:0] in_row = '0;
  logic [DR-1:0][DC-1:0][CH-1:0][PB-1:0] di, exp_di;
  int checks = 0, failures = 0, cyc = 0, t_last = 0, n_out = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  image_downsampler dut (.*);

  always @(negedge clk) if (rst_n && out_valid) begin
    n_out++;
    checks += 2;
    if (di !== exp_di) begin failures++; if (failures < 5) $display("FAIL image mismatch"); end
    if (cyc - t_last != 1) begin failures++; $display("FAIL latency %0d", cyc - t_last); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      logic [R-1:0][C-1:0][CH-1:0][PB-1:0] img;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int ch = 0; ch < CH; ch++)
        img[r][c][ch] = (i == 0) ? 4'hF : 4'($urandom);
      for (int y = 0; y < DR; y++) for (int x = 0; x < DC; x++) for (int ch = 0; ch < CH; ch++) begin
        int s; s = 0;
        for (int a = 0; a < F; a++) for (int b = 0; b < F; b++) s += img[y*F+a][x*F+b][ch];
        exp_di[y][x][ch] = 4'(s / (F * F));
      end
      for (int r = 0; r < R; r++) begin
        in_row = img[r];
        forever begin
          in_valid = ($urandom_range(0, 3) != 0);
          in_ready = ($urandom_range(0, 4) != 0);
          if (in_valid && in_ready) break;
          @(negedge clk);
        end
        if (r == R - 1) t_last = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != 20) begin failures++; $display("FAIL %0d images out", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
