// tb_decision_fusion: random confidences of 9 windows x 10 classes, one
// vector per cycle with gaps (including all-equal and single-winner
// vectors). Expected: per-class sums and the class with the highest sum,
// lowest index on ties. Checks the latency 1 + ceil(log2 10) + 1 = 6.
module tb_decision_fusion;
  localparam int W = 9, M = 10, LAT = 6, SW = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W-1:0][M-1:0][1:0] conf = '0;
  logic [M-1:0] onehot;
  logic [M-1:0][SW-1:0] score;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q [$], t_q [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  decision_fusion #(.W(W), .M(M)) dut (.*);

  always @(negedge clk) if (rst_n && out_valid) begin
    int e, t;
    e = exp_q.pop_front(); t = t_q.pop_front();
    checks += 2;
    if (onehot !== M'(1) << e) begin failures++; if (failures < 5) $display("FAIL %b exp %0d", onehot, e); end
    if (cyc - t != LAT) begin failures++; if (failures < 5) $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      int best, bs;
      for (int w = 0; w < W; w++) for (int m = 0; m < M; m++)
        conf[w][m] = (i % 50 == 7) ? 2'd1 : 2'($urandom);
      if (i % 50 == 9) begin conf = '0; conf[4][6] = 2'd1; end
      best = 0; bs = -1;
      for (int m = 0; m < M; m++) begin
        int s; s = 0;
        for (int w = 0; w < W; w++) s += conf[w][m];
        if (s > bs) begin bs = s; best = m; end
      end
      in_valid = (i % 6 != 5);
      if (in_valid) begin exp_q.push_back(best); t_q.push_back(cyc); end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
