// tb_polybinn: the full MNIST-size classifier (784 pixels, 10 classes,
// 20 trees per class) with the original and the simplified voting. Random
// images, one per cycle with gaps; the expected class is computed from the
// tree model (binarize at 128, truth tables, weighted vote, voting rules).
// Checks the 7-cycle latency and the one-image-per-cycle rate.
module tb_polybinn;
  import polybinn_model_pkg::*;
  localparam int NF = 784, M = 10, N = 20, LAT = 7;
  localparam int PR [M] = '{1, 7, 3, 2, 9, 0, 6, 8, 4, 5};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NF-1:0][7:0] pixels = '0;
  logic ov_o, ov_s;
  logic [M-1:0] oh_o, oh_s;
  int checks = 0, failures = 0, n_none = 0, n_many = 0, cyc = 0;
  int exp_o [$], exp_s [$], t_in [$];
  int cls_seen [M];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #5_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  polybinn #(.SIMPLIFIED(0)) dut_o (.clk, .rst_n, .in_valid, .pixels, .out_valid(ov_o), .onehot(oh_o));
  polybinn #(.SIMPLIFIED(1)) dut_s (.clk, .rst_n, .in_valid, .pixels, .out_valid(ov_s), .onehot(oh_s));

  task automatic reference(input logic [NF-1:0][7:0] px, output int eo, output int es);
    logic [M-1:0] dv; int cv [M];
    for (int m = 0; m < M; m++) begin
      real s, t;
      s = 0; t = 0;
      for (int n = 0; n < N; n++) begin
        logic [63:0] lut; int j;
        lut = tree_lut(0, m, n);
        j = 0;
        for (int k = 0; k < K; k++) j |= int'(px[tree_feature(0, m, n, k, NF)] >= 128) << k;
        t += tree_conf(0, m, n);
        if (lut[j]) s += tree_conf(0, m, n);
      end
      dv[m] = s > t / 2;
      cv[m] = $floor(4.0 * s / t);
      if (cv[m] > 3) cv[m] = 3;
    end
    eo = -1;
    for (int i = 0; i < M; i++)
      if (|dv ? (dv[i] && (eo < 0 || cv[i] > cv[eo])) : (eo < 0 || cv[i] < cv[eo])) eo = i;
    es = PR[0];
    for (int i = M - 1; i >= 0; i--) if (dv[PR[i]]) es = PR[i];
    if (dv == 0) n_none++; else if (!$onehot(dv)) n_many++;
  endtask

  always @(posedge clk) if (rst_n && ov_o) begin
    int eo, es, ti;
    eo = exp_o.pop_front(); es = exp_s.pop_front(); ti = t_in.pop_front();
    checks += 3;
    cls_seen[eo]++;
    if (oh_o !== M'(1) << eo) begin failures++; if (failures < 6) $display("FAIL orig %b exp %0d", oh_o, eo); end
    if (oh_s !== M'(1) << es || !ov_s) begin failures++; if (failures < 6) $display("FAIL simp %b exp %0d", oh_s, es); end
    if (cyc - ti != LAT) begin failures++; if (failures < 6) $display("FAIL latency %0d", cyc - ti); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      logic [NF-1:0][7:0] px; int eo, es; bit v;
      for (int i = 0; i < NF; i++) px[i] = 8'($urandom);
      v = (t % 9 != 8);
      pixels <= px; in_valid <= v;
      if (v) begin
        reference(px, eo, es);
        exp_o.push_back(eo); exp_s.push_back(es); t_in.push_back(cyc + 1);
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks += 2;
    if (exp_o.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_o.size()); end
    if (n_none == 0 || n_many == 0) failures++;
    $display("no class active: %0d, several active: %0d", n_none, n_many);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
