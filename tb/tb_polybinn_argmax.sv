// tb_polybinn_argmax: one random (D, C) vector per cycle with gaps, to the
// original and the simplified voting. Expected classes come from the rules:
// original = the active class with the highest C, or if none is active the
// class with the lowest C, lower index on ties; simplified = the first
// active class in priority order, or the first priority class if none.
// Checks the latency ceil(log2 M) + 1 and the one-vector-per-cycle rate,
// and that the cases none / one / several active all occur.
module tb_polybinn_argmax;
  localparam int M = 10, LAT = 5;
  localparam int PR [M] = '{1, 7, 3, 2, 9, 0, 6, 8, 4, 5};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [M-1:0] dec = '0, oh_o, oh_s;
  logic [M-1:0][1:0] conf = '0;
  logic ov_o, ov_s;
  int checks = 0, failures = 0, n_none = 0, n_one = 0, n_many = 0, n_tie = 0;
  int exp_o [$], exp_s [$], t_in [$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #1_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  polybinn_argmax #(.M(M), .SIMPLIFIED(0)) dut_o (.clk, .rst_n, .in_valid, .dec, .conf, .out_valid(ov_o), .onehot(oh_o));
  polybinn_argmax #(.M(M), .SIMPLIFIED(1)) dut_s (.clk, .rst_n, .in_valid, .dec, .conf, .out_valid(ov_s), .onehot(oh_s));

  function automatic int ref_orig(logic [M-1:0] dv, logic [M-1:0][1:0] cv);
    int best; best = -1;
    if (|dv) begin
      for (int i = 0; i < M; i++) if (dv[i] && (best < 0 || cv[i] > cv[best])) best = i;
    end else begin
      for (int i = 0; i < M; i++) if (best < 0 || cv[i] < cv[best]) best = i;
    end
    return best;
  endfunction
  function automatic int ref_simp(logic [M-1:0] dv);
    for (int i = 0; i < M; i++) if (dv[PR[i]]) return PR[i];
    return PR[0];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ov_o) begin
      int eo, es, ti;
      eo = exp_o.pop_front(); es = exp_s.pop_front(); ti = t_in.pop_front();
      checks += 3;
      if (oh_o !== M'(1) << eo) begin failures++; if (failures < 6) $display("FAIL orig %b exp %0d", oh_o, eo); end
      if (oh_s !== M'(1) << es) begin failures++; if (failures < 6) $display("FAIL simp %b exp %0d", oh_s, es); end
      if (cyc - ti != LAT || !ov_s) begin failures++; if (failures < 6) $display("FAIL latency %0d", cyc - ti); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      logic [M-1:0] dv; logic [M-1:0][1:0] cv; int k; bit v;
      k = $urandom_range(0, 3);
      dv = (k == 0) ? '0 : (k == 1) ? M'(1) << $urandom_range(0, M - 1) : M'($urandom);
      for (int i = 0; i < M; i++) cv[i] = 2'($urandom_range(0, 3));
      if ($urandom_range(0, 4) == 0) cv = {M{2'd2}};
      v = (t % 7 != 6);
      dec <= dv; conf <= cv; in_valid <= v;
      if (v) begin
        exp_o.push_back(ref_orig(dv, cv)); exp_s.push_back(ref_simp(dv)); t_in.push_back(cyc + 1);
        if (dv == 0) n_none++; else if ($onehot(dv)) n_one++; else n_many++;
        if (cv == {M{2'd2}}) n_tie++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks += 2;
    if (exp_o.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_o.size()); end
    if (n_none == 0 || n_one == 0 || n_many == 0 || n_tie == 0) failures++;
    $display("cases: none=%0d one=%0d several=%0d all-tied=%0d", n_none, n_one, n_many, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
