// tb_polybinn_class_vote: all 2^N tree-output patterns for two confidence
// sets; D must equal (sum d c > sum c / 2) and C must equal
// floor(4 sum(d c) / sum(c)) limited to 3.
module tb_polybinn_class_vote;
  localparam int N = 9;
  localparam logic [N-1:0][7:0] CA = {8'd200, 8'd17, 8'd255, 8'd64, 8'd90, 8'd128, 8'd33, 8'd250, 8'd16};
  localparam logic [N-1:0][7:0] CB = {N{8'd100}};
  logic [N-1:0] d = '0;
  logic dec_a, dec_b;
  logic [1:0] conf_a, conf_b;
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};
  initial begin #1_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  polybinn_class_vote #(.N(N), .CONF(CA)) dut_a (.d, .dec(dec_a), .conf(conf_a));
  polybinn_class_vote #(.N(N), .CONF(CB)) dut_b (.d, .dec(dec_b), .conf(conf_b));

  task automatic check(logic [N-1:0][7:0] c, logic dec, logic [1:0] conf);
    real s, t; int q; logic de;
    s = 0; t = 0;
    for (int n = 0; n < N; n++) begin t += c[n]; if (d[n]) s += c[n]; end
    de = s > t / 2;
    q = $floor(4.0 * s / t);
    if (q > 3) q = 3;
    hist[q]++;
    checks++;
    if (dec !== de || conf !== 2'(q)) begin
      failures++;
      if (failures < 5) $display("FAIL d=%b dec=%b/%b conf=%0d/%0d", d, dec, de, conf, q);
    end
  endtask

  initial begin
    for (int i = 0; i < 2 ** N; i++) begin
      d = N'(i);
      #1;
      check(CA, dec_a, conf_a);
      check(CB, dec_b, conf_b);
    end
    checks++;
    if (hist[0] == 0 || hist[1] == 0 || hist[2] == 0 || hist[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
