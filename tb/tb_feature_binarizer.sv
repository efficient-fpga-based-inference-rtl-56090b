// tb_feature_binarizer: random feature vectors, including values equal to
// and next to the threshold, against feature >= threshold; checks the
// one-cycle latency and that valid follows the data.
module tb_feature_binarizer;
  localparam int N = 12, W = 8;
  localparam logic [N-1:0][W-1:0] TH = {8'd0, 8'd255, 8'd1, 8'd200, 8'd17, 8'd128,
                                        8'd128, 8'd64, 8'd99, 8'd3, 8'd250, 8'd128};
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_valid_d;
  logic [N-1:0][W-1:0] feat = '0;
  logic [N-1:0] bits, bits_d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin #1_000_000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  feature_binarizer #(.N(N), .W(W), .THRESH(TH)) dut (.*);
  feature_binarizer #(.N(N), .W(W)) dut_d (.clk, .rst_n, .in_valid, .feat, .out_valid(out_valid_d), .bits(bits_d));

  initial begin
    logic [N-1:0] exp_b, exp_d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        int r; r = $urandom_range(0, 3);
        feat[i] <= (r == 0) ? TH[i] : (r == 1) ? TH[i] - 1 : W'($urandom_range(0, 255));
      end
      in_valid <= (t % 5 != 4);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin exp_b[i] = feat[i] >= TH[i]; exp_d[i] = feat[i] >= 128; end
      #1;
      checks++;
      if (out_valid !== (t % 5 != 4) || out_valid_d !== out_valid || bits !== exp_b || bits_d !== exp_d) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d bits=%h exp=%h", t, bits, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
