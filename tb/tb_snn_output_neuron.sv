// tb_snn_output_neuron: random weights, activations and biases; the
// expected output is the bias plus the sum of weight x activation value
// (1, 1/2, 1/4, 0 and negatives) in units of 1/4, with saturation.
module tb_snn_output_neuron;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bias_we = 0, load_bias = 0, en = 0;
  logic [7:0] bias_wdata = '0, weight = '0;
  act_code_t act = 3'b111;
  logic signed [15:0] out;
  int checks = 0, failures = 0;
  const act_code_t codes[7] = '{3'b000, 3'b001, 3'b010, 3'b111, 3'b110, 3'b101, 3'b100};
  const int quarters[7] = '{4, 2, 1, 0, -1, -2, -4};

  always #5 clk = ~clk;
  snn_output_neuron dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int trial = 0; trial < 300; trial++) begin
      int b, exp_q, n;
      b = $urandom_range(0, 255);
      if (b > 127) b -= 256;
      bias_we <= 1; bias_wdata <= 8'(b);
      @(posedge clk);
      bias_we <= 0; load_bias <= 1;
      @(posedge clk);
      load_bias <= 0;
      exp_q = 4 * b;
      n = (trial % 10 == 0) ? 120 : $urandom_range(1, 20);
      for (int k = 0; k < n; k++) begin
        int w, s, t;
        w = $urandom_range(0, 255);
        if (w > 127) w -= 256;
        if (trial % 10 == 0) begin w = (trial % 20 == 0) ? 127 : -128; s = (trial % 20 == 0) ? 0 : 0; end
        else s = $urandom_range(0, 6);
        en <= 1; weight <= 8'(w); act <= codes[s];
        @(posedge clk);
        // w * value in quarters: exact because the weight is scaled by 4 first
        t = w * quarters[s];
        exp_q += t;
        if (exp_q > 32767) exp_q = 32767;
        if (exp_q < -32768) exp_q = -32768;
      end
      en <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (int'(out) != exp_q) begin
        failures++;
        if (failures < 10) $display("out=%0d expected %0d", out, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
