// tb_snn_hidden_neuron: random weights, input codes and biases; the
// expected accumulator is computed with ordinary multiplication by the
// decoded input value and saturation, and the expected activation by
// comparing the real-valued sum with atanh(3/4), atanh(1/2), atanh(1/4).
module tb_snn_hidden_neuron;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bias_we = 0, load_bias = 0, en = 0;
  logic [7:0] bias_wdata = '0, weight = '0;
  in_code_t in_code = '0;
  logic signed [15:0] acc;
  act_code_t act;
  int checks = 0, failures = 0;
  int seen[8] = '{default: 0};

  always #5 clk = ~clk;
  snn_hidden_neuron dut (.*);

  function automatic act_code_t ref_act(int a);
    real x;
    x = real'(a) / 64.0;
    if (x >= 0.5 * $ln(7.0))        return 3'b000;
    if (x >= 0.5 * $ln(3.0))        return 3'b001;
    if (x >= 0.5 * $ln(5.0 / 3.0))  return 3'b010;
    if (x <= -0.5 * $ln(7.0))       return 3'b100;
    if (x <= -0.5 * $ln(3.0))       return 3'b101;
    if (x <= -0.5 * $ln(5.0 / 3.0)) return 3'b110;
    return 3'b111;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int trial = 0; trial < 300; trial++) begin
      int b, exp_acc, n, range;
      b = $urandom_range(0, 255);
      if (b > 127) b -= 256;
      bias_we <= 1; bias_wdata <= 8'(b);
      @(posedge clk);
      bias_we <= 0; load_bias <= 1;
      @(posedge clk);
      load_bias <= 0;
      exp_acc = b;
      n = $urandom_range(1, 12);
      range = (trial % 3 == 0) ? 127 : 6;   // some trials saturate, most stay near 0
      for (int k = 0; k < n; k++) begin
        int w, c, v;
        w = $urandom_range(0, 2 * range) - range;
        c = (trial % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(0, 4);
        v = (c == 0) ? 0 : (1 << (c - 1));
        en <= 1; weight <= 8'(w); in_code <= 3'(c);
        @(posedge clk);
        exp_acc += w * v;
        if (exp_acc > 32767) exp_acc = 32767;
        if (exp_acc < -32768) exp_acc = -32768;
      end
      en <= 0;
      @(posedge clk);   // encoder registers
      #1;
      checks++;
      if (int'(acc) != exp_acc) begin
        failures++;
        if (failures < 10) $display("acc=%0d expected %0d", acc, exp_acc);
      end
      checks++;
      if (act != ref_act(exp_acc)) begin
        failures++;
        if (failures < 10) $display("acc=%0d act=%b expected %b", exp_acc, act, ref_act(exp_acc));
      end
      seen[act]++;
    end
    foreach (seen[k]) if (k != 3) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("activation %b never produced", 3'(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
