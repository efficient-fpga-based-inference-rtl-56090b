// tb_dctif_interp: drives every input code of the processing region into the
// interpolator and compares with a reference that applies the 4-tap filter
// coefficients of the s = 4 table ({-2,15,3,0}, {-2,10,10,-2}, {0,3,15,-2})
// as plain multiplications to samples of tanh computed here. Also checks
// the three-cycle latency and the one-result-per-two-cycles rate.
module tb_dctif_interp;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [10:0] z = '0;
  logic        out_valid;
  logic [7:0]  dctif, sample;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  dctif_interp dut (.*);

  function automatic int samp(int k);
    real v;
    v = $floor($tanh(real'(k) / 64.0) * 256.0 + 0.5);
    if (v > 255.0) v = 255.0;
    return int'(v);
  endfunction

  function automatic int ref_val(int v);
    int i, r, a, b, c, d, s;
    i = v / 4; r = v % 4;
    a = samp(i - 1); b = samp(i); c = samp(i + 1); d = samp(i + 2);
    case (r)
      0: return b;
      1: s = -2 * a + 15 * b + 3 * c + 0 * d;
      2: s = -2 * a + 10 * b + 10 * c - 2 * d;
      default: s = 0 * a + 3 * b + 15 * c - 2 * d;
    endcase
    s = (s + 8) / 16;   // s is positive here
    if (s > 255) s = 255;
    return s;
  endfunction

  int exp_q[$];
  int acc_cycle[$];
  int last_out = -1;

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      exp_q.push_back(int'(z));
      acc_cycle.push_back(cycle);
    end
    if (out_valid) begin
      int v, c0;
      v = exp_q.pop_front();
      c0 = acc_cycle.pop_front();
      checks++;
      if (int'(dctif) != ref_val(v)) begin
        failures++;
        if (failures < 10) $display("z=%0d dctif=%0d expected=%0d", v, dctif, ref_val(v));
      end
      checks++;
      if (int'(sample) != samp(v / 4)) begin
        failures++;
        if (failures < 10) $display("z=%0d sample=%0d expected=%0d", v, sample, samp(v / 4));
      end
      checks++;
      if (cycle - c0 != 3) begin
        failures++;
        $display("latency %0d, expected 3", cycle - c0);
      end
      if (last_out >= 0) begin
        checks++;
        if (cycle - last_out != 2) begin
          failures++;
          $display("result spacing %0d, expected 2", cycle - last_out);
        end
      end
      last_out = cycle;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 59; v < 712; v++) begin
      in_valid <= 1;
      z <= 11'(v);
      @(posedge clk iff in_ready);
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
