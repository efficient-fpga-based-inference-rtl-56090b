// tb_tanh_dctif: feeds all 2048 input codes (3 integer, 8 fraction bits)
// with random gaps and compares every output with the exact tanh: the error
// must stay within 0.004, the maximum error reported for this format. Also
// checks the region reported, latency (3 cycles) and that each of the four
// multiplexer inputs is used.
module tb_tanh_dctif;
  import tanh_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [10:0] z = '0;
  logic        out_valid;
  logic [7:0]  tanh_z;
  region_e     out_region;
  int checks = 0, failures = 0, cycle = 0;
  int used[4] = '{0, 0, 0, 0};
  real max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  tanh_dctif dut (.*);

  int exp_q[$], acc_cycle[$];
  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      exp_q.push_back(int'(z));
      acc_cycle.push_back(cycle);
    end
    if (out_valid) begin
      int v, c0;
      real err;
      region_e er;
      v  = exp_q.pop_front();
      c0 = acc_cycle.pop_front();
      err = $tanh(real'(v) / 256.0) - real'(tanh_z) / 256.0;
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 0.004) begin
        failures++;
        if (failures < 10) $display("z=%0d out=%0d err=%f", v, tanh_z, err);
      end
      er = (v < 59) ? REG_PASS : (v >= 712) ? REG_SAT : (v % 4 == 0) ? REG_SAMPLE : REG_INTERP;
      checks++;
      if (out_region != er) begin
        failures++;
        $display("z=%0d region %0d expected %0d", v, out_region, er);
      end
      used[int'(out_region)]++;
      checks++;
      if (cycle - c0 != 3) begin
        failures++;
        $display("latency %0d", cycle - c0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < 2048; v++) begin
      in_valid <= 1;
      z <= 11'(v);
      @(posedge clk iff in_ready);
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("results missing"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (used[k] == 0) begin failures++; $display("region %0d never used", k); end
    end
    $display("max |error| = %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
