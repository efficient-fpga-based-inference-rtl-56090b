// tb_tanh_range_decoder: sweeps every 11-bit input and checks the region
// against boundaries written out independently (pass below 59, saturation
// from 712, sample points on multiples of 4).
module tb_tanh_range_decoder;
  import tanh_pkg::*;
  logic [10:0] z;
  region_e     region, exp_r;
  int checks = 0, failures = 0;

  tanh_range_decoder dut (.z(z), .region(region));

  initial begin
    for (int v = 0; v < 2048; v++) begin
      z = 11'(v);
      #1;
      if (v < 59)            exp_r = REG_PASS;
      else if (v >= 712)     exp_r = REG_SAT;
      else if (v % 4 == 0)   exp_r = REG_SAMPLE;
      else                   exp_r = REG_INTERP;
      checks++;
      if (region != exp_r) begin
        failures++;
        if (failures < 10) $display("z=%0d region=%0d expected=%0d", v, region, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
