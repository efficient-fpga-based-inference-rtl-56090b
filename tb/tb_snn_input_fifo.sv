// tb_snn_input_fifo: random pushes and pops against a queue model; checks
// data order, the one-cycle read latency, full, empty and count.
module tb_snn_input_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [2:0] wdata = '0, rdata;
  logic full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [2:0] model[$];
  int expect_data = -1;

  always #5 clk = ~clk;
  snn_input_fifo #(.DEPTH(16), .W(3)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    #1;
    if (expect_data >= 0) begin
      checks++;
      if (int'(rdata) != expect_data) begin failures++; $display("rdata %0d expected %0d", rdata, expect_data); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      logic p, q;
      int mode;
      mode = (i / 200) % 3;
      p = (mode == 0) ? ($urandom_range(0, 3) != 0) : (mode == 1) ? ($urandom_range(0, 3) == 0) : $urandom_range(0, 1);
      q = (mode == 0) ? ($urandom_range(0, 3) == 0) : (mode == 1) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
      p = p && (model.size() < 16);
      q = q && (model.size() > 0);
      push <= p; pop <= q; wdata <= 3'($urandom);
      #1;
      checks++;
      if (count != 5'(model.size()) || full != (model.size() == 16) || empty != (model.size() == 0)) begin
        failures++; $display("count %0d full %b empty %b, model %0d", count, full, empty, model.size());
      end
      if (full) fulls++;
      @(posedge clk);
      expect_data = q ? int'(model.pop_front()) : -1;
      if (p) model.push_back(wdata);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
