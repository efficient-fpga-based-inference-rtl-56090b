// tb_snn_axil_regs: AXI4-Lite writes and reads of every register, with
// random ready delays on the response channels; checks read-back values,
// clamping of the settings, the ctrl_written pulse and the read-only
// status words.
module tb_snn_axil_regs;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  s_axil_awaddr = '0, s_axil_araddr = '0;
  logic        s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0;
  logic        s_axil_arvalid = 0, s_axil_rready = 0;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0]  s_axil_wstrb = '1;
  logic        s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  stream_target_e target;
  logic run, ctrl_written;
  logic [15:0] n_inputs, n_hidden, n_outputs;
  logic [31:0] status_i = 32'hA5A5_0001, images_i = 32'd77;
  int checks = 0, failures = 0, pulses = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (ctrl_written) pulses++;
  snn_axil_regs #(.MAX_IN(1000), .N_HID(2450), .N_OUT(30)) dut (.*);

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    s_axil_awaddr <= a; s_axil_wdata <= d; s_axil_awvalid <= 1; s_axil_wvalid <= 1;
    @(posedge clk iff (s_axil_awready && s_axil_wready));
    s_axil_awvalid <= 0; s_axil_wvalid <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    s_axil_bready <= 1;
    @(posedge clk iff s_axil_bvalid);
    s_axil_bready <= 0;
  endtask
  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    s_axil_araddr <= a; s_axil_arvalid <= 1;
    @(posedge clk iff s_axil_arready);
    s_axil_arvalid <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    s_axil_rready <= 1;
    @(posedge clk iff s_axil_rvalid);
    d = s_axil_rdata;
    s_axil_rready <= 0;
  endtask
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axil_read(8'h04, d); expect_eq("reset N_INPUTS", d, 1000);
    axil_read(8'h08, d); expect_eq("reset N_HIDDEN", d, 2450);
    axil_write(8'h04, 784);  axil_read(8'h04, d); expect_eq("N_INPUTS", d, 784);
    axil_write(8'h08, 1024); axil_read(8'h08, d); expect_eq("N_HIDDEN", d, 1024);
    axil_write(8'h0C, 10);   axil_read(8'h0C, d); expect_eq("N_OUTPUTS", d, 10);
    expect_eq("n_inputs port", 32'(n_inputs), 784);
    expect_eq("n_hidden port", 32'(n_hidden), 1024);
    expect_eq("n_outputs port", 32'(n_outputs), 10);
    axil_write(8'h04, 5000); axil_read(8'h04, d); expect_eq("N_INPUTS clamp", d, 1000);
    axil_write(8'h0C, 0);    axil_read(8'h0C, d); expect_eq("N_OUTPUTS clamp", d, 1);
    axil_write(8'h00, 32'h104);
    expect_eq("target", 32'(target), 32'(TGT_INPUTS));
    expect_eq("run", 32'(run), 1);
    axil_read(8'h00, d); expect_eq("CTRL", d, 32'h104);
    expect_eq("ctrl pulses", pulses, 1);
    axil_read(8'h10, d); expect_eq("STATUS", d, 32'hA5A5_0001);
    axil_read(8'h14, d); expect_eq("IMAGES", d, 77);
    axil_write(8'h14, 5); axil_read(8'h14, d); expect_eq("IMAGES read only", d, 77);
    axil_read(8'h3C, d); expect_eq("unmapped", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
