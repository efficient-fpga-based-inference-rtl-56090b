// tb_snn_overlay: end-to-end test of the SNN overlay at a reduced size.
//
// Configures a network through AXI4-Lite, streams random weights, biases
// and input images through AXI4-Stream, and compares every result beat with
// a model computed here with plain integer arithmetic: hidden sum = bias +
// sum(weight * 2^(code-1)), saturated to 16 bits; activation from the real
// tanh thresholds; output = 4*bias + sum(weight * 4*activation), saturated.
// Random gaps on the input stream make the hidden layer wait for inputs;
// a hidden layer larger than the input count makes it wait for the output
// layer; random tready on the result stream adds back-pressure. Each of
// these stalls is counted and must happen. The image rate is checked
// against max(n_inputs, n_hidden) + 5 cycles per image.
module tb_snn_overlay;
  import snn_pkg::*;
  localparam int MAX_IN = 16, NH = 24, NO = 4;
  parameter int N_IN_USE = 12, N_HID_USE = 20, N_OUT_USE = 3, N_IMAGES = 12;

  logic clk = 0, rst_n = 0;
  logic [7:0]  s_axil_awaddr = '0, s_axil_araddr = '0;
  logic        s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0;
  logic        s_axil_arvalid = 0, s_axil_rready = 0;
  logic [31:0] s_axil_wdata = '0;
  logic [3:0]  s_axil_wstrb = '1;
  logic        s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  logic [31:0] s_axis_tdata = '0;
  logic        s_axis_tvalid = 0, s_axis_tready;
  logic [31:0] m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic        ev_input_stall, ev_act_stall, ev_image_done;
  int checks = 0, failures = 0;
  int n_input_stall = 0, n_act_stall = 0, n_backpressure = 0, n_done = 0;
  bit gaps = 1;

  always #5 clk = ~clk;
  snn_overlay #(.MAX_IN(MAX_IN), .N_HID(NH), .N_OUT(NO), .FIFO_DEPTH(32)) dut (.*);

  int hw[NH][MAX_IN], hb[NH], ow[NO][NH], ob[NO];
  int img[N_IMAGES][MAX_IN];
  int expected[$];
  int done_cycles[$];
  int cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (ev_input_stall) n_input_stall++;
    if (ev_act_stall) n_act_stall++;
    if (m_axis_tvalid && !m_axis_tready) n_backpressure++;
    if (ev_image_done) begin n_done++; done_cycles.push_back(cycle); end
  end

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    s_axil_awaddr <= a; s_axil_wdata <= d; s_axil_awvalid <= 1; s_axil_wvalid <= 1;
    @(posedge clk iff (s_axil_awready && s_axil_wready));
    s_axil_awvalid <= 0; s_axil_wvalid <= 0; s_axil_bready <= 1;
    @(posedge clk iff s_axil_bvalid);
    s_axil_bready <= 0;
  endtask
  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    s_axil_araddr <= a; s_axil_arvalid <= 1;
    @(posedge clk iff s_axil_arready);
    s_axil_arvalid <= 0; s_axil_rready <= 1;
    @(posedge clk iff s_axil_rvalid);
    d = s_axil_rdata;
    s_axil_rready <= 0;
  endtask
  task automatic stream(input int v);
    s_axis_tvalid <= 1; s_axis_tdata <= 32'(v);
    @(posedge clk iff s_axis_tready);
  endtask
  task automatic stream_idle(input int n);
    if (n > 0) begin
      s_axis_tvalid <= 0;
      repeat (n) @(posedge clk);
    end
  endtask
  task automatic stream_fast(input int v);
    s_axis_tvalid <= 1; s_axis_tdata <= 32'(v);
    @(posedge clk iff s_axis_tready);
  endtask

  function automatic int s8(int r);
    return (r > 127) ? r - 256 : r;
  endfunction
  function automatic int sat16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int qtanh4(int a);   // 4 x quantized tanh of a/64
    real x;
    x = real'(a) / 64.0;
    if (x >= 0.5 * $ln(7.0))        return 4;
    if (x >= 0.5 * $ln(3.0))        return 2;
    if (x >= 0.5 * $ln(5.0 / 3.0))  return 1;
    if (x <= -0.5 * $ln(7.0))       return -4;
    if (x <= -0.5 * $ln(3.0))       return -2;
    if (x <= -0.5 * $ln(5.0 / 3.0)) return -1;
    return 0;
  endfunction

  initial begin
    logic [31:0] d;
    for (int h = 0; h < NH; h++) begin
      hb[h] = s8($urandom_range(0, 255)) / 4;
      for (int i = 0; i < MAX_IN; i++) hw[h][i] = s8($urandom_range(0, 255)) / 8;
    end
    for (int o = 0; o < NO; o++) begin
      ob[o] = s8($urandom_range(0, 255));
      for (int h = 0; h < NH; h++) ow[o][h] = s8($urandom_range(0, 255));
    end
    for (int n = 0; n < N_IMAGES; n++)
      for (int i = 0; i < MAX_IN; i++) img[n][i] = $urandom_range(0, 7);
    // reference model
    for (int n = 0; n < N_IMAGES; n++) begin
      int act[NH];
      for (int h = 0; h < N_HID_USE; h++) begin
        int a;
        a = hb[h];
        for (int i = 0; i < N_IN_USE; i++)
          a = sat16(a + hw[h][i] * ((img[n][i] == 0) ? 0 : (1 << (img[n][i] - 1))));
        act[h] = qtanh4(a);
      end
      for (int o = 0; o < N_OUT_USE; o++) begin
        int y;
        y = 4 * ob[o];
        for (int h = 0; h < N_HID_USE; h++) y = sat16(y + ow[o][h] * act[h]);
        expected.push_back(y);
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axil_write(8'h04, N_IN_USE);
    axil_write(8'h08, N_HID_USE);
    axil_write(8'h0C, N_OUT_USE);
    axil_write(8'h00, 32'(TGT_HID_WEIGHTS));
    for (int h = 0; h < N_HID_USE; h++) for (int i = 0; i < N_IN_USE; i++) stream(hw[h][i]);
    stream_idle(1);
    axil_read(8'h10, d);
    checks++;
    if (d[0] !== 1'b1) begin failures++; $display("load_done not set"); end
    axil_write(8'h00, 32'(TGT_HID_BIASES));
    for (int h = 0; h < N_HID_USE; h++) stream(hb[h]);
    stream_idle(1);
    axil_write(8'h00, 32'(TGT_OUT_WEIGHTS));
    for (int o = 0; o < N_OUT_USE; o++) for (int h = 0; h < N_HID_USE; h++) stream(ow[o][h]);
    stream_idle(1);
    axil_write(8'h00, 32'(TGT_OUT_BIASES));
    for (int o = 0; o < N_OUT_USE; o++) stream(ob[o]);
    stream_idle(1);
    axil_write(8'h00, 32'h100 | 32'(TGT_INPUTS));
    // first half of the images with gaps (input stalls), rest at full rate
    for (int n = 0; n < N_IMAGES; n++)
      for (int i = 0; i < N_IN_USE; i++) begin
        if (n < N_IMAGES / 2) begin
          stream(img[n][i]);
          stream_idle($urandom_range(0, 3));
        end else stream_fast(img[n][i]);
      end
    s_axis_tvalid <= 0;
  end

  // result checker with random back-pressure
  int beat_in_image = 0;
  always @(posedge clk) begin
    m_axis_tready <= (n_done < N_IMAGES / 2) ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (m_axis_tvalid && m_axis_tready) begin
      int e;
      e = expected.pop_front();
      checks++;
      if (int'($signed(m_axis_tdata)) != e) begin
        failures++;
        if (failures < 10) $display("result %0d expected %0d", $signed(m_axis_tdata), e);
      end
      checks++;
      if (m_axis_tlast != (beat_in_image == N_OUT_USE - 1)) begin failures++; $display("tlast wrong"); end
      beat_in_image = m_axis_tlast ? 0 : beat_in_image + 1;
    end
  end

  initial begin
    wait (n_done == N_IMAGES);
    repeat (5) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin failures++; $display("%0d results missing", expected.size()); end
    // steady-state image period over the back-to-back second half
    begin
      int period, bound;
      period = (done_cycles[N_IMAGES - 1] - done_cycles[N_IMAGES / 2 + 1]) / (N_IMAGES / 2 - 2);
      bound = ((N_IN_USE > N_HID_USE) ? N_IN_USE : N_HID_USE) + 5;
      $display("image period %0d cycles (bound %0d)", period, bound);
      checks++;
      if (period > bound) begin failures++; $display("image period too long"); end
    end
    checks += 3;
    if (n_input_stall == 0) begin failures++; $display("no input stall"); end
    if (n_act_stall == 0) begin failures++; $display("no activation stall"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    $display("input stalls %0d, activation stalls %0d, back-pressure %0d", n_input_stall, n_act_stall, n_backpressure);
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
