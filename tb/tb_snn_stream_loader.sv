// tb_snn_stream_loader: streams each kind of data with random valid gaps
// and checks that every beat produces the right write strobe, neuron index
// and address (neuron-major order), that done rises after the expected
// count and that input codes follow the FIFO's full flag.
module tb_snn_stream_loader;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  stream_target_e target = TGT_HID_WEIGHTS;
  logic restart = 0;
  logic [15:0] n_inputs = 5, n_hidden = 3, n_outputs = 2;
  logic [31:0] s_axis_tdata = '0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic hw_we, hb_we, ow_we, ob_we, in_push, done;
  logic [2:0] hw_neuron, hb_neuron, ow_addr;
  logic [3:0] hw_addr;
  logic [1:0] ow_neuron, ob_neuron;
  logic [7:0] wdata;
  logic [2:0] in_code;
  logic in_full = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  snn_stream_loader #(.MAX_IN(10), .N_HID(6), .N_OUT(4)) dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic send(input stream_target_e t, input int outer_n, input int inner_n);
    target <= t; restart <= 1;
    @(posedge clk);
    restart <= 0;
    for (int o = 0; o < outer_n; o++)
      for (int i = 0; i < inner_n; i++) begin
        s_axis_tvalid <= 1; s_axis_tdata <= 32'(o * 16 + i);
        @(posedge clk iff s_axis_tready);
        case (t)
          TGT_HID_WEIGHTS: begin check("hw_we", hw_we, 1); check("hw_neuron", hw_neuron, o); check("hw_addr", hw_addr, i); end
          TGT_HID_BIASES:  begin check("hb_we", hb_we, 1); check("hb_neuron", hb_neuron, i); end
          TGT_OUT_WEIGHTS: begin check("ow_we", ow_we, 1); check("ow_neuron", ow_neuron, o); check("ow_addr", ow_addr, i); end
          default:         begin check("ob_we", ob_we, 1); check("ob_neuron", ob_neuron, i); end
        endcase
        check("wdata", wdata, o * 16 + i);
        if ($urandom_range(0, 2) == 0) begin s_axis_tvalid <= 0; @(posedge clk); end
      end
    s_axis_tvalid <= 0;
    @(posedge clk);
    check("done", done, 1);
    check("tready after done", s_axis_tready, 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send(TGT_HID_WEIGHTS, 3, 5);
    send(TGT_HID_BIASES, 1, 3);
    send(TGT_OUT_WEIGHTS, 2, 3);
    send(TGT_OUT_BIASES, 1, 2);
    target <= TGT_INPUTS; restart <= 1;
    @(posedge clk);
    restart <= 0;
    for (int i = 0; i < 20; i++) begin
      in_full <= (i % 4 == 3);
      s_axis_tvalid <= 1; s_axis_tdata <= 32'(i % 8);
      #1;
      check("tready vs full", s_axis_tready, (i % 4 == 3) ? 0 : 1);
      check("in_push", in_push, (i % 4 == 3) ? 0 : 1);
      check("in_code", in_code, i % 8);
      @(posedge clk);
    end
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
