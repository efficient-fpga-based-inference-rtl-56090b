// snn_stream_loader: AXI4-Stream sink that fills the SNN overlay memories.
//
// The published design streams weights, biases and quantized inputs from the
// processor to the programmable logic over AXI4-Stream; the order of the
// data and the choice of destination are this design's own. The control
// register selects the target; any write to it restarts the counters.
//   hidden weights : n_hidden x n_inputs beats, neuron-major:
//                    weight (h, i) goes to hidden neuron h, address i
//   hidden biases  : n_hidden beats
//   output weights : n_outputs x n_hidden beats, weight (o, h) to output
//                    neuron o, address h
//   output biases  : n_outputs beats
//   inputs         : any number of beats, tdata[2:0] pushed into the inputs
//                    FIFO; tready follows the FIFO's free space
// A value sits in tdata[7:0] (tdata[2:0] for an input code). For the four
// parameter targets, tready drops once the expected count has arrived and
// done goes high; tlast is not needed and is ignored.
//
// Timing: one beat per cycle; each accepted beat produces a one-cycle
// write strobe in the same cycle (write ports are synchronous).
module snn_stream_loader
  import snn_pkg::*;
#(
  parameter int MAX_IN = 1000,
  parameter int N_HID  = 2450,
  parameter int N_OUT  = 30,
  parameter int IW     = $clog2(MAX_IN),
  parameter int HW     = $clog2(N_HID),
  parameter int OW     = $clog2(N_OUT)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  stream_target_e target,
  input  logic           restart,
  input  logic [15:0]    n_inputs,
  input  logic [15:0]    n_hidden,
  input  logic [15:0]    n_outputs,
  // AXI4-Stream slave
  input  logic [31:0]    s_axis_tdata,
  input  logic           s_axis_tvalid,
  output logic           s_axis_tready,
  // memory write ports
  output logic           hw_we,       // hidden weight
  output logic [HW-1:0]  hw_neuron,
  output logic [IW-1:0]  hw_addr,
  output logic           hb_we,       // hidden bias
  output logic [HW-1:0]  hb_neuron,
  output logic           ow_we,       // output weight
  output logic [OW-1:0]  ow_neuron,
  output logic [HW-1:0]  ow_addr,
  output logic           ob_we,       // output bias
  output logic [OW-1:0]  ob_neuron,
  output logic [WEIGHT_W-1:0] wdata,
  output logic           in_push,     // inputs FIFO
  output logic [CODE_W-1:0] in_code,
  input  logic           in_full,
  output logic           done
);
  logic [15:0] inner, outer;    // inner index runs fastest
  logic [15:0] inner_n, outer_n;
  logic        beat;

  always_comb begin
    unique case (target)
      TGT_HID_WEIGHTS: begin inner_n = n_inputs; outer_n = n_hidden;  end
      TGT_HID_BIASES:  begin inner_n = n_hidden; outer_n = 16'd1;     end
      TGT_OUT_WEIGHTS: begin inner_n = n_hidden; outer_n = n_outputs; end
      TGT_OUT_BIASES:  begin inner_n = n_outputs; outer_n = 16'd1;    end
      default:         begin inner_n = 16'd1;    outer_n = 16'd1;     end
    endcase
  end

  assign s_axis_tready = (target == TGT_INPUTS) ? !in_full : !done;
  assign beat          = s_axis_tvalid && s_axis_tready;
  assign wdata         = s_axis_tdata[WEIGHT_W-1:0];
  assign in_code       = s_axis_tdata[CODE_W-1:0];

  assign hw_we     = beat && (target == TGT_HID_WEIGHTS);
  assign hw_neuron = HW'(outer);
  assign hw_addr   = IW'(inner);
  assign hb_we     = beat && (target == TGT_HID_BIASES);
  assign hb_neuron = HW'(inner);
  assign ow_we     = beat && (target == TGT_OUT_WEIGHTS);
  assign ow_neuron = OW'(outer);
  assign ow_addr   = HW'(inner);
  assign ob_we     = beat && (target == TGT_OUT_BIASES);
  assign ob_neuron = OW'(inner);
  assign in_push   = beat && (target == TGT_INPUTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inner <= '0;
      outer <= '0;
      done  <= 1'b0;
    end else if (restart) begin
      inner <= '0;
      outer <= '0;
      done  <= 1'b0;
    end else if (beat && target != TGT_INPUTS) begin
      if (inner == inner_n - 1'b1) begin
        inner <= '0;
        if (outer == outer_n - 1'b1) begin
          outer <= '0;
          done  <= 1'b1;
        end else begin
          outer <= outer + 1'b1;
        end
      end else begin
        inner <= inner + 1'b1;
      end
    end
  end
endmodule
