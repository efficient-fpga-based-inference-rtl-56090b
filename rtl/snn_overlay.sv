// snn_overlay: programmable-logic side of the multiplier-less
// single-hidden-layer neural network (SNN) inference overlay.
//
// The overlay is built once with N_HID hidden and N_OUT output neurons
// (defaults 2450 and 30, the largest configuration of the published design) and
// any network up to that size is run by writing its settings, weights and
// biases, without rebuilding the hardware. Inputs are power-of-two codes
// and hidden activations are power-of-two quantized tanh values, so every
// "multiplication" is a shift.
//
// Data flow (as published): every cycle of the hidden phase one input code is
// read from the inputs BRAM and broadcast to all hidden neurons, each of
// which reads the matching weight from its own weights BRAM and
// accumulates. After n_inputs cycles the priority encoders give the 3-bit
// activations. In the output phase the activations are read one per cycle
// from the activations memory, shared by all output neurons, each reading
// its own weight BRAM; after n_hidden cycles the outputs are ready.
//
// This design's choices: the inputs BRAM is a FIFO so inputs can stream in
// continuously; the activations memory is a register array written by all
// hidden neurons at once; the two phases are two sequencers that overlap,
// the hidden layer working on image k+1 while the output layer finishes
// image k (it waits if the activations memory is still in use: a stall);
// the hidden phase also stalls while the inputs FIFO is empty; the
// n_outputs results of an image are sent back as 32-bit sign-extended
// AXI4-Stream beats, tlast on the last (the published design only says that
// results go back to the processor).
//
// Steady-state rate: one image per max(n_inputs, n_hidden) + 5 cycles.
module snn_overlay
  import snn_pkg::*;
#(
  parameter int MAX_IN    = 1000,
  parameter int N_HID     = 2450,
  parameter int N_OUT     = 30,
  parameter int FIFO_DEPTH = 2048,
  parameter int ACC_FRAC  = 6,
  parameter int OUT_FRAC  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite settings and control
  input  logic [7:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4-Stream data in (weights, biases, inputs)
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // AXI4-Stream results out
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // event strobes, for observation
  output logic        ev_input_stall,
  output logic        ev_act_stall,
  output logic        ev_image_done
);
  localparam int IW = $clog2(MAX_IN);
  localparam int HW = $clog2(N_HID);
  localparam int OW = $clog2(N_OUT);

  // ------------------------------------------------------------ settings
  stream_target_e target;
  logic        run, ctrl_written, load_done;
  logic [15:0] n_inputs, n_hidden, n_outputs;
  logic [31:0] status, images;

  snn_axil_regs #(.MAX_IN(MAX_IN), .N_HID(N_HID), .N_OUT(N_OUT)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .target, .run, .n_inputs, .n_hidden, .n_outputs, .ctrl_written,
    .status_i(status), .images_i(images)
  );

  // -------------------------------------------------------------- loader
  logic                hw_we, hb_we, ow_we, ob_we, in_push, in_full;
  logic [HW-1:0]       hw_neuron, hb_neuron, ow_addr;
  logic [IW-1:0]       hw_addr;
  logic [OW-1:0]       ow_neuron, ob_neuron;
  logic [WEIGHT_W-1:0] wdata;
  in_code_t            in_wcode;

  snn_stream_loader #(.MAX_IN(MAX_IN), .N_HID(N_HID), .N_OUT(N_OUT)) u_loader (
    .clk, .rst_n, .target, .restart(ctrl_written),
    .n_inputs, .n_hidden, .n_outputs,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready,
    .hw_we, .hw_neuron, .hw_addr, .hb_we, .hb_neuron,
    .ow_we, .ow_neuron, .ow_addr, .ob_we, .ob_neuron, .wdata,
    .in_push, .in_code(in_wcode), .in_full, .done(load_done)
  );

  // ---------------------------------------------------------- inputs BRAM
  logic     in_pop, in_empty;
  in_code_t in_rcode;
  logic [$clog2(FIFO_DEPTH):0] in_count;

  snn_input_fifo #(.DEPTH(FIFO_DEPTH), .W(CODE_W)) u_inputs (
    .clk, .rst_n, .push(in_push), .wdata(in_wcode), .pop(in_pop),
    .rdata(in_rcode), .full(in_full), .empty(in_empty), .count(in_count)
  );

  // ------------------------------------------------- hidden-layer sequencer
  typedef enum logic [2:0] {H_IDLE, H_BIAS, H_ACC, H_DRAIN, H_ENC, H_XFER} hstate_e;
  hstate_e       hs;
  logic [15:0]   h_cnt;
  logic [IW-1:0] h_raddr;
  logic          h_en, h_load, act_full, act_xfer;

  assign in_pop   = (hs == H_ACC) && !in_empty && (h_cnt < n_inputs);
  assign h_load   = (hs == H_BIAS);
  assign act_xfer = (hs == H_XFER) && !act_full;
  assign ev_input_stall = (hs == H_ACC) && in_empty && (h_cnt < n_inputs);
  assign ev_act_stall   = (hs == H_XFER) && act_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs      <= H_IDLE;
      h_cnt   <= '0;
      h_raddr <= '0;
      h_en    <= 1'b0;
    end else begin
      h_en <= in_pop;          // data from both BRAMs arrives next cycle
      unique case (hs)
        H_IDLE:  if (run) hs <= H_BIAS;
        H_BIAS:  begin h_cnt <= '0; h_raddr <= '0; hs <= H_ACC; end
        H_ACC: begin
          if (in_pop) begin
            h_cnt   <= h_cnt + 1'b1;
            h_raddr <= h_raddr + 1'b1;
          end
          if (h_cnt == n_inputs) hs <= H_DRAIN;
        end
        H_DRAIN: hs <= H_ENC;      // accumulators final, encoders register
        H_ENC:   hs <= H_XFER;     // activations valid
        H_XFER:  if (!act_full) hs <= run ? H_BIAS : H_IDLE;
        default: hs <= H_IDLE;
      endcase
    end
  end

  // The weight read address is the index of the input being popped.
  logic [IW-1:0] h_rd;
  assign h_rd = h_raddr;

  act_code_t hid_act [N_HID];
  act_code_t act_mem [N_HID];

  for (genvar h = 0; h < N_HID; h++) begin : g_hidden
    logic [WEIGHT_W-1:0] w;
    logic signed [ACC_W-1:0] acc_unused;
    snn_weight_bram #(.DEPTH(MAX_IN), .W(WEIGHT_W)) u_wmem (
      .clk, .we(hw_we && hw_neuron == HW'(h)), .waddr(hw_addr), .wdata,
      .raddr(h_rd), .rdata(w)
    );
    snn_hidden_neuron #(.ACC_FRAC(ACC_FRAC)) u_an (
      .clk, .rst_n,
      .bias_we(hb_we && hb_neuron == HW'(h)), .bias_wdata(wdata),
      .load_bias(h_load), .en(h_en), .weight(w), .in_code(in_rcode),
      .acc(acc_unused), .act(hid_act[h])
    );
  end

  // ----------------------------------------------------- activations memory
  logic o_release;
  always_ff @(posedge clk) begin
    if (act_xfer) act_mem <= hid_act;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         act_full <= 1'b0;
    else if (act_xfer)  act_full <= 1'b1;
    else if (o_release) act_full <= 1'b0;
  end

  // ------------------------------------------------- output-layer sequencer
  typedef enum logic [2:0] {O_IDLE, O_BIAS, O_ACC, O_DRAIN, O_RES} ostate_e;
  ostate_e       os;
  logic [15:0]   o_cnt;
  logic [HW-1:0] o_raddr;
  logic          o_rd, o_en, o_load, res_full, res_take;
  act_code_t     act_q;

  assign o_rd      = (os == O_ACC) && (o_cnt < n_hidden);
  assign o_release = o_rd && (o_cnt == n_hidden - 1'b1);
  assign o_load    = (os == O_BIAS);
  assign res_take  = (os == O_RES) && !res_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      os      <= O_IDLE;
      o_cnt   <= '0;
      o_raddr <= '0;
      o_en    <= 1'b0;
      act_q   <= ACT_ZERO;
    end else begin
      o_en  <= o_rd;
      act_q <= act_mem[o_raddr];
      unique case (os)
        O_IDLE:  if (act_full) os <= O_BIAS;
        O_BIAS:  begin o_cnt <= '0; o_raddr <= '0; os <= O_ACC; end
        O_ACC: begin
          if (o_rd) begin
            o_cnt   <= o_cnt + 1'b1;
            o_raddr <= o_raddr + 1'b1;
          end else begin
            os <= O_DRAIN;
          end
        end
        O_DRAIN: os <= O_RES;      // outputs final
        O_RES:   if (!res_full) os <= O_IDLE;
        default: os <= O_IDLE;
      endcase
    end
  end

  logic signed [ACC_W-1:0] outs [N_OUT];
  for (genvar o = 0; o < N_OUT; o++) begin : g_output
    logic [WEIGHT_W-1:0] w;
    snn_weight_bram #(.DEPTH(N_HID), .W(WEIGHT_W)) u_wmem (
      .clk, .we(ow_we && ow_neuron == OW'(o)), .waddr(ow_addr), .wdata,
      .raddr(o_raddr), .rdata(w)
    );
    snn_output_neuron #(.OUT_FRAC(OUT_FRAC)) u_an (
      .clk, .rst_n,
      .bias_we(ob_we && ob_neuron == OW'(o)), .bias_wdata(wdata),
      .load_bias(o_load), .en(o_en), .weight(w), .act(act_q), .out(outs[o])
    );
  end

  // ----------------------------------------------- result buffer and stream
  logic signed [ACC_W-1:0] res [N_OUT];
  logic [OW:0]             r_idx;
  logic                    beat_out;

  assign m_axis_tvalid = res_full;
  assign m_axis_tdata  = 32'(res[OW'(r_idx)]);
  assign m_axis_tlast  = (r_idx == (OW+1)'(n_outputs - 1'b1));
  assign beat_out      = m_axis_tvalid && m_axis_tready;
  assign ev_image_done = beat_out && m_axis_tlast;

  always_ff @(posedge clk) begin
    if (res_take) res <= outs;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_full <= 1'b0;
      r_idx    <= '0;
      images   <= '0;
    end else begin
      if (res_take) begin
        res_full <= 1'b1;
        r_idx    <= '0;
      end else if (beat_out) begin
        if (m_axis_tlast) begin
          res_full <= 1'b0;
          images   <= images + 1'b1;
        end else begin
          r_idx <= r_idx + 1'b1;
        end
      end
    end
  end

  assign status = {16'(in_count), 12'd0, in_empty, (os != O_IDLE), (hs != H_IDLE), load_done};

  a_tdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
                    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));
endmodule
