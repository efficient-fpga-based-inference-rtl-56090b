// fpga_dl_top: the four inference designs side by side, on one clock and
// reset, each with its own plain-signal ports (prefix):
//   snn_  scalable neural network overlay: AXI4-Lite settings and control,
//         AXI4-Stream in (weights, biases, inputs) and out (results)
//   tanh_ DCTIF hyperbolic tangent: z in, tanh(z) out, 1 result / 2 cycles
//   pbn_  POLYBiNN: 784 8-bit pixels in per cycle, one-hot class out
//   pcn_  POLYCiNN: 32x32x3 image (4 MSBs per colour) one row per cycle,
//         one-hot class and fused scores out
// The designs share nothing; this level only wires them. All parameters
// keep the defaults of each block (published values, see the blocks). The
// tanh_out_region code is 00 pass, 01 saturation, 10 sample,
// 11 interpolation.
module fpga_dl_top #(
  // SNN overlay (chapter 4)
  parameter int SNN_MAX_IN   = 1000,
  parameter int SNN_N_HID    = 2450,
  parameter int SNN_N_OUT    = 30,
  parameter int SNN_FIFO     = 2048,
  // DCTIF tanh (chapter 3)
  parameter int TANH_N_OUT   = 8,
  // POLYBiNN (chapter 5)
  parameter int PBN_N_FEAT   = 784,
  parameter int PBN_M        = 10,
  parameter int PBN_N        = 20,
  parameter bit PBN_SIMPLIFIED = 1'b0,
  // POLYCiNN (chapter 6)
  parameter int PCN_M        = 10,
  parameter int PCN_N        = 100,
  localparam int TANH_N_IN   = TANH_N_OUT + 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- SNN overlay
  input  logic [7:0]  snn_s_axil_awaddr,
  input  logic        snn_s_axil_awvalid,
  output logic        snn_s_axil_awready,
  input  logic [31:0] snn_s_axil_wdata,
  input  logic [3:0]  snn_s_axil_wstrb,
  input  logic        snn_s_axil_wvalid,
  output logic        snn_s_axil_wready,
  output logic [1:0]  snn_s_axil_bresp,
  output logic        snn_s_axil_bvalid,
  input  logic        snn_s_axil_bready,
  input  logic [7:0]  snn_s_axil_araddr,
  input  logic        snn_s_axil_arvalid,
  output logic        snn_s_axil_arready,
  output logic [31:0] snn_s_axil_rdata,
  output logic [1:0]  snn_s_axil_rresp,
  output logic        snn_s_axil_rvalid,
  input  logic        snn_s_axil_rready,
  input  logic [31:0] snn_s_axis_tdata,
  input  logic        snn_s_axis_tvalid,
  output logic        snn_s_axis_tready,
  output logic [31:0] snn_m_axis_tdata,
  output logic        snn_m_axis_tvalid,
  input  logic        snn_m_axis_tready,
  output logic        snn_m_axis_tlast,
  output logic        snn_ev_input_stall,
  output logic        snn_ev_act_stall,
  output logic        snn_ev_image_done,
  // ---- DCTIF tanh
  input  logic                  tanh_in_valid,
  output logic                  tanh_in_ready,
  input  logic [TANH_N_IN-1:0]  tanh_z,
  output logic                  tanh_out_valid,
  output logic [TANH_N_OUT-1:0] tanh_out,
  output logic [1:0]            tanh_out_region,
  // ---- POLYBiNN
  input  logic                          pbn_in_valid,
  input  logic [PBN_N_FEAT-1:0][7:0]    pbn_pixels,
  output logic                          pbn_out_valid,
  output logic [PBN_M-1:0]              pbn_onehot,
  // ---- POLYCiNN
  input  logic                          pcn_in_valid,
  output logic                          pcn_in_ready,
  input  logic [31:0][2:0][3:0]         pcn_in_row,
  output logic                          pcn_out_valid,
  output logic [PCN_M-1:0]              pcn_onehot,
  output logic [PCN_M-1:0][4:0]         pcn_score
);
  snn_overlay #(
    .MAX_IN(SNN_MAX_IN), .N_HID(SNN_N_HID), .N_OUT(SNN_N_OUT), .FIFO_DEPTH(SNN_FIFO)
  ) u_snn (
    .clk, .rst_n,
    .s_axil_awaddr(snn_s_axil_awaddr), .s_axil_awvalid(snn_s_axil_awvalid),
    .s_axil_awready(snn_s_axil_awready), .s_axil_wdata(snn_s_axil_wdata),
    .s_axil_wstrb(snn_s_axil_wstrb), .s_axil_wvalid(snn_s_axil_wvalid),
    .s_axil_wready(snn_s_axil_wready), .s_axil_bresp(snn_s_axil_bresp),
    .s_axil_bvalid(snn_s_axil_bvalid), .s_axil_bready(snn_s_axil_bready),
    .s_axil_araddr(snn_s_axil_araddr), .s_axil_arvalid(snn_s_axil_arvalid),
    .s_axil_arready(snn_s_axil_arready), .s_axil_rdata(snn_s_axil_rdata),
    .s_axil_rresp(snn_s_axil_rresp), .s_axil_rvalid(snn_s_axil_rvalid),
    .s_axil_rready(snn_s_axil_rready),
    .s_axis_tdata(snn_s_axis_tdata), .s_axis_tvalid(snn_s_axis_tvalid),
    .s_axis_tready(snn_s_axis_tready),
    .m_axis_tdata(snn_m_axis_tdata), .m_axis_tvalid(snn_m_axis_tvalid),
    .m_axis_tready(snn_m_axis_tready), .m_axis_tlast(snn_m_axis_tlast),
    .ev_input_stall(snn_ev_input_stall), .ev_act_stall(snn_ev_act_stall),
    .ev_image_done(snn_ev_image_done));

  tanh_pkg::region_e tanh_region;
  tanh_dctif #(.N_OUT(TANH_N_OUT)) u_tanh (
    .clk, .rst_n, .in_valid(tanh_in_valid), .in_ready(tanh_in_ready), .z(tanh_z),
    .out_valid(tanh_out_valid), .tanh_z(tanh_out), .out_region(tanh_region));
  assign tanh_out_region = 2'(tanh_region);

  polybinn #(.N_FEAT(PBN_N_FEAT), .M(PBN_M), .N(PBN_N), .SIMPLIFIED(PBN_SIMPLIFIED)) u_pbn (
    .clk, .rst_n, .in_valid(pbn_in_valid), .pixels(pbn_pixels),
    .out_valid(pbn_out_valid), .onehot(pbn_onehot));

  polycinn #(.M(PCN_M), .N(PCN_N)) u_pcn (
    .clk, .rst_n, .in_valid(pcn_in_valid), .in_ready(pcn_in_ready), .in_row(pcn_in_row),
    .out_valid(pcn_out_valid), .onehot(pcn_onehot), .score(pcn_score));
endmodule
