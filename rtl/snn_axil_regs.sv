// snn_axil_regs: AXI4-Lite register file of the SNN overlay.
//
// Carries the network settings and the control and status words between
// the processor and the overlay, the role the published design gives the AXI-Lite
// link. The register map is this design's own:
//   0x00 CTRL      [2:0] stream target (snn_pkg::stream_target_e),
//                  [8] run: let the sequencers process images;
//                  any write restarts the stream loader's counters
//   0x04 N_INPUTS  active inputs     (1..MAX_IN,  clamped)
//   0x08 N_HIDDEN  active hidden ANs (1..N_HID,   clamped)
//   0x0C N_OUTPUTS active output ANs (1..N_OUT,   clamped)
//   0x10 STATUS    read only, from the overlay (status_i)
//   0x14 IMAGES    read only, images completed (images_i)
// A write to a read-only or unmapped address is accepted and ignored; a
// read of an unmapped address returns 0. Responses are always OKAY.
//
// Handshake: one transaction of each kind at a time. A write is taken when
// both AW and W are valid (awready/wready pulse together), the B response
// follows the next cycle and is held until bready. A read is taken when
// ARVALID is high and no R response is pending; R follows the next cycle.
module snn_axil_regs
  import snn_pkg::*;
#(
  parameter int MAX_IN = 1000,
  parameter int N_HID  = 2450,
  parameter int N_OUT  = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // settings to the overlay
  output stream_target_e target,
  output logic        run,
  output logic [15:0] n_inputs,
  output logic [15:0] n_hidden,
  output logic [15:0] n_outputs,
  output logic        ctrl_written,
  // status from the overlay
  input  logic [31:0] status_i,
  input  logic [31:0] images_i
);
  logic do_write, do_read;

  assign do_write       = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = do_write;
  assign s_axil_wready  = do_write;
  assign do_read        = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_arready = do_read;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  function automatic logic [15:0] clamp(logic [31:0] v, int hi);
    if (v == 0)              return 16'd1;
    else if (v > 32'(hi))    return 16'(hi);
    else                     return v[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target        <= TGT_HID_WEIGHTS;
      run           <= 1'b0;
      n_inputs      <= 16'(MAX_IN);
      n_hidden      <= 16'(N_HID);
      n_outputs     <= 16'(N_OUT);
      ctrl_written  <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      ctrl_written <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (do_write) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr[7:2])
          6'h00: begin
            if (s_axil_wstrb[0]) target <= stream_target_e'(s_axil_wdata[2:0]);
            if (s_axil_wstrb[1]) run    <= s_axil_wdata[8];
            ctrl_written <= 1'b1;
          end
          6'h01: n_inputs  <= clamp(s_axil_wdata, MAX_IN);
          6'h02: n_hidden  <= clamp(s_axil_wdata, N_HID);
          6'h03: n_outputs <= clamp(s_axil_wdata, N_OUT);
          default: ;
        endcase
      end
      if (do_read) begin
        s_axil_rvalid <= 1'b1;
        unique case (s_axil_araddr[7:2])
          6'h00:   s_axil_rdata <= {23'd0, run, 5'd0, target};
          6'h01:   s_axil_rdata <= {16'd0, n_inputs};
          6'h02:   s_axil_rdata <= {16'd0, n_hidden};
          6'h03:   s_axil_rdata <= {16'd0, n_outputs};
          6'h04:   s_axil_rdata <= status_i;
          6'h05:   s_axil_rdata <= images_i;
          default: s_axil_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
