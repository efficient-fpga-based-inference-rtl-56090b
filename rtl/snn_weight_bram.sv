// snn_weight_bram: simple dual-port block RAM, one write port and one read
// port with a registered (one-cycle) read, as an FPGA BRAM. Used for the
// per-neuron weight memories of the SNN overlay. Contents are not reset;
// they are written over the AXI4-Stream before use.
module snn_weight_bram #(
  parameter int DEPTH = 1000,
  parameter int W     = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
