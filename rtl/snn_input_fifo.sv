// snn_input_fifo: the inputs BRAM of the SNN overlay, organised as a FIFO.
//
// Quantized 3-bit input codes arrive from the AXI4-Stream loader and are
// read by the hidden-layer sequencer, one per cycle, shared by all hidden
// neurons. Holding the inputs as a FIFO lets the next image stream in
// while the current one is processed; that organisation is this design's
// choice (the published design only says a separate BRAM holds the current
// quantized input). Read data is registered like a BRAM: rdata is valid
// the cycle after pop. push when full and pop when empty are ignored (and
// flagged by assertions).
module snn_input_fifo #(
  parameter int DEPTH = 2048,
  parameter int W     = 3,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         full,
  output logic         empty,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
    rdata <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
