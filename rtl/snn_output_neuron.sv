// snn_output_neuron: output artificial neuron of the SNN overlay.
//
// The 3-bit power-of-two activation selects an arithmetic right shift of
// the 8-bit signed weight (the shift unit serves as the multiplier) and
// its sign; the result is added to a 16-bit accumulator loaded first with
// the 8-bit bias. The accumulator is the 16-bit output. This structure and
// the widths follow the published design. This design's choices: the weight is
// placed OUT_FRAC bits up in the 16-bit word before the shift so that the
// right shift by up to 2 loses nothing (the bias is aligned the same way),
// and the accumulator saturates.
//
// Timing: load_bias loads the accumulator, each cycle with en high adds
// one weighted activation; out is the accumulator itself.
module snn_output_neuron
  import snn_pkg::*;
#(
  parameter int OUT_FRAC = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bias_we,
  input  logic [WEIGHT_W-1:0] bias_wdata,
  input  logic                load_bias,
  input  logic                en,
  input  logic [WEIGHT_W-1:0] weight,
  input  act_code_t           act,
  output logic signed [ACC_W-1:0] out
);
  localparam int AMAX = 2 ** (ACC_W - 1) - 1;
  localparam int AMIN = -(2 ** (ACC_W - 1));

  logic signed [WEIGHT_W-1:0] bias_q;
  logic signed [ACC_W-1:0]    aligned, shifted, term;
  logic signed [ACC_W+1:0]    sum;

  always_comb begin
    aligned = ACC_W'($signed(weight)) <<< OUT_FRAC;
    shifted = aligned >>> act[1:0];
    if (act[1:0] == 2'b11) term = '0;
    else if (act[2])       term = -shifted;
    else                   term = shifted;
    sum = (ACC_W+2)'(out) + (ACC_W+2)'(term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias_q <= '0;
      out    <= '0;
    end else begin
      if (bias_we) bias_q <= $signed(bias_wdata);
      if (load_bias)
        out <= ACC_W'(bias_q) <<< OUT_FRAC;
      else if (en) begin
        if (sum > AMAX)      out <= ACC_W'(AMAX);
        else if (sum < AMIN) out <= ACC_W'(AMIN);
        else                 out <= ACC_W'(sum);
      end
    end
  end
endmodule
