// snn_hidden_neuron: hidden artificial neuron of the SNN overlay.
//
// The power-of-two input code selects a left shift of the 8-bit signed
// weight (the shift unit serves as the multiplier); the shifted weight is
// added to a 16-bit accumulator that is first loaded with the 8-bit bias.
// A registered priority encoder maps the accumulator to the 3-bit quantized
// tanh activation. This structure and the widths follow the published design.
// This design's choices: the accumulator saturates instead of wrapping;
// the bias is loaded with the same binary point as the weights; the
// accumulator has ACC_FRAC fraction bits, which sets the encoder
// thresholds.
//
// Timing: load_bias (one cycle) loads the accumulator; each cycle with
// en high adds weight<<shift; act is registered, valid one cycle after the
// last accumulation. bias_we writes the bias register.
module snn_hidden_neuron
  import snn_pkg::*;
#(
  parameter int ACC_FRAC = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bias_we,
  input  logic [WEIGHT_W-1:0] bias_wdata,
  input  logic                load_bias,
  input  logic                en,
  input  logic [WEIGHT_W-1:0] weight,
  input  in_code_t            in_code,
  output logic signed [ACC_W-1:0] acc,
  output act_code_t           act
);
  localparam int T1   = qtanh_threshold(3, ACC_FRAC);  // tanh >= 3/4
  localparam int T1_2 = qtanh_threshold(2, ACC_FRAC);  // tanh >= 1/2
  localparam int T1_4 = qtanh_threshold(1, ACC_FRAC);  // tanh >= 1/4
  localparam int AMAX = 2 ** (ACC_W - 1) - 1;
  localparam int AMIN = -(2 ** (ACC_W - 1));

  logic signed [WEIGHT_W-1:0] bias_q;
  logic signed [ACC_W-1:0]    shifted;
  logic signed [ACC_W+1:0]    sum;

  // Shift unit: code 0 gives zero, code k gives weight * 2^(k-1).
  always_comb begin
    if (in_code == '0) shifted = '0;
    else               shifted = ACC_W'($signed(weight)) <<< (in_code - 3'd1);
    sum = (ACC_W+2)'(acc) + (ACC_W+2)'(shifted);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias_q <= '0;
      acc    <= '0;
      act    <= ACT_ZERO;
    end else begin
      if (bias_we) bias_q <= $signed(bias_wdata);
      if (load_bias)
        acc <= ACC_W'(bias_q);
      else if (en) begin
        if (sum > AMAX)      acc <= ACC_W'(AMAX);
        else if (sum < AMIN) acc <= ACC_W'(AMIN);
        else                 acc <= ACC_W'(sum);
      end
      // Priority encoder serving as the quantized tanh.
      if      (acc >=  T1)   act <= ACT_P1;
      else if (acc >=  T1_2) act <= ACT_P1_2;
      else if (acc >=  T1_4) act <= ACT_P1_4;
      else if (acc <= -T1)   act <= ACT_N1;
      else if (acc <= -T1_2) act <= ACT_N1_2;
      else if (acc <= -T1_4) act <= ACT_N1_4;
      else                   act <= ACT_ZERO;
    end
  end
endmodule
