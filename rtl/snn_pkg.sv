// snn_pkg: shared types and constants of the single-hidden-layer (SNN)
// multiplier-less inference overlay.
//
// Inputs are quantized offline to {0,1,2,4,...,64} and carried as a 3-bit
// code: 0 means 0, k = 1..7 means 2^(k-1). Hidden activations are the
// quantized tanh levels {1,1/2,1/4,0,-1/4,-1/2,-1} carried as the 3-bit
// codes of the published hidden neuron: bit 2 is the sign, bits 1:0
// the right-shift amount, 11 meaning zero. Both codes follow the published design;
// the binary input code is this design's choice.
//
// Thresholds of the quantized tanh (as published): tanh(x) >= 3/4,
// 1/2, 1/4 give 1, 1/2, 1/4. They are applied to the accumulator as
// x >= atanh(y), with atanh(y) = ln((1+y)/(1-y))/2, in accumulator units
// of 2^-ACC_FRAC (ACC_FRAC is this design's choice).
package snn_pkg;
  localparam int WEIGHT_W = 8;     // weight and bias width (as published)
  localparam int ACC_W    = 16;    // accumulator width (as published)
  localparam int CODE_W   = 3;     // input and activation code width (as published)

  typedef logic [CODE_W-1:0] in_code_t;
  typedef logic [CODE_W-1:0] act_code_t;

  localparam act_code_t ACT_P1   = 3'b000;
  localparam act_code_t ACT_P1_2 = 3'b001;
  localparam act_code_t ACT_P1_4 = 3'b010;
  localparam act_code_t ACT_ZERO = 3'b111;
  localparam act_code_t ACT_N1_4 = 3'b110;
  localparam act_code_t ACT_N1_2 = 3'b101;
  localparam act_code_t ACT_N1   = 3'b100;

  // Targets of the AXI4-Stream data, chosen in the control register.
  typedef enum logic [2:0] {
    TGT_HID_WEIGHTS = 3'd0,
    TGT_HID_BIASES  = 3'd1,
    TGT_OUT_WEIGHTS = 3'd2,
    TGT_OUT_BIASES  = 3'd3,
    TGT_INPUTS      = 3'd4
  } stream_target_e;

  // Smallest accumulator value x with tanh(x) >= y, for y = num/4.
  function automatic int qtanh_threshold(int num, int frac);
    real y, x;
    y = real'(num) / 4.0;
    x = 0.5 * $ln((1.0 + y) / (1.0 - y));
    return int'($ceil(x * real'(2 ** frac)));
  endfunction
endpackage
