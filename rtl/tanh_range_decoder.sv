// tanh_range_decoder: input range decoder of the DCTIF tanh unit.
//
// Classifies the unsigned fixed-point input z (3 integer bits, N_IN-3
// fraction bits) into the pass, saturation or processing region, and
// inside the processing region tells a stored sample point (the low
// SAMPLE_SHIFT bits of z are zero) from a point that must be
// interpolated. Purely combinational.
//
// The region boundaries PASS_END and SAT_START are in input LSBs. Their
// defaults are this design's own, chosen for a maximum error of 0.004 with
// 8 output fraction bits, the accuracy the published design reports for that
// format: below 59/256 the identity is within 0.004 of tanh, and from
// 712/256 upward 255/256 is.
module tanh_range_decoder
  import tanh_pkg::*;
#(
  parameter int N_IN         = 11,
  parameter int SAMPLE_SHIFT = 2,    // log2(1/alpha), alpha = 1/4
  parameter int PASS_END     = 59,   // first input code of the processing region
  parameter int SAT_START    = 712   // first input code of the saturation region
) (
  input  logic [N_IN-1:0] z,
  output region_e         region
);
  always_comb begin
    if (int'(z) < PASS_END)
      region = REG_PASS;
    else if (int'(z) >= SAT_START)
      region = REG_SAT;
    else if (z[SAMPLE_SHIFT-1:0] == '0)
      region = REG_SAMPLE;
    else
      region = REG_INTERP;
  end
endmodule
