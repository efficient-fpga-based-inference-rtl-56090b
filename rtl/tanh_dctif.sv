// tanh_dctif: hyperbolic tangent approximation by DCT interpolation.
//
// The input range decoder sorts z into one of four cases and a 4-input
// multiplexer picks the output: the truncated input in the pass region
// (tanh(z) ~ z), all ones in the saturation region (~1), the stored
// sample when z is a sample point, or the DCTIF interpolated value
// between sample points. This structure follows the published design.
//
// Number format (as published): z is unsigned with 3 integer bits and
// N_OUT fraction bits (N_IN = N_OUT + 3); the output has N_OUT fraction
// bits. Negative inputs are handled with the odd symmetry of tanh by the
// caller (this design's choice): apply the unit to |z| and negate.
//
// Interface and timing: in_valid/in_ready handshake, one result every two
// cycles, out_valid three cycles after the input is accepted, for every
// region (the pass and saturation results wait in a register so that the
// results leave in input order).
module tanh_dctif
  import tanh_pkg::*;
#(
  parameter int N_OUT     = 8,
  parameter int N_IN      = N_OUT + 3,
  parameter int PASS_END  = 59,
  parameter int SAT_START = 712
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [N_IN-1:0]  z,
  output logic             out_valid,
  output logic [N_OUT-1:0] tanh_z,
  output region_e          out_region
);
  region_e          region, region_q;
  logic [N_OUT-1:0] trunc_q;
  logic             dct_valid;
  logic [N_OUT-1:0] dct_val, dct_sample;

  tanh_range_decoder #(
    .N_IN(N_IN), .SAMPLE_SHIFT(2), .PASS_END(PASS_END), .SAT_START(SAT_START)
  ) u_dec (
    .z(z), .region(region)
  );

  dctif_interp #(
    .N_IN(N_IN), .N_OUT(N_OUT), .PASS_END(PASS_END), .SAT_START(SAT_START)
  ) u_dctif (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .z(z),
    .out_valid(dct_valid), .dctif(dct_val), .sample(dct_sample)
  );

  // Region select lines and the pass-region truncation travel with the
  // item: at most two items are in flight, so a two-deep delay suffices.
  region_e          region_d [2];
  logic [N_OUT-1:0] trunc_d  [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_d <= '{default: REG_PASS};
      trunc_d  <= '{default: '0};
    end else if (in_valid && in_ready) begin
      region_d[0] <= region;
      trunc_d[0]  <= z[N_OUT-1:0];
      region_d[1] <= region_d[0];
      trunc_d[1]  <= trunc_d[0];
    end
  end
  // The oldest item in flight is in slot 1 once a newer one was accepted
  // behind it; track which slot the leaving result belongs to.
  logic [1:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 2'(in_valid && in_ready) - 2'(dct_valid);
  end
  assign region_q = (inflight == 2'd2) ? region_d[1] : region_d[0];
  assign trunc_q  = (inflight == 2'd2) ? trunc_d[1] : trunc_d[0];

  assign out_valid  = dct_valid;
  assign out_region = region_q;
  always_comb begin
    unique case (region_q)
      REG_PASS:   tanh_z = trunc_q;
      REG_SAT:    tanh_z = '1;
      REG_SAMPLE: tanh_z = dct_sample;
      default:    tanh_z = dct_val;
    endcase
  end
endmodule
