// feature_binarizer: turns N multi-bit features into bits by comparing
// each with its threshold (feature >= threshold gives 1), registered.
// POLYBiNN binarizes every input with one fixed threshold (0.5 of the
// input range, 128 for 8-bit pixels); POLYCiNN uses a learned threshold
// per feature, given by THRESH. Timing: one-cycle latency, one feature
// vector per cycle; valid travels with the data.
module feature_binarizer #(
  parameter int N = 784,
  parameter int W = 8,
  parameter logic [N-1:0][W-1:0] THRESH = {N{W'(2 ** (W - 1))}}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][W-1:0] feat,
  output logic                out_valid,
  output logic [N-1:0]        bits
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < N; i++) bits[i] <= (feat[i] >= THRESH[i]);
    end
  end
endmodule
