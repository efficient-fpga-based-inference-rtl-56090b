// polybinn_class_vote: decision and confidence of one class of POLYBiNN.
//
// From the N tree outputs d_n and their constant confidences c_n:
//   D = 1 when sum(d_n c_n) > sum(c_n) / 2
//   C = sum(d_n c_n) / sum(c_n), quantized to 2 bits
// (as published). The quantization boundaries 1/4, 1/2, 3/4 are this design's
// choice. With constant c_n this is a fixed Boolean function of the N tree
// outputs; it is written as a constant-weight sum and comparisons with
// constants, which synthesis reduces to logic, with no division.
// Purely combinational.
module polybinn_class_vote #(
  parameter int N = 20,
  parameter logic [N-1:0][7:0] CONF = {N{8'd128}}
) (
  input  logic [N-1:0] d,
  output logic         dec,
  output logic [1:0]   conf
);
  localparam int SW = 8 + $clog2(N + 1) + 2;

  function automatic int total();
    int t;
    t = 0;
    for (int n = 0; n < N; n++) t += int'(CONF[n]);
    return t;
  endfunction
  localparam int T = total();

  logic [SW-1:0] s;
  always_comb begin
    s = '0;
    for (int n = 0; n < N; n++) if (d[n]) s += SW'(CONF[n]);
    dec = (2 * int'(s) > T);
    if      (4 * int'(s) >= 3 * T) conf = 2'd3;
    else if (4 * int'(s) >= 2 * T) conf = 2'd2;
    else if (4 * int'(s) >= T)     conf = 2'd1;
    else                           conf = 2'd0;
  end
endmodule
