// image_downsampler: the downsampled image (DI) of POLYCiNN.
//
// The published design downsamples the 32x32 image to 8x8 but does not say how;
// this design averages each F x F block per channel (sum, then drop the
// log2(F*F) low bits). The image arrives one row per cycle on the same
// handshake as the LBP layer (it only watches accepted rows: in_valid &&
// in_ready). Column sums are kept for the current band of F rows; on the
// band's last row the DI row is written.
//
// Timing: out_valid is high in the cycle after the one that transfers the
// last row; di
// stays unchanged until row F-1 of the next image is accepted.
module image_downsampler #(
  parameter int ROWS = 32,
  parameter int COLS = 32,
  parameter int CH   = 3,
  parameter int PB   = 4,
  parameter int F    = 4,
  localparam int DR = ROWS / F,
  localparam int DC = COLS / F
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic                             in_ready,
  input  logic [COLS-1:0][CH-1:0][PB-1:0]  in_row,
  output logic                             out_valid,
  output logic [DR-1:0][DC-1:0][CH-1:0][PB-1:0] di
);
  localparam int SW = PB + 2 * $clog2(F);
  localparam int RW = $clog2(ROWS + 1);

  logic [RW-1:0]                  r;
  logic [DC-1:0][CH-1:0][SW-1:0]  colsum;
  logic [DC-1:0][CH-1:0][SW-1:0]  sum_now;

  always_comb begin
    for (int j = 0; j < DC; j++)
      for (int ch = 0; ch < CH; ch++) begin
        sum_now[j][ch] = colsum[j][ch];
        for (int k = 0; k < F; k++) sum_now[j][ch] += SW'(in_row[j*F+k][ch]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r         <= '0;
      colsum    <= '0;
      di        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (int'(r) % F == F - 1) begin
          for (int j = 0; j < DC; j++)
            for (int ch = 0; ch < CH; ch++)
              di[int'(r) / F][j][ch] <= PB'(sum_now[j][ch] >> (SW - PB));
          colsum <= '0;
        end else begin
          colsum <= sum_now;
        end
        if (r == RW'(ROWS - 1)) begin
          r         <= '0;
          out_valid <= 1'b1;
        end else begin
          r <= r + 1'b1;
        end
      end
    end
  end
endmodule
