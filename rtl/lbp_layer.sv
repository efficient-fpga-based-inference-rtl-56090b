// lbp_layer: local binary pattern (LBP) feature extraction of POLYCiNN.
//
// The image arrives one row per cycle (COLS pixels of CH channels, PB
// bits each). Every pixel of every channel gets a 4-bit code from the
// comparison with its four neighbours, and each window gets a 16-bin
// histogram of these codes per channel.
//
// As in the published design only south and east comparisons are built: a column
// array S(r,c) = p(r+1,c) > p(r,c) between the current and previous rows,
// and a row array E(r,c) = p(r,c+1) > p(r,c) within the previous row. The
// natural and complemented outputs form the code
//   {top, right, bottom, left} = {~S(r-1,c), E(r,c), S(r,c), ~E(r,c-1)}
// (bit order as in the published example, top bit first). A neighbour
// outside the image gives 0 (this design's choice, not mentioned).
// Histograms: windows of WIN x WIN pixels with stride STRIDE; for each
// window, channel and code value an accumulator adds the number of
// matching pixels of the row (16 comparators and accumulators per window
// and channel).
//
// Timing: row r's codes are formed when row r+1 arrives; after the last
// row one extra cycle (in_ready low) forms the last codes. An image
// therefore takes ROWS + 1 cycles. out_valid is high in the 3rd cycle
// after the cycle that transfers the last row, with all histograms, which then stay unchanged
// until the next image's result.
module lbp_layer #(
  parameter int ROWS   = 32,
  parameter int COLS   = 32,
  parameter int CH     = 3,
  parameter int PB     = 4,
  parameter int WIN    = 16,
  parameter int STRIDE = 8,
  localparam int NWY = (ROWS - WIN) / STRIDE + 1,
  localparam int NWX = (COLS - WIN) / STRIDE + 1,
  localparam int NW  = NWY * NWX,
  localparam int HW  = $clog2(WIN * WIN + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic [COLS-1:0][CH-1:0][PB-1:0]  in_row,
  output logic                             out_valid,
  output logic [NW-1:0][CH-1:0][15:0][HW-1:0] hist
);
  localparam int RW = $clog2(ROWS + 1);

  logic                            flush;      // extra cycle after the last row
  logic [RW-1:0]                   rin;        // index of the next row
  logic [COLS-1:0][CH-1:0][PB-1:0] prev;       // row rin-1
  logic [COLS-1:0][CH-1:0]         s_prev;     // S(rin-2, c)

  assign in_ready = !flush;
  wire accept = in_valid && in_ready;

  // ---- comparator arrays and code formation for row rin-1
  logic                       code_go;
  logic [COLS-1:0][CH-1:0]    s_now;
  logic [COLS-1:0][CH-1:0][3:0] code;
  always_comb begin
    code_go = flush || (accept && rin != 0);
    for (int c = 0; c < COLS; c++)
      for (int ch = 0; ch < CH; ch++) begin
        logic top, right, bottom, left;
        s_now[c][ch] = flush ? 1'b0 : (in_row[c][ch] > prev[c][ch]);
        top    = (rin == 1 && !flush) ? 1'b0 : ~s_prev[c][ch];
        bottom = s_now[c][ch];
        right  = (c < COLS - 1) ? (prev[(c+1) % COLS][ch] > prev[c][ch]) : 1'b0;
        left   = (c > 0) ? ~(prev[c][ch] > prev[(c+COLS-1) % COLS][ch]) : 1'b0;
        code[c][ch] = {top, right, bottom, left};
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush  <= 1'b0;
      rin    <= '0;
      prev   <= '0;
      s_prev <= '0;
    end else begin
      if (flush) begin
        flush <= 1'b0;
        rin   <= '0;
      end else if (accept) begin
        prev   <= in_row;
        s_prev <= s_now;
        if (rin == RW'(ROWS - 1)) flush <= 1'b1;
        rin <= rin + 1'b1;
      end
    end
  end

  // ---- stage 1: registered codes
  logic                         cv_q;
  logic [RW-1:0]                cr_q;        // row index of the codes
  logic [COLS-1:0][CH-1:0][3:0] code_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv_q   <= 1'b0;
      cr_q   <= '0;
      code_q <= '0;
    end else begin
      cv_q <= code_go;
      if (code_go) begin
        cr_q   <= flush ? RW'(ROWS - 1) : rin - 1'b1;
        code_q <= code;
      end
    end
  end

  // ---- stage 2: histogram accumulators
  // cnt: pixels of code value b in the window columns of wx, this row
  logic [NWX-1:0][CH-1:0][15:0][HW-1:0] cnt;
  for (genvar wx = 0; wx < NWX; wx++) begin : g_cx
    for (genvar ch = 0; ch < CH; ch++) begin : g_cc
      for (genvar b = 0; b < 16; b++) begin : g_cb
        always_comb begin
          cnt[wx][ch][b] = '0;
          for (int c = wx * STRIDE; c < wx * STRIDE + WIN; c++)
            cnt[wx][ch][b] += HW'(code_q[c][ch] == 4'(b));
        end
      end
    end
  end

  logic [NW-1:0][CH-1:0][15:0][HW-1:0] acc, acc_next;
  for (genvar wy = 0; wy < NWY; wy++) begin : g_ay
    wire in_win = int'(cr_q) >= wy * STRIDE && int'(cr_q) < wy * STRIDE + WIN;
    for (genvar wx = 0; wx < NWX; wx++) begin : g_ax
      assign acc_next[wy*NWX+wx] = in_win ? add_counts(acc[wy*NWX+wx], cnt[wx]) : acc[wy*NWX+wx];
    end
  end

  function automatic logic [CH-1:0][15:0][HW-1:0] add_counts(
      logic [CH-1:0][15:0][HW-1:0] a, logic [CH-1:0][15:0][HW-1:0] b);
    for (int ch = 0; ch < CH; ch++)
      for (int k = 0; k < 16; k++) add_counts[ch][k] = a[ch][k] + b[ch][k];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      hist      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (cv_q) begin
        if (cr_q == RW'(ROWS - 1)) begin
          hist      <= acc_next;
          acc       <= '0;
          out_valid <= 1'b1;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end
endmodule
