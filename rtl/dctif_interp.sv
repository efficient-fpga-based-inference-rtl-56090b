// dctif_interp: DCT interpolation filter for tanh, 4 taps, alpha = 1/4, s = 4.
//
// Samples of tanh are stored every 4 input LSBs (alpha = 1/4) in a ROM
// with two read ports, one giving the inner samples B/C and one the outer
// samples A/D (A,B,C,D = p(i-1), p(i), p(i+1), p(i+2)). The 4-tap filter of
// each fractional position, scaled by 2^s = 16, is
//   i+1/4 : -2A + 15B +  3C +  0D
//   i+1/2 : -2A + 10B + 10C -  2D
//   i+3/4 :  0A +  3B + 15C -  2D   (mirror of i+1/4)
// Each sum is split into two pairs computed on consecutive cycles by one
// shift-add unit: 15x = (x<<4)-x, 3x = (x<<2)-x, 10x = (x<<3)+(x<<1), minus
// 2y = y<<1 or zero. The first pair is held in REG, the second is added to
// it and the total is divided by 16. The coefficients, the pair split, the
// shift-add structure and the two-cycle schedule follow the published design. The
// division rounds to nearest (adds 8 before >>4); that and the clamp to the
// output range are this design's choices: with plain truncation the maximum
// error would be 0.0064 rather than the 0.004 reported for this format.
//
// Sample contents: p(k) = round(tanh(k/64) * 2^N_OUT), clamped to all ones,
// for k from PASS_END/4-1 to (SAT_START-1)/4+2, computed at start-up.
//
// Interface and timing: in_valid/in_ready handshake; a new input is
// accepted every second cycle (in_ready is low in the cycle after an
// accept). out_valid is a one-cycle pulse three cycles after the accept,
// carrying both the interpolated value (dctif) and the stored sample B
// (sample), for inputs on a sample point.
module dctif_interp #(
  parameter int N_IN      = 11,
  parameter int N_OUT     = 8,
  parameter int PASS_END  = 59,
  parameter int SAT_START = 712
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [N_IN-1:0]  z,
  output logic             out_valid,
  output logic [N_OUT-1:0] dctif,
  output logic [N_OUT-1:0] sample
);
  localparam int IDX_W  = N_IN - 2;
  localparam int BASE   = PASS_END / 4 - 1;
  localparam int LAST   = (SAT_START - 1) / 4 + 2;
  localparam int DEPTH  = LAST - BASE + 1;
  localparam int AW     = $clog2(DEPTH);
  localparam int DW     = N_OUT + 6;        // signed width of the pair sums
  localparam logic [N_OUT-1:0] ONES = '1;

  // ---------------------------------------------------------------- ROM
  // tanh at the sample points, rounded, computed at elaboration
  function automatic logic [DEPTH-1:0][N_OUT-1:0] rom_init();
    for (int k = 0; k < DEPTH; k++) begin
      real v;
      v = $floor($tanh(real'(k + BASE) / 64.0) * real'(2 ** N_OUT) + 0.5);
      if (v > real'(2 ** N_OUT - 1)) v = real'(2 ** N_OUT - 1);
      rom_init[k] = N_OUT'(int'(v));
    end
  endfunction
  localparam logic [DEPTH-1:0][N_OUT-1:0] ROM = rom_init();

  // ------------------------------------------------------ control state
  typedef enum logic [1:0] {S_IDLE, S_PH0, S_PH1} state_e;
  state_e            state;
  logic [IDX_W-1:0]  idx_q;      // sample index i of the held input
  logic [1:0]        r_q;        // fractional position r (1..3, 0 = sample)
  logic              accept;

  assign in_ready = (state != S_PH0);
  assign accept   = in_valid && in_ready;

  // ------------------------------------------------- address decoder
  // Phase 0 reads the pair (B,A) for r = 1,2 or (C,D) for r = 3;
  // phase 1 reads (C,D) for r = 1,2 or (B,A) for r = 3.
  logic [IDX_W-1:0] a_idx;
  logic [1:0]       a_r;
  logic             a_ph;       // which phase the address is for
  logic [AW-1:0]    addr_bc, addr_ad;

  function automatic logic [AW-1:0] rom_addr(input int k);
    int a;
    a = k - BASE;
    if (a < 0) a = 0;
    if (a > DEPTH - 1) a = DEPTH - 1;
    return AW'(a);
  endfunction

  always_comb begin
    logic inner_first;   // B/A pair (true) or C/D pair (false)
    if (accept) begin
      a_idx = z[N_IN-1:2];
      a_r   = z[1:0];
      a_ph  = 1'b0;
    end else begin
      a_idx = idx_q;
      a_r   = r_q;
      a_ph  = 1'b1;
    end
    inner_first = (a_r != 2'd3);
    if (inner_first ^ a_ph) begin   // read B and A
      addr_bc = rom_addr(int'(a_idx));
      addr_ad = rom_addr(int'(a_idx) - 1);
    end else begin                  // read C and D
      addr_bc = rom_addr(int'(a_idx) + 1);
      addr_ad = rom_addr(int'(a_idx) + 2);
    end
  end

  logic [N_OUT-1:0] q_bc, q_ad;
  always_ff @(posedge clk) begin
    q_bc <= ROM[addr_bc];
    q_ad <= ROM[addr_ad];
  end

  // ------------------------------------------------------- datapath
  // Inner sample times 15, 3 or 10; outer sample times 2 or zero.
  logic signed [DW-1:0] x, y, sel_x, sel_y, pair;
  logic                 cur_ph;
  always_comb begin
    x      = DW'(q_bc);
    y      = DW'(q_ad);
    cur_ph = (state == S_PH1);
    unique case ({r_q, cur_ph})
      {2'd1, 1'b0}, {2'd3, 1'b0}: begin sel_x = (x <<< 4) - x;        sel_y = y <<< 1; end // 15B-2A / 15C-2D
      {2'd1, 1'b1}, {2'd3, 1'b1}: begin sel_x = (x <<< 2) - x;        sel_y = '0;      end // 3C / 3B
      {2'd2, 1'b0}, {2'd2, 1'b1}: begin sel_x = (x <<< 3) + (x <<< 1); sel_y = y <<< 1; end // 10B-2A / 10C-2D
      default:                    begin sel_x = x <<< 4;               sel_y = '0;      end // sample point
    endcase
    pair = sel_x - sel_y;
  end

  logic signed [DW-1:0] acc_q;     // first pair sum, held
  logic signed [DW-1:0] total;
  logic signed [DW-1:0] rounded;
  logic [N_OUT-1:0]     sample_q;
  always_comb begin
    total   = acc_q + pair + DW'(8);
    rounded = total >>> 4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx_q     <= '0;
      r_q       <= '0;
      acc_q     <= '0;
      sample_q  <= '0;
      out_valid <= 1'b0;
      dctif     <= '0;
      sample    <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: ;
        S_PH0: begin
          acc_q    <= pair;
          sample_q <= q_bc;
        end
        S_PH1: begin
          out_valid <= 1'b1;
          sample    <= (r_q == 2'd3) ? q_bc : sample_q;
          if (r_q == 2'd0)
            dctif <= sample_q;
          else if (rounded < 0)
            dctif <= '0;
          else if (rounded > DW'(ONES))
            dctif <= ONES;
          else
            dctif <= N_OUT'(rounded);
        end
        default: ;
      endcase
      if (accept) begin
        idx_q <= z[N_IN-1:2];
        r_q   <= z[1:0];
        state <= S_PH0;
      end else if (state == S_PH0) begin
        state <= S_PH1;
      end else begin
        state <= S_IDLE;
      end
    end
  end
endmodule
