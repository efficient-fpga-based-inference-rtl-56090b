// polybinn_argmax: voting of POLYBiNN, from the M class decisions D_m and
// 2-bit confidences C_m to an M-bit one-hot class.
//
// ORIGINAL mode (as published): if one class is active it wins; if several are
// active the one with the highest confidence wins; if none is active the
// one with the lowest confidence wins. Built as a tree of pipelined
// comparators, one register level per tree level (ceil(log2 M) levels).
// Each entry carries a 3-bit key: when any class is active, {D, D ? C : 0},
// otherwise {0, ~C}; the larger key wins and equal keys go to the lower
// class index (the tie rule is this design's choice).
//
// SIMPLIFIED mode (as published, for unbalanced training sets): a priority
// encoder over D_m in the order given by PRIORITY (most training samples
// first). When no class is active the first class of PRIORITY is chosen
// (this design's choice). Its output goes through the same number of
// register levels, so both modes have the same latency.
//
// Timing: ceil(log2 M) + 1 cycles from in_valid to out_valid, one vector
// per cycle.
module polybinn_argmax #(
  parameter int M = 10,
  parameter bit SIMPLIFIED = 1'b0,
  // class indices, highest priority first (MNIST training-set sizes)
  parameter int PRIORITY [M] = '{1, 7, 3, 2, 9, 0, 6, 8, 4, 5}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [M-1:0]        dec,
  input  logic [M-1:0][1:0]   conf,
  output logic                out_valid,
  output logic [M-1:0]        onehot
);
  localparam int L  = (M > 1) ? $clog2(M) : 1;
  localparam int P  = 2 ** L;
  localparam int IW = (M > 1) ? $clog2(M) : 1;

  typedef struct packed {
    logic          valid;   // a real class (padding entries are not)
    logic [2:0]    key;
    logic [IW-1:0] idx;
  } cand_t;

  // ---- level 0: build keys
  logic  any_active;
  cand_t lvl0 [P];
  always_comb begin
    any_active = |dec;
    for (int i = 0; i < P; i++) begin
      if (i < M) begin
        lvl0[i].valid = 1'b1;
        lvl0[i].idx   = IW'(i);
        if (any_active) lvl0[i].key = dec[i] ? {1'b1, conf[i]} : 3'b000;
        else            lvl0[i].key = {1'b0, ~conf[i]};
      end else begin
        lvl0[i] = '0;
      end
    end
  end

  function automatic cand_t pick(cand_t a, cand_t b);
    if (!b.valid) return a;
    if (!a.valid) return b;
    return (b.key > a.key) ? b : a;   // a has the lower index
  endfunction

  // ---- comparator tree, one register level per tree level
  cand_t stage [L+1][P];
  logic  vpipe [L+1];
  always_comb begin
    stage[0] = lvl0;
    vpipe[0] = in_valid;
  end
  for (genvar l = 0; l < L; l++) begin : g_lvl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < P; i++) stage[l+1][i] <= '0;
        vpipe[l+1] <= 1'b0;
      end else begin
        for (int i = 0; i < P; i++)
          stage[l+1][i] <= (i < (P >> (l + 1))) ? pick(stage[l][2*i], stage[l][2*i+1]) : '0;
        vpipe[l+1] <= vpipe[l];
      end
    end
  end

  // ---- simplified voting: priority encoder, delayed to the same latency
  logic [IW-1:0] prio_idx;
  always_comb begin
    prio_idx = IW'(PRIORITY[0]);
    for (int i = M - 1; i >= 0; i--)
      if (dec[PRIORITY[i]]) prio_idx = IW'(PRIORITY[i]);
  end
  logic [IW-1:0] prio_pipe [L+1];
  assign prio_pipe[0] = prio_idx;
  for (genvar l = 0; l < L; l++) begin : g_pd
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) prio_pipe[l+1] <= '0;
      else        prio_pipe[l+1] <= prio_pipe[l];
    end
  end

  // ---- output register
  logic [IW-1:0] win;
  assign win = SIMPLIFIED ? prio_pipe[L] : stage[L][0].idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      onehot    <= '0;
    end else begin
      out_valid <= vpipe[L];
      onehot    <= M'(1) << win;
    end
  end
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> $onehot(onehot));
endmodule
