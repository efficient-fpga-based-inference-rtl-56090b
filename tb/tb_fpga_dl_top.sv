// tb_fpga_dl_top: end-to-end test of the four designs in the top level at
// its default (full-size) parameters, all running at the same time.
//
//  SNN overlay  configured through AXI4-Lite for 12 inputs, 20 hidden and
//               3 output neurons; weights, biases and 8 images streamed;
//               every result compared with an integer model.
//  DCTIF tanh   a sweep of z over [0, 8) with gaps; error <= 0.004 and the
//               region of every result; 2 cycles per result.
//  POLYBiNN     random 28x28 images, one per cycle; class compared with
//               the tree model and voting rules; latency 7.
//  POLYCiNN     random 32x32x3 images, one row per cycle; class compared
//               with the LBP / downsampling / tree / fusion model;
//               latency 11, ROWS + 1 cycles per image.
// Each mechanism is counted (AXI writes and reads, weight loading, input
// and activation stalls, result back-pressure, tlast, image completion,
// the four tanh regions, POLYBiNN several-active and single-active votes,
// POLYCiNN row stalls and images); a mechanism that never happens counts
// as a failure.
module tb_fpga_dl_top;
  import snn_pkg::*;
  import polybinn_model_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- DUT
  logic [7:0]  snn_s_axil_awaddr = '0, snn_s_axil_araddr = '0;
  logic        snn_s_axil_awvalid = 0, snn_s_axil_wvalid = 0, snn_s_axil_bready = 0;
  logic        snn_s_axil_arvalid = 0, snn_s_axil_rready = 0;
  logic [31:0] snn_s_axil_wdata = '0;
  logic [3:0]  snn_s_axil_wstrb = '1;
  logic        snn_s_axil_awready, snn_s_axil_wready, snn_s_axil_bvalid, snn_s_axil_arready, snn_s_axil_rvalid;
  logic [1:0]  snn_s_axil_bresp, snn_s_axil_rresp;
  logic [31:0] snn_s_axil_rdata;
  logic [31:0] snn_s_axis_tdata = '0;
  logic        snn_s_axis_tvalid = 0, snn_s_axis_tready;
  logic [31:0] snn_m_axis_tdata;
  logic        snn_m_axis_tvalid, snn_m_axis_tready = 0, snn_m_axis_tlast;
  logic        snn_ev_input_stall, snn_ev_act_stall, snn_ev_image_done;
  logic        tanh_in_valid = 0, tanh_in_ready, tanh_out_valid;
  logic [10:0] tanh_z = '0;
  logic [7:0]  tanh_out;
  logic [1:0]  tanh_out_region;
  logic        pbn_in_valid = 0, pbn_out_valid;
  logic [783:0][7:0] pbn_pixels = '0;
  logic [9:0]  pbn_onehot;
  logic        pcn_in_valid = 0, pcn_in_ready, pcn_out_valid;
  logic [31:0][2:0][3:0] pcn_in_row = '0;
  logic [9:0]  pcn_onehot;
  logic [9:0][4:0] pcn_score;

  fpga_dl_top dut (.*);

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // mechanism counters
  int n_axil_wr = 0, n_axil_rd = 0, n_load_done = 0, n_in_stall = 0, n_act_stall = 0;
  int n_backpressure = 0, n_tlast = 0, n_snn_img = 0;
  int n_region [4] = '{0, 0, 0, 0};
  int n_pbn_many = 0, n_pbn_one = 0, n_pbn_img = 0, n_pcn_stall = 0, n_pcn_img = 0;
  bit snn_done = 0, tanh_done = 0, pbn_done = 0, pcn_done = 0;

  // ================================================================ SNN
  localparam int NI = 12, NH = 20, NO = 3, NIMG = 8;
  int hw[NH][NI], hb[NH], ow[NO][NH], ob[NO], simg[NIMG][NI];
  int snn_exp [$];

  always @(posedge clk) begin
    if (snn_ev_input_stall) n_in_stall++;
    if (snn_ev_act_stall) n_act_stall++;
    if (snn_m_axis_tvalid && !snn_m_axis_tready) n_backpressure++;
    if (snn_ev_image_done) n_snn_img++;
  end

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    snn_s_axil_awaddr <= a; snn_s_axil_wdata <= d; snn_s_axil_awvalid <= 1; snn_s_axil_wvalid <= 1;
    @(posedge clk iff (snn_s_axil_awready && snn_s_axil_wready));
    snn_s_axil_awvalid <= 0; snn_s_axil_wvalid <= 0; snn_s_axil_bready <= 1;
    @(posedge clk iff snn_s_axil_bvalid);
    snn_s_axil_bready <= 0;
    n_axil_wr++;
  endtask
  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    snn_s_axil_araddr <= a; snn_s_axil_arvalid <= 1;
    @(posedge clk iff snn_s_axil_arready);
    snn_s_axil_arvalid <= 0; snn_s_axil_rready <= 1;
    @(posedge clk iff snn_s_axil_rvalid);
    d = snn_s_axil_rdata;
    snn_s_axil_rready <= 0;
    n_axil_rd++;
  endtask
  // back-to-back beats keep tvalid high; it drops only before idle cycles
  task automatic stream(input int v);
    snn_s_axis_tvalid <= 1; snn_s_axis_tdata <= 32'(v);
    @(posedge clk iff snn_s_axis_tready);
  endtask
  task automatic stream_idle(input int n);
    if (n > 0) begin
      snn_s_axis_tvalid <= 0;
      repeat (n) @(posedge clk);
    end
  endtask

  function automatic int s8(int r);
    return (r > 127) ? r - 256 : r;
  endfunction
  function automatic int sat16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int qtanh4(int a);
    real x;
    x = real'(a) / 64.0;
    if (x >= 0.5 * $ln(7.0))        return 4;
    if (x >= 0.5 * $ln(3.0))        return 2;
    if (x >= 0.5 * $ln(5.0 / 3.0))  return 1;
    if (x <= -0.5 * $ln(7.0))       return -4;
    if (x <= -0.5 * $ln(3.0))       return -2;
    if (x <= -0.5 * $ln(5.0 / 3.0)) return -1;
    return 0;
  endfunction

  initial begin : snn_driver
    logic [31:0] d;
    for (int h = 0; h < NH; h++) begin
      hb[h] = s8($urandom_range(0, 255)) / 4;
      for (int i = 0; i < NI; i++) hw[h][i] = s8($urandom_range(0, 255)) / 8;
    end
    for (int o = 0; o < NO; o++) begin
      ob[o] = s8($urandom_range(0, 255));
      for (int h = 0; h < NH; h++) ow[o][h] = s8($urandom_range(0, 255));
    end
    for (int n = 0; n < NIMG; n++) for (int i = 0; i < NI; i++) simg[n][i] = $urandom_range(0, 7);
    for (int n = 0; n < NIMG; n++) begin
      int act[NH];
      for (int h = 0; h < NH; h++) begin
        int a;
        a = hb[h];
        for (int i = 0; i < NI; i++)
          a = sat16(a + hw[h][i] * ((simg[n][i] == 0) ? 0 : (1 << (simg[n][i] - 1))));
        act[h] = qtanh4(a);
      end
      for (int o = 0; o < NO; o++) begin
        int y;
        y = 4 * ob[o];
        for (int h = 0; h < NH; h++) y = sat16(y + ow[o][h] * act[h]);
        snn_exp.push_back(y);
      end
    end
    wait (rst_n);
    @(posedge clk);
    axil_write(8'h04, NI);
    axil_write(8'h08, NH);
    axil_write(8'h0C, NO);
    axil_read(8'h08, d);
    checks++;
    if (d != NH) begin failures++; $display("FAIL SNN N_HIDDEN read %0d", d); end
    axil_write(8'h00, 32'(TGT_HID_WEIGHTS));
    for (int h = 0; h < NH; h++) for (int i = 0; i < NI; i++) stream(hw[h][i]);
    stream_idle(1);
    axil_read(8'h10, d);
    checks++;
    if (d[0] !== 1'b1) begin failures++; $display("FAIL SNN load_done not set"); end
    else n_load_done++;
    axil_write(8'h00, 32'(TGT_HID_BIASES));
    for (int h = 0; h < NH; h++) stream(hb[h]);
    stream_idle(1);
    axil_write(8'h00, 32'(TGT_OUT_WEIGHTS));
    for (int o = 0; o < NO; o++) for (int h = 0; h < NH; h++) stream(ow[o][h]);
    stream_idle(1);
    axil_write(8'h00, 32'(TGT_OUT_BIASES));
    for (int o = 0; o < NO; o++) stream(ob[o]);
    stream_idle(1);
    axil_write(8'h00, 32'h100 | 32'(TGT_INPUTS));
    for (int n = 0; n < NIMG; n++)
      for (int i = 0; i < NI; i++) begin
        stream(simg[n][i]);
        if (n < NIMG / 2) stream_idle($urandom_range(0, 3));
      end
    snn_s_axis_tvalid <= 0;
  end

  int beat = 0;
  always @(posedge clk) begin
    snn_m_axis_tready <= ($urandom_range(0, 3) != 0);
    if (snn_m_axis_tvalid && snn_m_axis_tready) begin
      int e;
      e = snn_exp.pop_front();
      checks += 2;
      if (int'($signed(snn_m_axis_tdata)) != e) begin
        failures++;
        if (failures < 10) $display("FAIL SNN result %0d expected %0d", $signed(snn_m_axis_tdata), e);
      end
      if (snn_m_axis_tlast != (beat == NO - 1)) begin failures++; $display("FAIL SNN tlast"); end
      if (snn_m_axis_tlast) n_tlast++;
      beat = snn_m_axis_tlast ? 0 : beat + 1;
      if (snn_exp.size() == 0) snn_done = 1;
    end
  end

  // =============================================================== tanh
  // driven on the falling edge; a value moves on the next rising edge
  int tanh_exp_z [$], tanh_t [$], tanh_in_cycles = 0, tanh_first = -1, tanh_last = 0;
  initial begin : tanh_driver
    wait (rst_n);
    @(negedge clk);
    for (int v = 0; v < 2048; v += 3) begin
      if (v > 1024 && $urandom_range(0, 3) == 0) begin tanh_in_valid = 0; @(negedge clk); end
      tanh_in_valid = 1; tanh_z = 11'(v);
      #1;
      while (!tanh_in_ready) begin @(negedge clk); #1; end
      tanh_exp_z.push_back(v); tanh_t.push_back(cyc);
      if (v == 0) tanh_first = cyc;
      if (v <= 1024) tanh_last = cyc;
      @(negedge clk);
    end
    tanh_in_valid = 0;
  end
  always @(negedge clk) if (rst_n && tanh_out_valid) begin
    int v, t, er; real err;
    v = tanh_exp_z.pop_front(); t = tanh_t.pop_front();
    err = $tanh(real'(v) / 256.0) - real'(tanh_out) / 256.0;
    er = (v < 59) ? 0 : (v >= 712) ? 1 : (v % 4 == 0) ? 2 : 3;
    checks += 3;
    if (err > 0.004 || err < -0.004) begin failures++; $display("FAIL tanh z=%0d err %f", v, err); end
    if (tanh_out_region != 2'(er)) begin failures++; $display("FAIL tanh region z=%0d", v); end
    if (cyc - t != 3) begin failures++; $display("FAIL tanh latency %0d", cyc - t); end
    n_region[tanh_out_region]++;
    if (tanh_exp_z.size() == 0 && !tanh_in_valid) tanh_done = 1;
  end

  // =========================================================== POLYBiNN
  localparam int PR [10] = '{1, 7, 3, 2, 9, 0, 6, 8, 4, 5};
  int pbn_exp [$], pbn_t [$];
  task automatic pbn_reference(input logic [783:0][7:0] px, output int eo);
    logic [9:0] dv; int cv [10];
    for (int m = 0; m < 10; m++) begin
      real s, t;
      s = 0; t = 0;
      for (int n = 0; n < 20; n++) begin
        logic [63:0] lut; int j;
        lut = tree_lut(0, m, n);
        j = 0;
        for (int k = 0; k < K; k++) j |= int'(px[tree_feature(0, m, n, k, 784)] >= 128) << k;
        t += tree_conf(0, m, n);
        if (lut[j]) s += tree_conf(0, m, n);
      end
      dv[m] = s > t / 2;
      cv[m] = $floor(4.0 * s / t);
      if (cv[m] > 3) cv[m] = 3;
    end
    eo = -1;
    for (int i = 0; i < 10; i++)
      if (|dv ? (dv[i] && (eo < 0 || cv[i] > cv[eo])) : (eo < 0 || cv[i] < cv[eo])) eo = i;
    if ($onehot(dv)) n_pbn_one++;
    else if (dv != 0) n_pbn_many++;
  endtask

  initial begin : pbn_driver
    wait (rst_n);
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      logic [783:0][7:0] px; int e;
      // mostly-dark images with a few bright pixels give fewer active classes
      for (int i = 0; i < 784; i++)
        px[i] = (t % 2 == 0) ? 8'($urandom) : (($urandom_range(0, 9) < t % 10) ? 8'd200 : 8'd10);
      pbn_reference(px, e);
      pbn_pixels = px; pbn_in_valid = 1;
      pbn_exp.push_back(e); pbn_t.push_back(cyc);
      @(negedge clk);
    end
    pbn_in_valid = 0;
  end
  always @(negedge clk) if (rst_n && pbn_out_valid) begin
    int e, t;
    e = pbn_exp.pop_front(); t = pbn_t.pop_front();
    checks += 2;
    if (pbn_onehot !== 10'(1) << e) begin failures++; if (failures < 10) $display("FAIL POLYBiNN %b exp %0d", pbn_onehot, e); end
    if (cyc - t != 7) begin failures++; if (failures < 10) $display("FAIL POLYBiNN latency %0d", cyc - t); end
    n_pbn_img++;
    if (n_pbn_img == 300) pbn_done = 1;
  end

  // =========================================================== POLYCiNN
  localparam int R = 32, C = 32, CH = 3, WN = 16, ST = 8, F = 4, DW = 6, N = 100;
  localparam int NWX = 3, NW = 9, NL = CH * 16, NF = NL + DW * DW * CH, NPCN = 6;
  typedef logic [R-1:0][C-1:0][CH-1:0][3:0] img_t;
  int pcn_exp [$], pcn_t [$];

  task automatic pcn_reference(input img_t img, output int cls);
    int hist [NW][CH][16];
    int di [R/F][C/F][CH];
    int sc [10];
    foreach (hist[w, ch, b]) hist[w][ch][b] = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int ch = 0; ch < CH; ch++) begin
      int p, code;
      p = img[r][c][ch]; code = 0;
      if (r > 0     && img[r-1][c][ch] >= p) code |= 8;
      if (c < C - 1 && img[r][c+1][ch] >  p) code |= 4;
      if (r < R - 1 && img[r+1][c][ch] >  p) code |= 2;
      if (c > 0     && img[r][c-1][ch] >= p) code |= 1;
      for (int w = 0; w < NW; w++)
        if (r >= (w / NWX) * ST && r < (w / NWX) * ST + WN && c >= (w % NWX) * ST && c < (w % NWX) * ST + WN)
          hist[w][ch][code]++;
    end
    for (int y = 0; y < R / F; y++) for (int x = 0; x < C / F; x++) for (int ch = 0; ch < CH; ch++) begin
      int s; s = 0;
      for (int a = 0; a < F; a++) for (int b = 0; b < F; b++) s += img[y*F+a][x*F+b][ch];
      di[y][x][ch] = s / (F * F);
    end
    for (int m = 0; m < 10; m++) sc[m] = 0;
    for (int w = 0; w < NW; w++) begin
      int fv [NF]; bit fb [NF];
      for (int ch = 0; ch < CH; ch++) for (int b = 0; b < 16; b++) fv[ch*16+b] = hist[w][ch][b];
      for (int y = 0; y < DW; y++) for (int x = 0; x < DW; x++) for (int ch = 0; ch < CH; ch++)
        fv[NL + (y*DW + x)*CH + ch] = di[w / NWX + y][w % NWX + x][ch];
      for (int i = 0; i < NF; i++)
        fb[i] = fv[i] >= ((i < NL) ? feature_threshold(w, i, WN * WN / 4) : feature_threshold(w, i, 15));
      for (int m = 0; m < 10; m++) begin
        real s, t; int q;
        s = 0; t = 0;
        for (int n = 0; n < N; n++) begin
          logic [63:0] lut; int j;
          lut = tree_lut(w + 1, m, n);
          j = 0;
          for (int k = 0; k < K; k++) j |= int'(fb[tree_feature(w + 1, m, n, k, NF)]) << k;
          t += tree_conf(w + 1, m, n);
          if (lut[j]) s += tree_conf(w + 1, m, n);
        end
        q = $floor(4.0 * s / t);
        if (q > 3) q = 3;
        sc[m] += q;
      end
    end
    cls = 0;
    for (int m = 1; m < 10; m++) if (sc[m] > sc[cls]) cls = m;
  endtask

  initial begin : pcn_driver
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NPCN; i++) begin
      img_t img; int cls;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int ch = 0; ch < CH; ch++)
        img[r][c][ch] = 4'($urandom);
      pcn_reference(img, cls);
      pcn_exp.push_back(cls);
      for (int r = 0; r < R; r++) begin
        pcn_in_valid = 1; pcn_in_row = img[r];
        #1;
        while (!pcn_in_ready) begin n_pcn_stall++; @(negedge clk); #1; end
        if (r == R - 1) pcn_t.push_back(cyc);
        @(negedge clk);
      end
    end
    pcn_in_valid = 0;
  end
  always @(negedge clk) if (rst_n && pcn_out_valid) begin
    int e, t;
    e = pcn_exp.pop_front(); t = pcn_t.pop_front();
    checks += 2;
    if (pcn_onehot !== 10'(1) << e) begin failures++; $display("FAIL POLYCiNN %b exp %0d", pcn_onehot, e); end
    if (cyc - t != 11) begin failures++; $display("FAIL POLYCiNN latency %0d", cyc - t); end
    n_pcn_img++;
    if (n_pcn_img == NPCN) pcn_done = 1;
  end

  // ============================================================ summary
  task automatic need(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("  %-28s %0d", name, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (snn_done && tanh_done && pbn_done && pcn_done);
    repeat (5) @(posedge clk);
    checks += 4;
    if (snn_exp.size() != 0) begin failures++; $display("FAIL SNN results missing"); end
    if (tanh_exp_z.size() != 0) begin failures++; $display("FAIL tanh results missing"); end
    if (pbn_exp.size() != 0) begin failures++; $display("FAIL POLYBiNN results missing"); end
    if (pcn_exp.size() != 0) begin failures++; $display("FAIL POLYCiNN results missing"); end
    // rate checks: tanh one result per 2 cycles over the gap-free part
    checks++;
    if ((tanh_last - tanh_first) > 2 * (1024 / 3) + 1) begin
      failures++; $display("FAIL tanh rate: %0d cycles", tanh_last - tanh_first);
    end
    $display("mechanisms:");
    need("SNN AXI-Lite writes", n_axil_wr);
    need("SNN AXI-Lite reads", n_axil_rd);
    need("SNN weight load done", n_load_done);
    need("SNN input stalls", n_in_stall);
    need("SNN activation stalls", n_act_stall);
    need("SNN result back-pressure", n_backpressure);
    need("SNN tlast", n_tlast);
    need("SNN images", n_snn_img);
    need("tanh pass region", n_region[0]);
    need("tanh saturation region", n_region[1]);
    need("tanh sample region", n_region[2]);
    need("tanh interpolation region", n_region[3]);
    need("POLYBiNN one class active", n_pbn_one);
    need("POLYBiNN several active", n_pbn_many);
    need("POLYBiNN images", n_pbn_img);
    need("POLYCiNN row stalls", n_pcn_stall);
    need("POLYCiNN images", n_pcn_img);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
