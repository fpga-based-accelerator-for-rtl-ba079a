// tb_alexnet_conv5: an AlexNet workload at the default size (K_VEC=3,
// C_VEC=16, P_VEC=32). Layer A is one convolution group of AlexNet's conv5:
// 192 input channels of 13x13, 3x3 kernel, stride 1, padding 1, ReLU and
// 3x3 stride-2 max-pooling to 6x6, for the first 32 output channels (one
// command). Layer B is a 1x1 convolution over its output with the
// post-processors bypassed, as in the other end-to-end tests. Every output is
// compared with an integer model, and the layer's cycle count is checked
// against one tile per cycle (36 pooled positions x 9 window outputs x 36
// tiles = 11,664 tiles). Kernel chunking and stride do not occur in this
// layer and are not required; stalls and padding are counted but not
// required either.
module tb_alexnet_conv5;
  localparam int KV = 3, CV = 16, PV = 32, FMD = 8192, FCD = 256;
  localparam int A_CIN = 192, A_HW = 13, A_K = 3, A_S = 1, A_PAD = 1, A_PK = 3, A_PS = 2;
  localparam int OUTB = 4096;
  localparam int WATCHDOG = 2000000;
  localparam bit ALL_MECH = 0;

  import qcnn_pkg::*;
  localparam int TILE  = KV * CV;
  localparam int FM_AW = $clog2(FMD);
  localparam int FC_AW = $clog2(FCD);
  localparam int LW    = (CV > 1) ? $clog2(CV) : 1;
  localparam int PW    = (PV > 1) ? $clog2(PV) : 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic st_we = 0;
  logic [IDX_W-1:0] st_idx = '0;
  shift_entry_t st_entry = '0;
  logic cmd_valid = 0;
  layer_cfg_t cmd_cfg = '0;
  logic busy, done, stall;
  logic hw_en = 0, hw_half = 0;
  logic [LW-1:0] hw_lane = '0;
  logic [19:0] hw_row_base = '0;
  logic [11:0] hw_x = '0;
  feat_t hw_data = '0;
  logic hr_en = 0, hr_half = 0;
  logic [LW-1:0] hr_lane = '0;
  logic [FM_AW-1:0] hr_addr = '0;
  feat_t hr_data;
  logic fc_wr_en = 0, fc_wr_half = 0;
  logic [PW-1:0] fc_wr_cu = '0;
  logic [FC_AW-1:0] fc_wr_addr = '0;
  filt_code_t fc_wr_data [TILE];

  qcnn_top dut (
    .clk, .rst_n, .st_we, .st_idx, .st_entry, .cmd_valid, .cmd_cfg, .busy, .done, .stall,
    .hw_en, .hw_half, .hw_lane, .hw_row_base, .hw_x, .hw_data,
    .hr_en, .hr_half, .hr_lane, .hr_addr, .hr_data,
    .fc_wr_en, .fc_wr_cu, .fc_wr_half, .fc_wr_addr, .fc_wr_data
  );

  // ---------------- reference model ----------------
  int  exps  [NQ] = '{1, 0, -1, -2, -3, 0, 2, -4, 3, -4, -5, -6, -2, 0, -1, -7};
  bit  zeros [NQ] = '{0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0};
  localparam int ZERO_IDX = 5;

  int checks = 0, failures = 0;
  int n_lshift = 0, n_rshift = 0, n_zero = 0, n_neg = 0, n_sat = 0, n_relu = 0;
  int n_pool = 0, n_bypass = 0, n_stall = 0, n_overlap = 0, n_chunks = 0, n_stride = 0;
  int n_halfswap = 0, n_groups = 0, n_pad = 0;
  longint busy_cycles = 0, stall_cycles = 0;

  always @(posedge clk) begin
    if (rst_n && busy) busy_cycles++;
    if (rst_n && stall) begin stall_cycles++; n_stall++; end
    if (fc_wr_en && busy) n_overlap++;
  end

  function automatic longint ref_prod(longint f, filt_code_t c);
    longint d, v;
    int e = exps[c.idx];
    if (zeros[c.idx]) return 0;
    if (e >= 0) v = f * (longint'(1) << e);
    else begin
      d = longint'(1) << (-e);
      v = (f >= 0) ? f / d : -((-f + d - 1) / d);
    end
    return c.sign ? -v : v;
  endfunction

  // Features: index (c*H + y)*W + x. Weights: ((m*CIN + c)*K + i)*K + j.
  typedef struct {
    int cin, h, w, k, s, pad, pk, ps, m;
    bit relu, pool, bypass;
    int qc, qo;
  } layer_t;

  function automatic layer_t mk(int cin, int h, int w, int k, int s, int pad, bit pool, int pk, int ps,
                                bit relu, bit bypass, int m);
    layer_t L;
    L.cin = cin; L.h = h; L.w = w; L.k = k; L.s = s; L.pad = pad; L.pool = pool; L.pk = pool ? pk : 1;
    L.ps = pool ? ps : 1; L.relu = relu; L.bypass = bypass; L.m = m;
    L.qc = (h + 2 * pad - k) / s + 1;
    L.qo = (L.qc - L.pk) / L.ps + 1;
    return L;
  endfunction

  task automatic ref_layer(layer_t L, ref int fin [], ref filt_code_t wt [], ref int fout []);
    fout = new[L.m * L.qo * L.qo];
    for (int m = 0; m < L.m; m++)
      for (int pr = 0; pr < L.qo; pr++)
        for (int pc = 0; pc < L.qo; pc++) begin
          longint best = 0;
          for (int wy = 0; wy < L.pk; wy++)
            for (int wx = 0; wx < L.pk; wx++) begin
              longint sum = 0, v;
              int r = pr * L.ps + wy, c = pc * L.ps + wx;
              for (int n = 0; n < L.cin; n++)
                for (int i = 0; i < L.k; i++)
                  for (int j = 0; j < L.k; j++) begin
                    filt_code_t code = wt[((m * L.cin + n) * L.k + i) * L.k + j];
                    int yy = r * L.s + i - L.pad, xx = c * L.s + j - L.pad;
                    if (yy >= 0 && yy < L.h && xx >= 0 && xx < L.w)
                      sum += ref_prod(fin[(n * L.h + yy) * L.w + xx], code);
                    else if (!zeros[code.idx]) n_pad++;
                    if (zeros[code.idx]) n_zero++;
                    else if (exps[code.idx] > 0) n_lshift++;
                    else if (exps[code.idx] < 0) n_rshift++;
                    if (code.sign && !zeros[code.idx]) n_neg++;
                  end
              v = sum > 32767 ? 32767 : (sum < -32768 ? -32768 : sum);
              if (v != sum) n_sat++;
              if (!L.bypass && L.relu && v < 0) begin v = 0; n_relu++; end
              if ((wy == 0 && wx == 0) || v > best) best = v;
            end
          fout[(m * L.qo + pr) * L.qo + pc] = int'(best);
        end
  endtask

  // ---------------- host operations ----------------
  task automatic load_features(layer_t L, ref int fin [], input bit half, input int base);
    int groups = (L.cin + CV - 1) / CV;
    for (int c = 0; c < groups * CV; c++)
      for (int y = 0; y < L.h; y++)
        for (int x = 0; x < L.w; x++) begin
          @(negedge clk);
          hw_en = 1; hw_half = half; hw_lane = LW'(c % CV);
          hw_row_base = 20'(base + ((c / CV) * L.h + y) * L.w);
          hw_x = 12'(x);
          // channels past cin hold junk that zero weights must cancel
          hw_data = (c < L.cin) ? feat_t'(fin[(c * L.h + y) * L.w + x]) : feat_t'($urandom);
        end
    @(negedge clk) hw_en = 0;
  endtask

  // Filters of output channels m0 .. m0+PV-1 into cache half `half`.
  task automatic load_filters(layer_t L, ref filt_code_t wt [], input int m0, input bit half);
    int groups = (L.cin + CV - 1) / CV;
    int chunks = (L.k + KV - 1) / KV;
    for (int p = 0; p < PV; p++) begin
      int t = 0;
      for (int g = 0; g < groups; g++)
        for (int i = 0; i < L.k; i++)
          for (int jc = 0; jc < chunks; jc++) begin
            @(negedge clk);
            fc_wr_en = 1; fc_wr_cu = PW'(p); fc_wr_half = half; fc_wr_addr = FC_AW'(t);
            for (int j = 0; j < KV; j++)
              for (int l = 0; l < CV; l++) begin
                int c = g * CV + l, col = jc * KV + j;
                if (c < L.cin && col < L.k)
                  fc_wr_data[j * CV + l] = wt[(((m0 + p) * L.cin + c) * L.k + i) * L.k + col];
                else
                  fc_wr_data[j * CV + l] = '{sign: 1'($urandom), idx: IDX_W'(ZERO_IDX)};
              end
            t++;
          end
    end
    @(negedge clk) fc_wr_en = 0;
  endtask

  function automatic layer_cfg_t mkcfg(layer_t L, bit in_half, bit filt_half, int in_base,
                                       int out_base, int out_cg0);
    layer_cfg_t c = '0;
    c.in_half = in_half; c.filt_half = filt_half;
    c.in_base = 20'(in_base); c.out_base = 20'(out_base);
    c.in_cg = 12'((L.cin + CV - 1) / CV);
    c.in_h = 12'(L.h); c.in_w = 12'(L.w); c.k = 4'(L.k); c.stride = 4'(L.s); c.pad = 4'(L.pad);
    c.out_h = 12'(L.qo); c.out_w = 12'(L.qo); c.out_cg0 = 12'(out_cg0);
    c.pool_en = L.pool; c.pool_k = 4'(L.pk); c.pool_s = 4'(L.ps);
    c.relu_en = L.relu; c.bypass = L.bypass;
    return c;
  endfunction

  int n_done = 0, n_started = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic start(layer_cfg_t c);
    n_started++;
    @(negedge clk);
    cmd_valid = 1; cmd_cfg = c;
    @(negedge clk) cmd_valid = 0;
  endtask

  task automatic wait_done();
    while (n_done < n_started) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic check_output(layer_t L, ref int fref [], input bit half, input int base,
                              input int m_lo, input int m_hi);
    for (int m = m_lo; m < m_hi; m++)
      for (int pr = 0; pr < L.qo; pr++)
        for (int pc = 0; pc < L.qo; pc++) begin
          @(negedge clk);
          hr_en = 1; hr_half = half; hr_lane = LW'(m % CV);
          hr_addr = FM_AW'(base + ((m / CV) * L.qo + pr) * L.qo + pc);
          @(negedge clk);
          hr_en = 0;
          checks++;
          if (int'(hr_data) != fref[(m * L.qo + pr) * L.qo + pc]) begin
            failures++;
            if (failures < 10)
              $display("ch %0d (%0d,%0d): got %0d want %0d", m, pr, pc, hr_data,
                       fref[(m * L.qo + pr) * L.qo + pc]);
          end
        end
  endtask

  task automatic check_rate(layer_t L, longint b0, longint s0, int cmds);
    longint tiles = longint'(cmds) * L.qo * L.qo * L.pk * L.pk * ((L.cin + CV - 1) / CV) * L.k *
                    ((L.k + KV - 1) / KV);
    longint extra = (busy_cycles - b0) - (stall_cycles - s0) - tiles;
    checks++;
    // one tile per cycle; only the pipeline tail and the last write-back add cycles
    if (extra < 0 || extra > cmds * (8 + PV / CV)) begin
      failures++;
      $display("rate: %0d busy cycles, %0d stalls, %0d tiles", busy_cycles - b0, stall_cycles - s0, tiles);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    layer_t LA, LB;
    int fa [], fa_out [], fb_out [];
    filt_code_t wa [], wb [];
    longint b0, s0;

    LA = mk(A_CIN, A_HW, A_HW, A_K, A_S, A_PAD, 1, A_PK, A_PS, 1, 0, PV);
    LB = mk(PV, LA.qo, LA.qo, 1, 1, 0, 0, 1, 1, 0, 1, 2 * PV);
    fa = new[LA.cin * LA.h * LA.w];
    foreach (fa[i]) fa[i] = $urandom_range(0, 4095) - 2048;
    wa = new[LA.m * LA.cin * LA.k * LA.k];
    foreach (wa[i]) wa[i] = filt_code_t'($urandom);
    wb = new[LB.m * LB.cin * LB.k * LB.k];
    foreach (wb[i]) wb[i] = filt_code_t'($urandom);
    for (int j = 0; j < TILE; j++) fc_wr_data[j] = '0;
    ref_layer(LA, fa, wa, fa_out);
    ref_layer(LB, fa_out, wb, fb_out);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < NQ; q++) begin
      @(negedge clk);
      st_we = 1; st_idx = IDX_W'(q);
      st_entry = '{zero: zeros[q], dir: exps[q] < 0, mag: MAG_W'(exps[q] < 0 ? -exps[q] : exps[q])};
    end
    @(negedge clk) st_we = 0;

    // Layer A: conv + ReLU + overlapping max-pool, half 0 -> half 1.
    load_features(LA, fa, 0, 0);
    load_filters(LA, wa, 0, 0);
    b0 = busy_cycles; s0 = stall_cycles;
    start(mkcfg(LA, 0, 0, 0, 0, 0));
    // Filters of the next command go into the other cache half meanwhile.
    load_filters(LB, wb, 0, 1);
    wait_done();
    check_rate(LA, b0, s0, 1);
    check_output(LA, fa_out, 1, 0, 0, PV);
    if (LA.k > KV) n_chunks++;
    if (LA.s > 1) n_stride++;
    if (LA.cin > CV) n_groups++;
    n_pool++;

    // Layer B: pointwise conv, post-processing bypassed, half 1 -> half 0,
    // 2*PV output channels in two commands, one per filter cache half.
    b0 = busy_cycles; s0 = stall_cycles;
    start(mkcfg(LB, 1, 1, 0, OUTB, 0));
    load_filters(LB, wb, PV, 0);
    wait_done();
    start(mkcfg(LB, 1, 0, 0, OUTB, PV / CV));
    wait_done();
    check_rate(LB, b0, s0, 2);
    check_output(LB, fb_out, 0, OUTB, 0, 2 * PV);
    n_bypass++;
    n_halfswap++;

    $display("mechanisms: lshift=%0d rshift=%0d zero=%0d neg=%0d sat=%0d relu=%0d pool=%0d bypass=%0d",
             n_lshift, n_rshift, n_zero, n_neg, n_sat, n_relu, n_pool, n_bypass);
    $display("            stall=%0d filter_overlap=%0d chunks=%0d stride=%0d groups=%0d halfswap=%0d pad=%0d",
             n_stall, n_overlap, n_chunks, n_stride, n_groups, n_halfswap, n_pad);
    checks++; if (n_lshift == 0) begin failures++; $display("no left shift"); end
    checks++; if (n_rshift == 0) begin failures++; $display("no right shift"); end
    checks++; if (n_zero == 0) begin failures++; $display("no zero weight"); end
    checks++; if (n_neg == 0) begin failures++; $display("no negative weight"); end
    checks++; if (n_sat == 0) begin failures++; $display("no saturation"); end
    checks++; if (n_relu == 0) begin failures++; $display("no ReLU clip"); end
    if (A_PK > 1) begin
      checks++; if (n_pool == 0) begin failures++; $display("no pooling"); end
    end
    checks++; if (n_bypass == 0) begin failures++; $display("no bypass"); end
    if (ALL_MECH) begin
      checks++; if (n_stall == 0) begin failures++; $display("no write-back stall"); end
    end
    checks++; if (n_overlap == 0) begin failures++; $display("no filter load overlap"); end
    if (ALL_MECH) begin
      checks++; if (n_chunks == 0) begin failures++; $display("no multi-chunk kernel"); end
      checks++; if (n_stride == 0) begin failures++; $display("no stride"); end
    end
    checks++; if (n_groups == 0) begin failures++; $display("no channel groups"); end
    if (ALL_MECH) begin
      checks++; if (n_pad == 0) begin failures++; $display("no zero padding"); end
    end
    checks++; if (n_halfswap == 0) begin failures++; $display("no buffer half swap"); end
    $display("cycles: busy %0d, stalled %0d", busy_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
