// tb_buffer_controller: runs layer commands through the controller alone. The
// testbench stands in for the data path: it answers every group of pool_n
// finished inner products with a set of post-processed results three cycles
// later, as the compute units and post-processors would. It checks, against
// loop nests written out independently here: the sequence of tile read
// addresses, the first/last marks and filter cache addresses that reach the
// compute units two cycles later, the zero-padding column masks, the replicated write-back of every result
// into K_VEC banks, the replicated host writes, pool_n, and the done pulse.
module tb_buffer_controller;
  import qcnn_pkg::*;
  localparam int KV = 2, CV = 2, PV = 4, FMD = 1024, FCD = 64;
  localparam int TILE = KV * CV;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0;
  layer_cfg_t cmd_cfg = '0;
  logic busy, done, stall;
  logic hw_en = 0, hw_half = 0;
  logic [0:0] hw_lane = '0;
  logic [19:0] hw_row_base = '0;
  logic [11:0] hw_x = '0;
  feat_t hw_data = '0;
  logic hr_en = 0, hr_half = 0;
  logic [9:0] hr_addr = '0;
  logic fm_rd_en, fm_rd_half, fm_wr_half;
  logic [9:0] fm_rd_addr;
  logic fm_wr_en [TILE];
  logic [9:0] fm_wr_addr [TILE];
  feat_t fm_wr_data [TILE];
  logic pre_valid, cu_fc_half;
  logic pre_colmask [KV];
  tile_ctrl_t cu_ctrl;
  logic [5:0] cu_fc_addr;
  logic pp_clear, pp_bypass, pp_relu;
  logic [7:0] pp_pool_n;
  logic pp_valid = 0;
  feat_t pp_data [PV];

  buffer_controller #(.K_VEC(KV), .C_VEC(CV), .P_VEC(PV), .FM_DEPTH(FMD), .FC_DEPTH(FCD)) dut (.*);

  int checks = 0, failures = 0;
  int exp_addr [$], exp_first [$], exp_last [$], exp_fca [$], exp_mask [$];
  int exp_wr [int];       // key bank*FMD + addr -> data
  int got_wr [int];
  int seq = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  // Expected tile stream and write-back for one command.
  task automatic expect_cmd(layer_cfg_t c);
    int pk = (c.pool_en && !c.bypass) ? int'(c.pool_k) : 1;
    int ps = (c.pool_en && !c.bypass) ? int'(c.pool_s) : 1;
    int chunks = (int'(c.k) + KV - 1) / KV;
    int s = 0;
    for (int pr = 0; pr < c.out_h; pr++)
      for (int pc = 0; pc < c.out_w; pc++) begin
        for (int wy = 0; wy < pk; wy++)
          for (int wx = 0; wx < pk; wx++) begin
            int t = 0;
            for (int g = 0; g < c.in_cg; g++)
              for (int i = 0; i < c.k; i++)
                for (int jc = 0; jc < chunks; jc++) begin
                  int y = (pr * ps + wy) * c.stride + i - c.pad;
                  int x = (pc * ps + wx) * c.stride + jc * KV - c.pad;
                  int mk = 0;
                  for (int j = 0; j < KV; j++)
                    if (y >= 0 && y < c.in_h && x + j >= 0 && x + j < c.in_w) mk |= 1 << j;
                  exp_mask.push_back(mk);
                  exp_addr.push_back((int'(c.in_base) + (g * c.in_h + y) * c.in_w + x) & (FMD - 1));
                  exp_first.push_back(t == 0);
                  exp_last.push_back(g == c.in_cg - 1 && i == c.k - 1 && jc == chunks - 1);
                  exp_fca.push_back(t);
                  t++;
                end
          end
        for (int p = 0; p < PV; p++)
          for (int j = 0; j < KV; j++) begin
            int row = int'(c.out_base) + ((int'(c.out_cg0) + p / CV) * c.out_h + pr) * c.out_w;
            exp_wr[(j * CV + p % CV) * FMD + ((row + pc - j) & (FMD - 1))] = ((seq + s) * 16 + p) & 16'h7fff;
          end
        s++;
      end
  endtask

  // Observe the controller.
  int lasts = 0;
  int pend_cnt [$];
  always @(posedge clk) if (rst_n) begin
    if (busy && fm_rd_en) begin
      checks++;
      if (exp_addr.size() == 0) fail("extra tile read");
      else begin
        automatic int a = exp_addr.pop_front();
        if (int'(fm_rd_addr) != a) fail($sformatf("tile addr %0d want %0d", fm_rd_addr, a));
      end
    end
    if (pre_valid) begin
      checks++;
      if (exp_mask.size() == 0) fail("extra tile at pre-compute");
      else begin
        automatic int mk = exp_mask.pop_front();
        for (int j = 0; j < KV; j++)
          if (pre_colmask[j] != mk[j]) fail($sformatf("column mask %0d", j));
      end
    end
    if (cu_ctrl.valid) begin
      checks++;
      if (exp_first.size() == 0) fail("extra tile at compute units");
      else begin
        automatic int f = exp_first.pop_front();
        automatic int l = exp_last.pop_front();
        automatic int fa = exp_fca.pop_front();
        if (cu_ctrl.first != f[0] || cu_ctrl.last != l[0] || int'(cu_fc_addr) != fa)
          fail($sformatf("ctrl f%0d l%0d a%0d want f%0d l%0d a%0d", cu_ctrl.first, cu_ctrl.last,
                         cu_fc_addr, f, l, fa));
      end
      if (cu_ctrl.last) begin
        lasts++;
        if (lasts == int'(pp_pool_n)) begin lasts = 0; pend_cnt.push_back(3); end
      end
    end
    for (int b = 0; b < TILE; b++)
      if (fm_wr_en[b]) got_wr[b * FMD + int'(fm_wr_addr[b])] = int'(fm_wr_data[b]);
  end

  // Data path stand-in: results three cycles after the last tile of a window.
  always @(negedge clk) begin
    pp_valid = 0;
    foreach (pend_cnt[i]) pend_cnt[i]--;
    if (pend_cnt.size() > 0 && pend_cnt[0] == 0) begin
      void'(pend_cnt.pop_front());
      pp_valid = 1;
      for (int p = 0; p < PV; p++) pp_data[p] = feat_t'(((seq * 16) + p) & 16'h7fff);
      seq++;
    end
  end

  task automatic run(layer_cfg_t c);
    int cyc = 0;
    expect_cmd(c);
    got_wr.delete();
    @(negedge clk);
    cmd_valid = 1; cmd_cfg = c;
    @(negedge clk) cmd_valid = 0;
    while (!done && cyc < 20000) begin @(posedge clk); cyc++; end
    checks++;
    if (!done) fail("no done");
    checks++;
    if (exp_addr.size() != 0 || exp_first.size() != 0) fail("tiles missing");
    checks++;
    if (int'(pp_pool_n) != ((c.pool_en && !c.bypass) ? int'(c.pool_k) * int'(c.pool_k) : 1))
      fail("pool_n");
    foreach (exp_wr[k]) begin
      checks++;
      if (!got_wr.exists(k) || got_wr[k] != exp_wr[k])
        fail($sformatf("write bank %0d addr %0d missing or wrong", k / FMD, k % FMD));
    end
    checks++;
    if (got_wr.size() != exp_wr.size()) fail("unexpected writes");
    exp_wr.delete();
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    layer_cfg_t c;
    for (int p = 0; p < PV; p++) pp_data[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Host write: replicated into KV banks of its lane.
    @(negedge clk);
    hw_en = 1; hw_half = 1; hw_lane = 1'b1; hw_row_base = 20'd40; hw_x = 12'd3; hw_data = 16'sd77;
    #1;
    for (int b = 0; b < TILE; b++) begin
      checks++;
        if (fm_wr_en[b] != (b % CV == 1) || (fm_wr_en[b] && (int'(fm_wr_addr[b]) != 43 - b / CV ||
          fm_wr_data[b] != 16'sd77)) || !fm_wr_half)
        fail($sformatf("host write bank %0d", b));
    end
    @(negedge clk) hw_en = 0;

    c = '0;
    c.in_half = 0; c.filt_half = 1; c.in_base = 20'd100; c.out_base = 20'd300;
    c.in_cg = 12'd2; c.in_h = 12'd9; c.in_w = 12'd9; c.k = 4'd3; c.stride = 4'd2;
    c.out_h = 12'd2; c.out_w = 12'd2; c.out_cg0 = 12'd1;
    c.pool_en = 1; c.pool_k = 4'd2; c.pool_s = 4'd2; c.relu_en = 1; c.pad = 4'd1;
    run(c);
    checks++;
    if (fm_wr_half != 1'b1 && busy) fail("write half");
    // Bypassed, 1x1 kernel: short inner products, pooling ignored.
    c.in_half = 1; c.bypass = 1; c.k = 4'd1; c.pad = 4'd0; c.stride = 4'd1; c.in_cg = 12'd1;
    c.out_h = 12'd3; c.out_w = 12'd4; c.out_cg0 = 12'd0; c.in_base = 20'd0;
    run(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
