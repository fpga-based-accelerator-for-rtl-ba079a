// buffer_controller: data movement and loop control of the accelerator.
//
// The controller owns the on-chip feature map buffers. It (1) writes feature
// data arriving from global memory into the banks, (2) runs one layer command
// by reading one K_VEC x C_VEC input tile per cycle and steering it to the
// pre-compute unit and compute array, and (3) writes the post-processed
// outputs back into the other half of the feature map buffers, ready for the
// next layer. These three duties follow the original paper; the addressing scheme,
// the command format and the handshakes below are this design's own.
//
// Feature layout. Bank (j, l), j < K_VEC, l < C_VEC, holds channel
// g*C_VEC + l of every channel group g, shifted by j columns: the word at
// address row_base + x holds I[row][x + j], where row = g*H + y and
// row_base = base + row*W. One address applied to all banks therefore yields
// K_VEC neighbouring columns of C_VEC channels: an input tile. Every feature
// written (by the host or by write-back) is stored K_VEC times, at address
// row_base + x - j in bank (j, l). A copy with x < j lands in a slot of the
// previous row that stands for a column past that row's end, which is never
// used unmasked; addresses wrap modulo the bank depth, so a map placed at
// address 0 also occupies the last K_VEC-1 addresses of the half.
//
// Loop order of a command, outermost first: pooled output row pr, pooled
// column pc, pooling window row wy and column wx, input channel group cg,
// kernel row i, kernel column chunk j0 (step K_VEC). The tile for these is
// read at in_base + (cg*H + y)*W + x with y = (pr*PS+wy)*S + i - pad and
// x = (pc*PS+wx)*S + j0 - pad, and the filter cache word at the running tile
// count. Zero padding is done on the read side: pre_colmask marks, for each
// column j of the tile, whether row y and column x + j lie inside the input,
// and the features of masked columns are replaced by zero. One inner product takes
// in_cg * K * ceil(K/K_VEC) tiles. Kernel columns past K and channels past
// the layer's count must carry zero-level filter codes.
//
// Write-back. The P_VEC pooled results of one output position arrive
// together; they are written C_VEC at a time (P_VEC/C_VEC cycles), channel
// p going to bank lane p mod C_VEC of channel group out_cg0 + p / C_VEC. The
// controller stalls the tile that would complete the next output position
// while a previous one is still waiting to be written, so results never
// overtake the write-back.
//
// Timing: a tile issued in cycle n is read from the banks in n, reaches the
// pre-compute unit in n+1 (pre_valid) and the compute units in n+2 (cu_*).
// cmd_valid is accepted while busy is low; done pulses when the last output
// is written. Host reads and writes of the feature buffers are honoured only
// while busy is low; host read data comes from bank (0, hr_lane) one cycle
// after hr_en.
module buffer_controller
  import qcnn_pkg::*;
#(
  parameter int unsigned K_VEC    = K_VEC_DEF,
  parameter int unsigned C_VEC    = C_VEC_DEF,
  parameter int unsigned P_VEC    = P_VEC_DEF,
  parameter int unsigned FM_DEPTH = FM_DEPTH_DEF,
  parameter int unsigned FC_DEPTH = FC_DEPTH_DEF,
  localparam int unsigned TILE    = K_VEC * C_VEC,
  localparam int unsigned FM_AW   = $clog2(FM_DEPTH),
  localparam int unsigned FC_AW   = $clog2(FC_DEPTH),
  localparam int unsigned LW      = (C_VEC > 1) ? $clog2(C_VEC) : 1,
  localparam int unsigned GROUPS  = P_VEC / C_VEC
) (
  input  logic             clk,
  input  logic             rst_n,
  // layer command
  input  logic             cmd_valid,
  input  layer_cfg_t       cmd_cfg,
  output logic             busy,
  output logic             done,
  output logic             stall,        // tile issue held back this cycle
  // host access to the feature buffers (global memory side)
  input  logic             hw_en,
  input  logic             hw_half,
  input  logic [LW-1:0]    hw_lane,
  input  logic [19:0]      hw_row_base,  // address of the row's column 0
  input  logic [11:0]      hw_x,
  input  feat_t            hw_data,
  input  logic             hr_en,
  input  logic             hr_half,
  input  logic [FM_AW-1:0] hr_addr,
  // feature map banks
  output logic             fm_rd_en,
  output logic             fm_rd_half,
  output logic [FM_AW-1:0] fm_rd_addr,
  output logic             fm_wr_en   [TILE],
  output logic             fm_wr_half,
  output logic [FM_AW-1:0] fm_wr_addr [TILE],
  output feat_t            fm_wr_data [TILE],
  // pre-compute unit and compute array
  output logic             pre_valid,
  output logic             pre_colmask [K_VEC],  // column j of the tile is inside the input
  output tile_ctrl_t       cu_ctrl,
  output logic             cu_fc_half,
  output logic [FC_AW-1:0] cu_fc_addr,
  // post-processors
  output logic             pp_clear,
  output logic             pp_bypass,
  output logic             pp_relu,
  output logic [7:0]       pp_pool_n,
  input  logic             pp_valid,
  input  feat_t            pp_data [P_VEC]
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t     state;
  layer_cfg_t cfg;

  // Loop counters.
  logic [11:0] pr, pc, cg;
  logic [3:0]  wy, wx, ki, j0;
  logic [FC_AW-1:0] tcount;
  logic [3:0]  pk, ps;
  logic        pending;

  always_comb begin
    pk = (cfg.pool_en && !cfg.bypass) ? cfg.pool_k : 4'd1;
    ps = (cfg.pool_en && !cfg.bypass) ? cfg.pool_s : 4'd1;
  end

  logic        t_first, t_last, t_win_last, issue;
  logic [31:0] r_conv, c_conv;
  logic signed [31:0] y_in, x_in, tile_addr;
  logic        colmask [K_VEC];

  always_comb begin
    t_first    = (cg == '0) && (ki == '0) && (j0 == '0);
    t_last     = (cg == cfg.in_cg - 12'd1) && (ki == cfg.k - 4'd1) &&
                 (32'(j0) + K_VEC >= 32'(cfg.k));
    t_win_last = t_last && (wy == pk - 4'd1) && (wx == pk - 4'd1);
    stall      = (state == S_RUN) && t_win_last && pending;
    issue      = (state == S_RUN) && !stall;
    r_conv     = 32'(pr) * 32'(ps) + 32'(wy);
    c_conv     = 32'(pc) * 32'(ps) + 32'(wx);
    y_in       = signed'(r_conv * 32'(cfg.stride) + 32'(ki)) - signed'(32'(cfg.pad));
    x_in       = signed'(c_conv * 32'(cfg.stride) + 32'(j0)) - signed'(32'(cfg.pad));
    tile_addr  = signed'(32'(cfg.in_base)) +
                 (signed'(32'(cg) * 32'(cfg.in_h)) + y_in) * signed'(32'(cfg.in_w)) + x_in;
    for (int j = 0; j < K_VEC; j++)
      colmask[j] = (y_in >= 0) && (y_in < signed'(32'(cfg.in_h))) &&
                   (x_in + j >= 0) && (x_in + j < signed'(32'(cfg.in_w)));
  end

  // Bank read port: compute tiles while running, host reads while idle.
  always_comb begin
    if (state == S_IDLE) begin
      fm_rd_en   = hr_en;
      fm_rd_half = hr_half;
      fm_rd_addr = hr_addr;
    end else begin
      fm_rd_en   = issue;
      fm_rd_half = cfg.in_half;
      fm_rd_addr = FM_AW'(tile_addr);
    end
  end

  // Control sideband, delayed to meet the products.
  tile_ctrl_t       ctrl_d1;
  logic [FC_AW-1:0] faddr_d1;
  always_ff @(posedge clk) begin
    if (issue) pre_colmask <= colmask;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_d1    <= '0;
      cu_ctrl    <= '0;
      faddr_d1   <= '0;
      cu_fc_addr <= '0;
    end else begin
      ctrl_d1    <= '{valid: issue, first: t_first, last: t_last};
      faddr_d1   <= tcount;
      cu_ctrl    <= ctrl_d1;
      cu_fc_addr <= faddr_d1;
    end
  end
  assign pre_valid  = ctrl_d1.valid;
  assign cu_fc_half = cfg.filt_half;

  assign pp_bypass = cfg.bypass;
  assign pp_relu   = cfg.relu_en;
  assign pp_pool_n = 8'(pk) * 8'(pk);

  // Write-back holding registers.
  feat_t       hold [P_VEC];
  logic        wb_active;
  logic [7:0]  wb_g;
  logic [11:0] wb_pr, wb_pc;
  logic        wb_finish;

  assign wb_finish = wb_active && (32'(wb_g) == GROUPS - 1);

  // Main sequencer.
  logic issue_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cfg        <= '0;
      {pr, pc, cg, wy, wx, ki, j0} <= '0;
      tcount     <= '0;
      pending    <= 1'b0;
      wb_active  <= 1'b0;
      wb_g       <= '0;
      wb_pr      <= '0;
      wb_pc      <= '0;
      done       <= 1'b0;
      pp_clear   <= 1'b0;
      issue_done <= 1'b0;
    end else begin
      done     <= 1'b0;
      pp_clear <= 1'b0;
      case (state)
        S_IDLE: if (cmd_valid) begin
          cfg        <= cmd_cfg;
          state      <= S_RUN;
          pp_clear   <= 1'b1;
          {pr, pc, cg, wy, wx, ki, j0} <= '0;
          tcount     <= '0;
          wb_pr      <= '0;
          wb_pc      <= '0;
          issue_done <= 1'b0;
        end
        S_RUN: if (issue) begin
          // advance the loop nest, innermost first
          tcount <= t_last ? '0 : tcount + 1'b1;
          if (32'(j0) + K_VEC < 32'(cfg.k)) j0 <= j0 + 4'(K_VEC);
          else begin
            j0 <= '0;
            if (ki != cfg.k - 4'd1) ki <= ki + 4'd1;
            else begin
              ki <= '0;
              if (cg != cfg.in_cg - 12'd1) cg <= cg + 12'd1;
              else begin
                cg <= '0;
                if (wx != pk - 4'd1) wx <= wx + 4'd1;
                else begin
                  wx <= '0;
                  if (wy != pk - 4'd1) wy <= wy + 4'd1;
                  else begin
                    wy <= '0;
                    if (pc != cfg.out_w - 12'd1) pc <= pc + 12'd1;
                    else begin
                      pc <= '0;
                      if (pr != cfg.out_h - 12'd1) pr <= pr + 12'd1;
                      else begin
                        pr    <= '0;
                        state <= S_DRAIN;
                      end
                    end
                  end
                end
              end
            end
          end
        end
        S_DRAIN: if (!pending && !wb_active && issue_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      if (state == S_RUN && issue && t_win_last && pr == cfg.out_h - 12'd1 &&
          pc == cfg.out_w - 12'd1)
        issue_done <= 1'b1;

      // pending: one output position issued but not yet written back
      if (issue && t_win_last) pending <= 1'b1;
      else if (wb_finish)      pending <= 1'b0;

      if (pp_valid && state != S_IDLE) begin
        wb_active <= 1'b1;
        wb_g      <= '0;
        hold      <= pp_data;
      end else if (wb_active) begin
        if (wb_finish) begin
          wb_active <= 1'b0;
          if (wb_pc != cfg.out_w - 12'd1) wb_pc <= wb_pc + 12'd1;
          else begin
            wb_pc <= '0;
            wb_pr <= wb_pr + 12'd1;
          end
        end else begin
          wb_g <= wb_g + 8'd1;
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  // Replicated writes into the feature banks.
  logic signed [31:0] w_row_base, w_x, h_row_base, h_x;
  always_comb begin
    w_row_base = signed'(32'(cfg.out_base) +
                 ((32'(cfg.out_cg0) + 32'(wb_g)) * 32'(cfg.out_h) + 32'(wb_pr)) * 32'(cfg.out_w));
    w_x        = signed'(32'(wb_pc));
    h_row_base = signed'(32'(hw_row_base));
    h_x        = signed'(32'(hw_x));
    for (int j = 0; j < K_VEC; j++) begin
      for (int l = 0; l < C_VEC; l++) begin
        if (state != S_IDLE) begin
          fm_wr_en[j*C_VEC+l]   = wb_active;
          fm_wr_addr[j*C_VEC+l] = FM_AW'(w_row_base + w_x - j);
          fm_wr_data[j*C_VEC+l] = hold[32'(wb_g) * C_VEC + l];
        end else begin
          fm_wr_en[j*C_VEC+l]   = hw_en && (32'(hw_lane) == l);
          fm_wr_addr[j*C_VEC+l] = FM_AW'(h_row_base + h_x - j);
          fm_wr_data[j*C_VEC+l] = hw_data;
        end
      end
    end
    fm_wr_half = (state != S_IDLE) ? !cfg.in_half : hw_half;
  end

  // A new result set must not arrive while the previous one is being written.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) pp_valid |-> !wb_active;
  endproperty
  a_no_overrun: assert property (p_no_overrun);

  initial begin
    assert (P_VEC % C_VEC == 0) else $error("P_VEC must be a multiple of C_VEC");
  end

endmodule
