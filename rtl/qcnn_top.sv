// qcnn_top: accelerator for CNNs whose weights are quantized to powers of two.
//
// Data path, as in the original paper's overall architecture: the buffer controller
// reads one K_VEC x C_VEC input tile per cycle from the K_VEC*C_VEC feature
// map banks; the pre-compute unit turns each feature of the tile into its
// products with every quantization level; the P_VEC compute units of the
// linear compute array each select their products with their own encoded
// filters and accumulate an inner product for one output channel; P_VEC
// post-processors apply saturation, ReLU and max-pooling (or are bypassed);
// the buffer controller writes the results into the other half of the
// feature map banks, where the next layer finds them.
//
// The host (the SoC's processor and its DMA, not part of this RTL) sees plain
// ports: it writes the shift table, loads features into the banks and
// filters into the filter caches, issues one layer command at a time and
// reads results back. Filter caches are double-buffered, so the next
// command's filters can be loaded while a command runs. Features may be
// loaded or read only while busy is low.
//
// Timing: a command runs at one tile per cycle, except for write-back stalls
// (see buffer_controller); results appear four cycles after their last tile
// is issued and take P_VEC/C_VEC cycles to write back. hr_data is valid one
// cycle after hr_en.
module qcnn_top
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
  localparam int unsigned PW      = (P_VEC > 1) ? $clog2(P_VEC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // shift table
  input  logic             st_we,
  input  logic [IDX_W-1:0] st_idx,
  input  shift_entry_t     st_entry,
  // layer commands
  input  logic             cmd_valid,
  input  layer_cfg_t       cmd_cfg,
  output logic             busy,
  output logic             done,
  output logic             stall,
  // feature loads and read-back
  input  logic             hw_en,
  input  logic             hw_half,
  input  logic [LW-1:0]    hw_lane,
  input  logic [19:0]      hw_row_base,
  input  logic [11:0]      hw_x,
  input  feat_t            hw_data,
  input  logic             hr_en,
  input  logic             hr_half,
  input  logic [LW-1:0]    hr_lane,
  input  logic [FM_AW-1:0] hr_addr,
  output feat_t            hr_data,
  // filter loads
  input  logic             fc_wr_en,
  input  logic [PW-1:0]    fc_wr_cu,
  input  logic             fc_wr_half,
  input  logic [FC_AW-1:0] fc_wr_addr,
  input  filt_code_t       fc_wr_data [TILE]
);

  // Feature map banks.
  logic             fm_rd_en, fm_rd_half, fm_wr_half;
  logic [FM_AW-1:0] fm_rd_addr;
  logic             fm_wr_en   [TILE];
  logic [FM_AW-1:0] fm_wr_addr [TILE];
  feat_t            fm_wr_data [TILE];
  feat_t            tile       [TILE];

  for (genvar b = 0; b < TILE; b++) begin : g_bank
    feature_map_buffer #(.DEPTH(FM_DEPTH)) u_fmb (
      .clk     (clk),
      .wr_en   (fm_wr_en[b]),
      .wr_half (fm_wr_half),
      .wr_addr (fm_wr_addr[b]),
      .wr_data (fm_wr_data[b]),
      .rd_en   (fm_rd_en),
      .rd_half (fm_rd_half),
      .rd_addr (fm_rd_addr),
      .rd_data (tile[b])
    );
  end

  logic [LW-1:0] hr_lane_q;
  always_ff @(posedge clk) begin
    if (hr_en) hr_lane_q <= hr_lane;
  end
  assign hr_data = tile[32'(hr_lane_q)];

  // Controller.
  logic             pre_valid, cu_fc_half;
  logic             pre_colmask [K_VEC];
  tile_ctrl_t       cu_ctrl;
  logic [FC_AW-1:0] cu_fc_addr;
  logic             pp_clear, pp_bypass, pp_relu;
  logic [7:0]       pp_pool_n;
  logic             pp_valid [P_VEC];
  feat_t            pp_data  [P_VEC];

  buffer_controller #(
    .K_VEC(K_VEC), .C_VEC(C_VEC), .P_VEC(P_VEC),
    .FM_DEPTH(FM_DEPTH), .FC_DEPTH(FC_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_cfg, .busy, .done, .stall,
    .hw_en, .hw_half, .hw_lane, .hw_row_base, .hw_x, .hw_data,
    .hr_en, .hr_half, .hr_addr,
    .fm_rd_en, .fm_rd_half, .fm_rd_addr,
    .fm_wr_en, .fm_wr_half, .fm_wr_addr, .fm_wr_data,
    .pre_valid, .pre_colmask, .cu_ctrl, .cu_fc_half, .cu_fc_addr,
    .pp_clear, .pp_bypass, .pp_relu, .pp_pool_n,
    .pp_valid (pp_valid[0]),
    .pp_data
  );

  // Zero padding: features of tile columns outside the input are replaced by 0.
  feat_t tile_in [TILE];
  always_comb begin
    for (int b = 0; b < TILE; b++) tile_in[b] = pre_colmask[b / C_VEC] ? tile[b] : '0;
  end

  // Pre-compute unit.
  logic  prod_valid;
  prod_t prod [TILE][NQ];

  precompute_unit #(.TILE(TILE)) u_pre (
    .clk, .rst_n,
    .st_we, .st_idx, .st_entry,
    .in_valid  (pre_valid),
    .in_feat   (tile_in),
    .out_valid (prod_valid),
    .out_prod  (prod)
  );

  // Linear compute array and post-processors.
  for (genvar p = 0; p < P_VEC; p++) begin : g_cu
    logic cu_valid;
    acc_t cu_data;

    compute_unit #(.TILE(TILE), .FC_DEPTH(FC_DEPTH)) u_cu (
      .clk, .rst_n,
      .fc_wr_en   (fc_wr_en && (32'(fc_wr_cu) == p)),
      .fc_wr_half (fc_wr_half),
      .fc_wr_addr (fc_wr_addr),
      .fc_wr_data (fc_wr_data),
      .in_ctrl    (cu_ctrl),
      .fc_rd_half (cu_fc_half),
      .fc_rd_addr (cu_fc_addr),
      .in_prod    (prod),
      .out_valid  (cu_valid),
      .out_data   (cu_data)
    );

    post_processor u_pp (
      .clk, .rst_n,
      .clear     (pp_clear),
      .bypass    (pp_bypass),
      .relu_en   (pp_relu),
      .pool_n    (pp_pool_n),
      .in_valid  (cu_valid),
      .in_data   (cu_data),
      .out_valid (pp_valid[p]),
      .out_data  (pp_data[p])
    );
  end

  // The products reach the compute units in step with the control word.
  a_prod_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                   cu_ctrl.valid |-> prod_valid);

endmodule
