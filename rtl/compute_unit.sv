// compute_unit: one element of the linear compute array.
//
// A compute unit produces one output feature (one output channel at one
// position) at a time. Every cycle it takes the pre-computed products of one
// input tile into its lookup table, reads the matching word of encoded filter
// values from its own filter cache, and lets TILE inner product units pick
// and sign their products concurrently. The sum of the TILE terms is added to
// the accumulator register; on the tile marked last the partial sum leaves as
// the finished inner product instead of being stored back (as in the
// original paper). The number of tiles per inner product is set by the
// controller's loop, not fixed here.
//
// Pipeline (this design's choice): products, filter address and the tile
// control word are presented together; the lookup table and the filter word
// are registered on that edge (stage 1); the terms are summed and the
// accumulator or result register is written on the next edge (stage 2). A
// result therefore appears two cycles after its last tile was presented, and
// a new tile can be presented every cycle.
module compute_unit
  import qcnn_pkg::*;
#(
  parameter int unsigned TILE     = K_VEC_DEF * C_VEC_DEF,
  parameter int unsigned FC_DEPTH = FC_DEPTH_DEF,
  localparam int unsigned FC_AW   = $clog2(FC_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // filter cache refill
  input  logic             fc_wr_en,
  input  logic             fc_wr_half,
  input  logic [FC_AW-1:0] fc_wr_addr,
  input  filt_code_t       fc_wr_data [TILE],
  // tile stream
  input  tile_ctrl_t       in_ctrl,
  input  logic             fc_rd_half,
  input  logic [FC_AW-1:0] fc_rd_addr,
  input  prod_t            in_prod [TILE][NQ],
  // finished inner products
  output logic             out_valid,
  output acc_t             out_data
);

  // Stage 1: lookup table, filter word, control.
  prod_t      lut [TILE][NQ];
  filt_code_t code [TILE];
  tile_ctrl_t ctrl_q;

  filter_cache #(.TILE(TILE), .DEPTH(FC_DEPTH)) u_cache (
    .clk     (clk),
    .wr_en   (fc_wr_en),
    .wr_half (fc_wr_half),
    .wr_addr (fc_wr_addr),
    .wr_data (fc_wr_data),
    .rd_en   (in_ctrl.valid),
    .rd_half (fc_rd_half),
    .rd_addr (fc_rd_addr),
    .rd_data (code)
  );

  always_ff @(posedge clk) begin
    if (in_ctrl.valid) lut <= in_prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl_q <= '0;
    else        ctrl_q <= in_ctrl;
  end

  // Stage 2: inner product units and accumulator.
  prod_t term [TILE];
  for (genvar t = 0; t < TILE; t++) begin : g_ipu
    inner_product_unit u_ipu (
      .lut  (lut[t]),
      .code (code[t]),
      .term (term[t])
    );
  end

  acc_t acc_q, psum;
  always_comb begin
    psum = ctrl_q.first ? '0 : acc_q;
    for (int t = 0; t < TILE; t++) psum += acc_t'(term[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= ctrl_q.valid && ctrl_q.last;
      if (ctrl_q.valid) begin
        if (ctrl_q.last) out_data <= psum;
        else             acc_q    <= psum;
      end
    end
  end

endmodule
