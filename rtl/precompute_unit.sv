// precompute_unit: on-the-fly pre-computation of every product a tile can need.
//
// Because every filter weight is a signed power of two (or zero), the product
// of a feature with any weight is the feature shifted by a fixed amount. The
// unit holds a shift table with one entry per quantization level (direction
// bit and magnitude, as in the original paper; the zero flag is this design's way of
// representing the zero level) and a block of shifters. Every feature of the
// incoming tile is shifted by every table entry at once, giving TILE x NQ
// products that the compute units use as their lookup table.
//
// Numbers: features are signed fixed point; a left shift is exact (the product
// is FEAT_W + MAX_LSH bits wide), a right shift is arithmetic and drops the
// bits shifted out (rounds towards minus infinity). Products keep the
// feature's binary point.
//
// Interface and timing: the shift table is written through st_we/st_idx/
// st_entry, normally before a run; reset marks every entry as the zero level.
// A tile presented with in_valid appears as products, with out_valid, on the
// next clock edge (latency 1, one tile per cycle).
module precompute_unit
  import qcnn_pkg::*;
#(
  parameter int unsigned TILE = K_VEC_DEF * C_VEC_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  // shift table configuration
  input  logic         st_we,
  input  logic [IDX_W-1:0] st_idx,
  input  shift_entry_t st_entry,
  // input tile
  input  logic         in_valid,
  input  feat_t        in_feat [TILE],
  // pre-computed products: out_prod[f][q] = in_feat[f] * level q
  output logic         out_valid,
  output prod_t        out_prod [TILE][NQ]
);

  shift_entry_t table_q [NQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) table_q[q] <= '{zero: 1'b1, dir: 1'b0, mag: '0};
    end else if (st_we) begin
      table_q[st_idx] <= st_entry;
    end
  end

  // Shifters: one per (feature, level) pair.
  prod_t prod_d [TILE][NQ];
  always_comb begin
    for (int f = 0; f < TILE; f++) begin
      for (int q = 0; q < NQ; q++) begin
        if (table_q[q].zero)
          prod_d[f][q] = '0;
        else if (table_q[q].dir)
          prod_d[f][q] = prod_t'(in_feat[f]) >>> table_q[q].mag;
        else
          prod_d[f][q] = prod_t'(in_feat[f]) <<< table_q[q].mag;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_prod <= prod_d;
  end

endmodule
