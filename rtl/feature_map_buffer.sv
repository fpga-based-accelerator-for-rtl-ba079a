// feature_map_buffer: one double-buffered feature bank.
//
// The accelerator has K_VEC x C_VEC of these banks so that one full input
// tile can be read in a single cycle, as in the original paper. Each bank has
// two halves: one feeds the current layer while the outputs of that layer
// are written into the other, so intermediate feature maps never leave the chip. Which
// half is read and which is written is chosen per access by the buffer
// controller. Depth and width are this design's choices.
//
// Interface and timing: one read port and one write port, usable in the same
// cycle. Read data appears on rd_data on the clock edge after rd_en
// (latency 1).
module feature_map_buffer
  import qcnn_pkg::*;
#(
  parameter int unsigned DEPTH = FM_DEPTH_DEF,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_half,
  input  logic [AW-1:0] wr_addr,
  input  feat_t         wr_data,
  input  logic          rd_en,
  input  logic          rd_half,
  input  logic [AW-1:0] rd_addr,
  output feat_t         rd_data
);

  feat_t mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_half, wr_addr}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_half, rd_addr}];
  end

endmodule
