// filter_cache: double-buffered store of encoded filter data for one compute unit.
//
// Each compute unit owns one cache. A word holds the encoded filter values
// for one full input tile (TILE codes), so the compute unit receives all the
// weights it needs for a tile in one read. The cache has two halves: while
// the compute unit reads one, the other can be refilled from global memory,
// which overlaps computation with external transfers (original paper). The word
// layout and depth are this design's choices.
//
// Interface and timing: one write port (wr_en, wr_half, wr_addr, wr_data) and
// one read port (rd_en, rd_half, rd_addr); read data appears on rd_data on the
// clock edge after rd_en (latency 1). The halves are independent, so a write
// to one half and a read from the other never conflict.
module filter_cache
  import qcnn_pkg::*;
#(
  parameter int unsigned TILE  = K_VEC_DEF * C_VEC_DEF,
  parameter int unsigned DEPTH = FC_DEPTH_DEF,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic       wr_half,
  input  logic [AW-1:0] wr_addr,
  input  filt_code_t wr_data [TILE],
  input  logic       rd_en,
  input  logic       rd_half,
  input  logic [AW-1:0] rd_addr,
  output filt_code_t rd_data [TILE]
);

  localparam int unsigned WORD_W = TILE * CODE_W;

  logic [WORD_W-1:0] mem [2*DEPTH];
  logic [WORD_W-1:0] wr_word, rd_word;

  always_comb begin
    for (int t = 0; t < TILE; t++) wr_word[t*CODE_W +: CODE_W] = wr_data[t];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_half, wr_addr}] <= wr_word;
    if (rd_en) rd_word <= mem[{rd_half, rd_addr}];
  end

  always_comb begin
    for (int t = 0; t < TILE; t++) rd_data[t] = filt_code_t'(rd_word[t*CODE_W +: CODE_W]);
  end

endmodule
