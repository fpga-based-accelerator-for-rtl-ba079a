// qcnn_pkg: sizes and types shared by the quantized-CNN accelerator.
//
// The accelerator multiplies fixed-point features by filter weights that are
// restricted to signed powers of two (or zero). A weight is stored as a 5-bit
// code: one sign bit and a 4-bit index into an ordered quantization set. A
// shift table, written once before a run, gives for each index a shift
// direction and magnitude (and, in this design, a flag for the zero level).
//
// The tile geometry follows the original paper: an input tile is K_VEC x C_VEC
// features, P_VEC compute units work on P_VEC output channels at once, and the
// peak configuration is C_VEC = 16, P_VEC = 32. K_VEC, the feature and
// accumulator widths, the fixed-point format and the buffer depths are not
// given by the original paper and are this design's choices.
package qcnn_pkg;

  // Tile and array geometry.
  localparam int unsigned K_VEC_DEF = 3;    // kernel columns per tile (assumed)
  localparam int unsigned C_VEC_DEF = 16;   // channels per tile (original paper)
  localparam int unsigned P_VEC_DEF = 32;   // compute units (original paper)

  // Number formats.
  localparam int unsigned FEAT_W    = 16;   // signed feature, Q7.8
  localparam int unsigned FEAT_FRAC = 8;
  localparam int unsigned IDX_W     = 4;    // index field of a filter code
  localparam int unsigned NQ        = 1 << IDX_W;  // shift table entries
  localparam int unsigned MAG_W     = 3;    // shift magnitude field
  localparam int unsigned MAX_LSH   = (1 << MAG_W) - 1;
  localparam int unsigned PROD_W    = FEAT_W + MAX_LSH;  // exact for left shifts
  localparam int unsigned ACC_W     = 32;

  // Buffer depths (entries per half of a double buffer).
  localparam int unsigned FM_DEPTH_DEF = 8192;
  localparam int unsigned FC_DEPTH_DEF = 256;

  // Encoded filter value (one sign bit, one index field).
  typedef struct packed {
    logic             sign;   // 1: negative weight
    logic [IDX_W-1:0] idx;    // position in the ordered quantization set
  } filt_code_t;

  localparam int unsigned CODE_W = $bits(filt_code_t);

  // One entry of the shift table.
  typedef struct packed {
    logic             zero;   // level is 0: product forced to 0
    logic             dir;    // 0: shift left (exponent >= 0), 1: shift right
    logic [MAG_W-1:0] mag;    // shift amount
  } shift_entry_t;

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Loop-control sideband that travels with a tile through the pipeline.
  typedef struct packed {
    logic valid;   // a tile is present
    logic first;   // first tile of an inner product: clear the accumulator
    logic last;    // last tile of an inner product: emit the result
  } tile_ctrl_t;

  // Layer command: one convolution (or fully-connected) pass of P_VEC output
  // channels, written by the host into the buffer controller.
  typedef struct packed {
    logic        in_half;   // feature buffer half read; outputs go to the other
    logic        filt_half; // filter cache half read
    logic [19:0] in_base;   // feature buffer address of the input map
    logic [19:0] out_base;  // feature buffer address of the output map
    logic [11:0] in_cg;     // input channel groups of C_VEC channels
    logic [11:0] in_h;      // input rows
    logic [11:0] in_w;      // input columns
    logic [3:0]  k;         // kernel size K (K x K)
    logic [3:0]  stride;    // convolution stride S
    logic [3:0]  pad;       // zero padding on every side of the input
    logic [11:0] out_h;     // output rows (after pooling)
    logic [11:0] out_w;     // output columns (after pooling)
    logic [11:0] out_cg0;   // first output channel group written
    logic        pool_en;   // max-pooling on
    logic [3:0]  pool_k;    // pooling window (pool_k x pool_k)
    logic [3:0]  pool_s;    // pooling stride
    logic        relu_en;   // ReLU on
    logic        bypass;    // post-processing bypassed
  } layer_cfg_t;

  // Saturate an accumulator value to the feature format.
  function automatic feat_t sat_feat(input acc_t v);
    acc_t maxv, minv;
    maxv = acc_t'((1 << (FEAT_W - 1)) - 1);
    minv = -acc_t'(1 << (FEAT_W - 1));
    if (v > maxv)      return feat_t'(maxv);
    else if (v < minv) return feat_t'(minv);
    else               return feat_t'(v);
  endfunction

endpackage
