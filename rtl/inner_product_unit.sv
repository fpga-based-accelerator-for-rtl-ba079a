// inner_product_unit: lookup-table multiplication of one feature.
//
// The compute unit's lookup table holds, for the feature this unit serves,
// its product with every quantization level. The unit uses the index field of
// the encoded filter value to pick the matching entry and the sign bit to
// negate it: a multiplication with no multiplier. The selection follows the
// original paper; the unit is purely combinational, and its result goes to the
// compute unit's accumulator.
module inner_product_unit
  import qcnn_pkg::*;
(
  input  prod_t      lut [NQ],   // this feature times each level
  input  filt_code_t code,       // encoded filter value
  output prod_t      term        // feature * weight
);

  prod_t sel;
  always_comb begin
    sel  = lut[code.idx];
    term = code.sign ? -sel : sel;
  end

endmodule
