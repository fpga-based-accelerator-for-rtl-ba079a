// post_processor: ReLU and max-pooling of one compute unit's results.
//
// Each inner product is first saturated to the feature format (this design's
// choice, so the result can be stored back in the feature map buffers), then
// optionally passed through ReLU, then folded into a running maximum over
// pool_n consecutive results. The buffer controller orders its loops so that
// the pool_n results of one pooling window arrive back to back; overlapping
// windows are handled by recomputing the shared outputs. Setting bypass sends
// every saturated result straight through, as the original paper allows through its
// configuration registers.
//
// Interface and timing: config inputs must be stable while results arrive.
// out_valid pulses one cycle after the in_valid that completes a window
// (after every in_valid when bypassed or pool_n is 1). clear restarts the
// window count (used at the start of a layer).
module post_processor
  import qcnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       bypass,
  input  logic       relu_en,
  input  logic [7:0] pool_n,     // results per pooling window, >= 1
  input  logic       in_valid,
  input  acc_t       in_data,
  output logic       out_valid,
  output feat_t      out_data
);

  feat_t      v, cur_max;
  logic [7:0] cnt;
  logic       win_first, win_last;

  always_comb begin
    v = sat_feat(in_data);
    if (!bypass && relu_en && v < 0) v = '0;
    win_first = (cnt == '0);
    win_last  = bypass || (cnt + 8'd1 >= pool_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      cur_max   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (win_last) begin
          out_valid <= 1'b1;
          out_data  <= (win_first || v > cur_max) ? v : cur_max;
          cnt       <= '0;
        end else begin
          cur_max <= (win_first || v > cur_max) ? v : cur_max;
          cnt     <= cnt + 8'd1;
        end
      end
    end
  end

endmodule
