// tb_precompute_unit: checks the shifters against products computed by
// integer arithmetic (multiplication for left shifts, floor division for
// right shifts), including the shift table {1, 0, -1, -2, -3} applied to the
// feature 2.0 (giving {4, 2, 1, 0.5, 0.25}), zero levels, negative features and the
// one-cycle latency.
module tb_precompute_unit;
  import qcnn_pkg::*;
  localparam int TILE = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic st_we = 0;
  logic [IDX_W-1:0] st_idx = '0;
  shift_entry_t st_entry = '0;
  logic in_valid = 0, out_valid;
  feat_t in_feat [TILE];
  prod_t out_prod [TILE][NQ];

  precompute_unit #(.TILE(TILE)) dut (.*);

  int checks = 0, failures = 0;
  int exps [NQ];
  bit zeros [NQ];

  function automatic longint ref_prod(longint f, int e, bit z);
    longint d;
    if (z) return 0;
    if (e >= 0) return f * (longint'(1) << e);
    d = longint'(1) << (-e);
    if (f >= 0) return f / d;
    return -((-f + d - 1) / d);
  endfunction

  task automatic check_tile();
    @(posedge clk);   // tile sampled here
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    for (int f = 0; f < TILE; f++)
      for (int q = 0; q < NQ; q++) begin
        longint exp_v = ref_prod(longint'(in_feat[f]), exps[q], zeros[q]);
        checks++;
        if (longint'(out_prod[f][q]) != exp_v) begin
          failures++;
          $display("feat %0d level %0d: got %0d want %0d", in_feat[f], q, out_prod[f][q], exp_v);
        end
      end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < NQ; q++) in_feat[q % TILE] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Table: paper example at 0..4, zero level at 5, assorted others.
    for (int q = 0; q < NQ; q++) begin
      if (q <= 4)       exps[q] = 1 - q;
      else if (q == 5)  exps[q] = 0;
      else              exps[q] = (q % 2) ? -(q % 8) : (q % 8);
      zeros[q] = (q == 5) || (q == 15);
      @(negedge clk);
      st_we = 1; st_idx = q[IDX_W-1:0];
      st_entry = '{zero: zeros[q], dir: exps[q] < 0, mag: MAG_W'(exps[q] < 0 ? -exps[q] : exps[q])};
    end
    @(negedge clk) st_we = 0;
    // Worked example: feature 2.0
    in_feat[0] = feat_t'(2 << FEAT_FRAC);
    in_feat[1] = feat_t'(-3 << FEAT_FRAC);
    in_feat[2] = 16'sh7fff;
    in_feat[3] = -16'sd1;
    in_valid = 1;
    check_tile();
    checks++;
    if (out_prod[0][0] != prod_t'(4 << FEAT_FRAC) || out_prod[0][1] != prod_t'(2 << FEAT_FRAC) ||
        out_prod[0][2] != prod_t'(1 << FEAT_FRAC) || out_prod[0][3] != prod_t'(1 << (FEAT_FRAC-1)) ||
        out_prod[0][4] != prod_t'(1 << (FEAT_FRAC-2))) begin
      failures++; $display("worked example mismatch %0d %0d %0d %0d %0d", out_prod[0][0], out_prod[0][1], out_prod[0][2], out_prod[0][3], out_prod[0][4]);
    end
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int f = 0; f < TILE; f++) in_feat[f] = feat_t'($urandom);
      in_valid = 1;
      check_tile();
    end
    // No new tile: out_valid must drop.
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
