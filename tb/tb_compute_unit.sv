// tb_compute_unit: loads random filter words into both cache halves, streams
// random product tiles in inner products of random length (back to back, one
// tile per cycle) and compares each result with a sum formed by the testbench
// from the same products and codes. Checks the two-cycle result latency and
// that one result leaves per inner product.
module tb_compute_unit;
  import qcnn_pkg::*;
  localparam int TILE = 4, FC_DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fc_wr_en = 0, fc_wr_half = 0, fc_rd_half = 0;
  logic [3:0] fc_wr_addr = '0, fc_rd_addr = '0;
  filt_code_t fc_wr_data [TILE];
  tile_ctrl_t in_ctrl = '0;
  prod_t in_prod [TILE][NQ];
  logic out_valid;
  acc_t out_data;

  compute_unit #(.TILE(TILE), .FC_DEPTH(FC_DEPTH)) dut (.*);

  filt_code_t model [2][FC_DEPTH][TILE];
  longint expq [$];
  int cycq [$];
  int cyc = 0, checks = 0, failures = 0, results = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    results++;
    if (expq.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      automatic longint e = expq.pop_front();
      automatic int c = cycq.pop_front();
      if (longint'(out_data) != e) begin failures++; $display("got %0d want %0d", out_data, e); end
      if (cyc - c != 2) begin failures++; $display("latency %0d", cyc - c); end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < FC_DEPTH; a++) begin
        @(negedge clk);
        fc_wr_en = 1; fc_wr_half = h[0]; fc_wr_addr = 4'(a);
        for (int t = 0; t < TILE; t++) begin
          fc_wr_data[t] = filt_code_t'($urandom);
          model[h][a][t] = fc_wr_data[t];
        end
      end
    @(negedge clk) fc_wr_en = 0;
    for (int n = 0; n < 30; n++) begin
      automatic int len = $urandom_range(1, FC_DEPTH);
      automatic int h = n % 2;
      automatic longint sum = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in_ctrl = '{valid: 1'b1, first: k == 0, last: k == len - 1};
        fc_rd_half = h[0];
        fc_rd_addr = 4'(k);
        for (int t = 0; t < TILE; t++)
          for (int q = 0; q < NQ; q++) in_prod[t][q] = prod_t'($urandom_range(0, 200000) - 100000);
        for (int t = 0; t < TILE; t++) begin
          automatic filt_code_t c = model[h][k][t];
          automatic longint p = longint'(in_prod[t][c.idx]);
          sum += c.sign ? -p : p;
        end
        if (k == len - 1) begin expq.push_back(sum); cycq.push_back(cyc); end
        // idle gaps between some tiles
        if ($urandom_range(3) == 0) begin
          @(negedge clk); in_ctrl = '0;
        end
      end
    end
    @(negedge clk) in_ctrl = '0;
    repeat (6) @(posedge clk);
    checks++;
    if (results != 30 || expq.size() != 0) begin failures++; $display("results %0d", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
