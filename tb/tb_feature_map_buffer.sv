// tb_feature_map_buffer: writes both halves, then reads one half while the
// other is written in the same cycle, and checks data and latency.
module tb_feature_map_buffer;
  import qcnn_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_half = 0, rd_en = 0, rd_half = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  feat_t wr_data = '0, rd_data;
  feat_t model [2][DEPTH];
  int checks = 0, failures = 0;

  feature_map_buffer #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_half = h[0]; wr_addr = 4'(a); wr_data = feat_t'($urandom);
        model[h][a] = wr_data;
      end
    for (int n = 0; n < 64; n++) begin
      int a, h, wa;
      feat_t want;
      @(negedge clk);
      a = $urandom_range(DEPTH-1); h = (n / 8) % 2;
      rd_en = 1; rd_half = h[0]; rd_addr = 4'(a);
      want = model[h][a];
      wa = $urandom_range(DEPTH-1);
      wr_en = 1; wr_half = !h[0]; wr_addr = 4'(wa); wr_data = feat_t'($urandom);
      model[!h[0]][wa] = wr_data;
      @(posedge clk); #1;
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != want) begin
        failures++;
        $display("half %0d addr %0d: got %0d want %0d", h, a, rd_data, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
