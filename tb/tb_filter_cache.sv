// tb_filter_cache: fills both halves, then reads one half while rewriting the
// other (double buffering) and checks data and the one-cycle read latency.
module tb_filter_cache;
  import qcnn_pkg::*;
  localparam int TILE = 3, DEPTH = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_half = 0, rd_en = 0, rd_half = 0;
  logic [2:0] wr_addr = '0, rd_addr = '0;
  filt_code_t wr_data [TILE], rd_data [TILE];
  filt_code_t model [2][DEPTH][TILE];
  int checks = 0, failures = 0;

  filter_cache #(.TILE(TILE), .DEPTH(DEPTH)) dut (.*);

  task automatic wr(input bit h, input int a);
    wr_en = 1; wr_half = h; wr_addr = 3'(a);
    for (int t = 0; t < TILE; t++) begin
      wr_data[t] = filt_code_t'($urandom);
      model[h][a][t] = wr_data[t];
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); wr(h[0], a);
      end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 40; n++) begin
      int a, h;
      filt_code_t want [TILE];
      @(negedge clk);
      a = $urandom_range(DEPTH-1); h = n % 2;
      rd_en = 1; rd_half = h[0]; rd_addr = 3'(a);
      want = model[h][a];
      wr(!h[0], $urandom_range(DEPTH-1));   // refill the other half meanwhile
      @(posedge clk); #1;
      rd_en = 0; wr_en = 0;
      for (int t = 0; t < TILE; t++) begin
        checks++;
        if (rd_data[t] != want[t]) begin
          failures++;
          $display("half %0d addr %0d word %0d: got %h want %h", h, a, t, rd_data[t], want[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
