// tb_post_processor: feeds random inner products (some far outside the
// feature range) under random settings of ReLU, pool window length and
// bypass, and compares every output with a saturate / ReLU / max model kept
// by the testbench.
module tb_post_processor;
  import qcnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, bypass = 0, relu_en = 0, in_valid = 0, out_valid;
  logic [7:0] pool_n = 8'd1;
  acc_t in_data = '0;
  feat_t out_data;

  post_processor dut (.*);

  longint expq [$];
  int checks = 0, failures = 0, n_sat = 0, n_relu = 0, n_pool = 0, n_bypass = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      automatic longint e = expq.pop_front();
      if (longint'(out_data) != e) begin failures++; $display("got %0d want %0d", out_data, e); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cfgn = 0; cfgn < 12; cfgn++) begin
      int pn;
      @(negedge clk);
      clear = 1;
      bypass = (cfgn % 4 == 3);
      relu_en = (cfgn % 2 == 1);
      pn = 1 + (cfgn % 3) * 4;      // 1, 5 or 9 results per window
      pool_n = 8'(pn);
      @(negedge clk) clear = 0;
      for (int w = 0; w < 10; w++) begin
        automatic longint m = 0;
        automatic int len = bypass ? 1 : pn;
        for (int k = 0; k < len; k++) begin
          longint v, s;
          @(negedge clk);
          v = ($urandom_range(3) == 0) ? longint'($urandom_range(0, 200000)) - 100000
                                       : longint'($urandom_range(0, 60000)) - 30000;
          in_data = acc_t'(v);
          in_valid = 1;
          s = v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
          if (s != v) n_sat++;
          if (!bypass && relu_en && s < 0) begin s = 0; n_relu++; end
          if (k == 0 || s > m) m = s;
          if ($urandom_range(2) == 0) begin @(negedge clk); in_valid = 0; end
        end
        expq.push_back(m);
        if (bypass) n_bypass++; else if (pn > 1) n_pool++;
        @(negedge clk) in_valid = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    checks++;
    if (n_sat == 0 || n_relu == 0 || n_pool == 0 || n_bypass == 0) begin
      failures++; $display("a case was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
