// tb_inner_product_unit: random lookup tables and filter codes; the term must
// be the indexed entry, negated when the sign bit is set.
module tb_inner_product_unit;
  import qcnn_pkg::*;
  prod_t lut [NQ];
  filt_code_t code;
  prod_t term;
  int checks = 0, failures = 0;

  inner_product_unit dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      longint e;
      for (int q = 0; q < NQ; q++) lut[q] = prod_t'($urandom);
      code = filt_code_t'($urandom);
      #1;
      e = longint'(lut[code.idx]);
      if (code.sign) e = -e;
      checks++;
      if (longint'(term) != e) begin
        failures++;
        $display("idx %0d sign %0d: got %0d want %0d", code.idx, code.sign, term, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
