// tb_lut_line_selector: checks the product value number of each word select.
// Lines w0..w7 must give 1, 3, ..., 15 and w8 must give 2; no line gives 0.
module tb_lut_line_selector;
  logic [8:0] w;
  logic [3:0] pvn;
  int checks = 0, failures = 0;
  int expected [9] = '{1, 3, 5, 7, 9, 11, 13, 15, 2};

  lut_line_selector dut (.w(w), .pvn(pvn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) begin
      w = 9'(1) << i;
      #1;
      checks++;
      if (int'(pvn) != expected[i]) begin
        failures++;
        $display("FAIL w%0d pvn=%0d expected %0d", i, pvn, expected[i]);
      end
    end
    w = '0;
    #1;
    checks++;
    if (pvn != 0) begin
      failures++;
      $display("FAIL no line selected, pvn=%0d", pvn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
