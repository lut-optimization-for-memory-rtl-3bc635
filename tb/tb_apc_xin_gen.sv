// tb_apc_xin_gen: exhaustive check of the antisymmetric input mapping.
// For all 32 inputs the mapped 4-bit address must satisfy the folding rule:
// x4 = 1 keeps X, x4 = 0 gives the address a with a + X = 16 (modulo 16),
// so that X and 32-X share one address. x4 itself must pass through.
module tb_apc_xin_gen;
  logic [4:0] xin, xcomp;
  int checks = 0, failures = 0;

  apc_xin_gen dut (.xin(xin), .xcomp(xcomp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int exp_addr;
      xin = 5'(v);
      #1;
      if (v >= 16) exp_addr = v - 16;
      else         exp_addr = (16 - v) % 16;
      checks++;
      if (xcomp[4] != xin[4] || int'(xcomp[3:0]) != exp_addr) begin
        failures++;
        $display("FAIL X=%05b got %05b expected addr %0d", xin, xcomp, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
