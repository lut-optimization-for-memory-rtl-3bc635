// tb_apc_addr_gen: exhaustive check of address, shift and reset generation.
// For every {x4, X'} the reference finds the odd part of X' by dividing by
// two until odd, counting the divisions: the LUT word must hold that odd
// multiple (address (odd-1)/2) and s must equal the count. X' = 0 must give
// address 8 with s = 3 (2A << 3 = 16A), and reset only for x4 = 1, X' = 0.
module tb_apc_addr_gen;
  logic [4:0] xcomp;
  logic [3:0] d;
  logic [1:0] s;
  logic       reset;
  int checks = 0, failures = 0;

  apc_addr_gen dut (.xcomp(xcomp), .d(d), .s(s), .reset(reset));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int xp, odd, cnt, exp_d, exp_s;
      bit exp_r;
      xcomp = 5'(v);
      #1;
      xp = v % 16;
      if (xp == 0) begin
        exp_d = 8; exp_s = 3;
      end else begin
        odd = xp; cnt = 0;
        while (odd % 2 == 0) begin odd = odd / 2; cnt++; end
        exp_d = (odd - 1) / 2; exp_s = cnt;
      end
      exp_r = (v == 16);
      checks++;
      if (int'(d) != exp_d || int'(s) != exp_s || reset != exp_r) begin
        failures++;
        $display("FAIL xcomp=%05b d=%0d s=%0d r=%0b exp d=%0d s=%0d r=%0b",
                 xcomp, d, s, reset, exp_d, exp_s, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
