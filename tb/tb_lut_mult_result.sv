// tb_lut_mult_result: checks the four partial products of PVN*A.
// For every PVN and random coefficients, row i must be A*2^i when bit i of
// PVN is set and zero otherwise, and the rows must add up to PVN*A.
module tb_lut_mult_result;
  localparam int W = 8;
  logic [W-1:0]          a;
  logic [3:0]            pvn;
  logic [3:0][W+3:0]     ress;
  int checks = 0, failures = 0;

  lut_mult_result #(.W(W)) dut (.a(a), .pvn(pvn), .ress(ress));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint total;
      a   = (t == 0) ? '1 : W'($urandom);
      pvn = 4'(t);
      #1;
      total = 0;
      for (int i = 0; i < 4; i++) begin
        longint exp_row;
        exp_row = ((int'(pvn) >> i) & 1) ? longint'(a) * (longint'(1) << i) : 0;
        total += longint'(ress[i]);
        checks++;
        if (longint'(ress[i]) != exp_row) begin
          failures++;
          $display("FAIL a=%0d pvn=%0d row %0d = %0d expected %0d", a, pvn, i, ress[i], exp_row);
        end
      end
      checks++;
      if (total != longint'(a) * longint'(pvn)) begin
        failures++;
        $display("FAIL a=%0d pvn=%0d rows sum to %0d", a, pvn, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
