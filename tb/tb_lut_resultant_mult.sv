// tb_lut_resultant_mult: checks that the four partial-product rows of PVN*A
// are added correctly, for all PVN and random A, including the largest 15*A.
module tb_lut_resultant_mult;
  localparam int W = 8;
  logic [3:0][W+3:0] ress;
  logic [W+3:0]      prod;
  int checks = 0, failures = 0;

  lut_resultant_mult #(.W(W)) dut (.ress(ress), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int a, pvn;
      a   = (t < 16) ? 255 : int'($urandom % 256);
      pvn = t % 16;
      for (int i = 0; i < 4; i++)
        ress[i] = ((pvn >> i) & 1) ? (W+4)'(a << i) : '0;
      #1;
      checks++;
      if (int'(prod) != a * pvn) begin
        failures++;
        $display("FAIL a=%0d pvn=%0d prod=%0d", a, pvn, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
