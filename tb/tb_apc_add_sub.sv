// tb_apc_add_sub: checks the sign step. For random A and every 5-bit X the
// testbench forms the APC word |X - 16|*A itself and expects the product
// X*A: 16A + word when x4 = 1, 16A - word when x4 = 0. With clr the result
// must be zero.
module tb_apc_add_sub;
  localparam int W = 8;
  logic [W-1:0] a;
  logic [W+4:0] apc, prod;
  logic         x4, clr;
  int checks = 0, failures = 0;

  apc_add_sub #(.W(W)) dut (.a(a), .apc(apc), .x4(x4), .clr(clr), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      a = (t == 0) ? '1 : W'($urandom);
      for (int x = 0; x < 32; x++) begin
        int mag;
        mag = (x >= 16) ? x - 16 : 16 - x;
        apc = (W+5)'(mag * int'(a));
        x4  = (x >= 16);
        clr = 1'b0;
        #1;
        checks++;
        if (int'(prod) != x * int'(a)) begin
          failures++;
          $display("FAIL a=%0d x=%0d prod=%0d", a, x, prod);
        end
        clr = 1'b1;
        #1;
        checks++;
        if (prod != 0) begin
          failures++;
          $display("FAIL clr: prod=%0d", prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
