// tb_apc_oms_lut: loads the nine-word table for several coefficients, one
// word per clock, then reads every word back: word i must hold (2i+1)*A for
// i < 8 and word 8 must hold 2A. With reset high the read must be zero.
module tb_apc_oms_lut;
  localparam int W = 8;
  logic          clk = 0;
  logic [W-1:0]  a;
  logic          wr_en, reset;
  logic [8:0]    w;
  logic [W+3:0]  word;
  int checks = 0, failures = 0;

  apc_oms_lut #(.W(W)) dut (.clk(clk), .a(a), .wr_en(wr_en), .w(w), .reset(reset), .word(word));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; reset = 0; w = '0; a = '0;
    for (int t = 0; t < 12; t++) begin
      logic [W-1:0] coef;
      coef = (t == 0) ? '1 : W'($urandom);
      // write
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        a = coef; wr_en = 1; w = 9'(1) << i;
      end
      @(negedge clk);
      wr_en = 0; a = ~coef;   // the stored words must not follow 'a'
      // read back
      for (int i = 0; i < 9; i++) begin
        int mult;
        mult = (i < 8) ? 2 * i + 1 : 2;
        w = 9'(1) << i;
        reset = 0;
        #1;
        checks++;
        if (int'(word) != mult * int'(coef)) begin
          failures++;
          $display("FAIL A=%0d word %0d = %0d expected %0d", coef, i, word, mult * int'(coef));
        end
        reset = 1;
        #1;
        checks++;
        if (word != 0) begin
          failures++;
          $display("FAIL reset did not zero word %0d", i);
        end
        reset = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
