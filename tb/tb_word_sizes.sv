// tb_word_sizes: the multiplier at the three word sizes the design is
// evaluated at, coefficient and operand of equal width: 8 x 8 (two 5-bit
// pieces), 16 x 16 (four pieces) and 32 x 32 (seven pieces). Each size runs
// random coefficients and operands through its own instance and checks every
// product and its one-cycle latency.
module tb_word_sizes;
  logic clk = 1'b0;
  logic rst_n;
  logic done8, done16, done32;
  int   c8, c16, c32, f8, f16, f32;
  int   checks, failures;

  always #5 clk = ~clk;

  wide_mult_driver #(.W(8),  .XW(8),  .NLOADS(4), .NOPS(300)) u8
    (.clk(clk), .rst_n(rst_n), .done(done8),  .checks(c8),  .failures(f8));
  wide_mult_driver #(.W(16), .XW(16), .NLOADS(4), .NOPS(500)) u16
    (.clk(clk), .rst_n(rst_n), .done(done16), .checks(c16), .failures(f16));
  wide_mult_driver #(.W(32), .XW(32), .NLOADS(4), .NOPS(500)) u32
    (.clk(clk), .rst_n(rst_n), .done(done32), .checks(c32), .failures(f32));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done8 && done16 && done32);
    checks   = c8 + c16 + c32;
    failures = f8 + f16 + f32;
    $display("8x8: %0d checks, 16x16: %0d checks, 32x32: %0d checks", c8, c16, c32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
