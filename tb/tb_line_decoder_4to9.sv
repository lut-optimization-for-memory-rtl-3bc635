// tb_line_decoder_4to9: exhaustive check of the 4-to-9 word-select decoder.
// Addresses 0..8 must raise exactly line 'address'; 9..15 must raise none.
module tb_line_decoder_4to9;
  logic [3:0] din;
  logic [8:0] w;
  int checks = 0, failures = 0;

  line_decoder_4to9 dut (.din(din), .w(w));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [8:0] exp_w;
      din = 4'(v);
      #1;
      exp_w = (v < 9) ? 9'(1) << v : 9'd0;
      checks++;
      if (w != exp_w) begin
        failures++;
        $display("FAIL din=%0d w=%09b expected %09b", din, w, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
