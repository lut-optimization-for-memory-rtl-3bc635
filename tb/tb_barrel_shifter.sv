// tb_barrel_shifter: checks the left shift by 0..3 for random and extreme
// words, including the widest case 2^(W+4)-1 shifted by three.
module tb_barrel_shifter;
  localparam int W = 8;
  logic [W+3:0] inp;
  logic [1:0]   s;
  logic [W+4:0] outp;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(W)) dut (.inp(inp), .s(s), .outp(outp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      longint expv;
      inp = (t < 4) ? '1 : (W+4)'($urandom);
      s   = 2'(t);
      #1;
      expv = (longint'(inp) << s) & ((longint'(1) << (W+5)) - 1);
      checks++;
      if (longint'(outp) != expv) begin
        failures++;
        $display("FAIL inp=%0d s=%0d outp=%0d expected %0d", inp, s, outp, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
