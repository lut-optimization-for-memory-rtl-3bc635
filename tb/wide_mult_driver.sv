// wide_mult_driver: test driver for one apc_oms_wide_multiplier of a given
// size. It loads NLOADS random coefficients (the first one all ones), streams
// NOPS random operands back to back after each load (the first two of each
// stream are 0 and all ones), and compares every product with A*X computed
// here, including the one-cycle latency. Results come out on checks and
// failures once done is high. The products must fit 64 bits (W + XW <= 64).
module wide_mult_driver #(
  parameter int unsigned W      = 16,
  parameter int unsigned XW     = 16,
  parameter int unsigned NLOADS = 4,
  parameter int unsigned NOPS   = 500
) (
  input  logic clk,     // rising edges at 10n+5
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  logic            coef_load;
  logic [W-1:0]    coef;
  logic            coef_ready;
  logic            x_valid;
  logic [XW-1:0]   x;
  logic            x_ready;
  logic            y_valid;
  logic [W+XW-1:0] y;

  apc_oms_wide_multiplier #(.W(W), .XW(XW)) dut (
    .clk(clk), .rst_n(rst_n),
    .coef_load(coef_load), .coef(coef), .coef_ready(coef_ready),
    .x_valid(x_valid), .x(x), .x_ready(x_ready),
    .y_valid(y_valid), .y(y)
  );

  longint unsigned exp_q [$];
  int              edge_q [$];
  longint unsigned cur_a;

  function automatic longint unsigned rand_bits(input int unsigned n);
    longint unsigned v;
    v = {$urandom, $urandom};
    if (n < 64) v &= (longint'(1) << n) - 1;
    return v;
  endfunction

  always @(negedge clk) begin
    #4;
    if (rst_n && x_valid && x_ready) begin
      exp_q.push_back(longint'(x) * cur_a);
      edge_q.push_back(int'(($time + 1) / 10));
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL W=%0d XW=%0d: product without operand", W, XW);
      end else begin
        longint unsigned e;
        int n;
        e = exp_q.pop_front();
        n = edge_q.pop_front();
        if (longint'(y) != e || int'(($time - 1) / 10) != n) begin
          failures++;
          $display("FAIL W=%0d XW=%0d: y=%0d expected %0d", W, XW, y, e);
        end
      end
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0;
    coef_load = 0; coef = '0; x_valid = 0; x = '0; cur_a = 0;
    wait (rst_n);
    for (int unsigned t = 0; t < NLOADS; t++) begin
      longint unsigned a;
      a = (t == 0) ? rand_bits(W) | ((longint'(1) << (W - 1)) * 2 - 1) : rand_bits(W);
      @(negedge clk);
      coef_load = 1; coef = W'(a);
      @(negedge clk);
      coef_load = 0;
      while (!coef_ready) @(negedge clk);
      cur_a = longint'(W'(a));
      for (int unsigned i = 0; i < NOPS; i++) begin
        x_valid = 1;
        if (i == 0)      x = '0;
        else if (i == 1) x = '1;
        else             x = XW'(rand_bits(XW));
        @(negedge clk);
      end
      x_valid = 0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL W=%0d XW=%0d: %0d products missing", W, XW, exp_q.size());
    end
    done = 1;
  end
endmodule
