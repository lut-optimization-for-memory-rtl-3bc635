// tb_apc_oms_wide_multiplier: end-to-end test of the multiplier at its
// default parameters (W = 8-bit coefficient, XW = 8-bit operand, two 5-bit
// pieces).
//
// The testbench loads coefficients, streams operands and compares every
// product with A*X computed here. It checks:
//   * operands are refused before the first coefficient and during loading;
//   * loading takes exactly nine cycles;
//   * each product is valid in the cycle after its operand is accepted;
//   * all 256 operands for the coefficients 0, 1, 2^W-1 and random ones,
//     back to back and with idle gaps;
//   * an operand presented together with coef_load uses the old coefficient.
// It counts how often each mechanism of the design was used, piece by piece
// (zero-word reset for a piece 10000, the 2A word for a piece 00000, each
// shift count, addition and subtraction around 16A), plus loads, refused
// operands and overlapping loads, and counts a failure for any that never
// happened.
module tb_apc_oms_wide_multiplier;
  localparam int W  = 8;
  localparam int XW = 8;
  localparam int K  = (XW + 4) / 5;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            coef_load;
  logic [W-1:0]    coef;
  logic            coef_ready;
  logic            x_valid;
  logic [XW-1:0]   x;
  logic            x_ready;
  logic            y_valid;
  logic [W+XW-1:0] y;

  int checks = 0, failures = 0;
  int n_reset_word = 0, n_word_2a = 0, n_add = 0, n_sub = 0, n_loads = 0;
  int n_refused = 0, n_overlap = 0;
  int n_shift [4] = '{0, 0, 0, 0};

  apc_oms_wide_multiplier dut (
    .clk(clk), .rst_n(rst_n),
    .coef_load(coef_load), .coef(coef), .coef_ready(coef_ready),
    .x_valid(x_valid), .x(x), .x_ready(x_ready),
    .y_valid(y_valid), .y(y)
  );

  always #5 clk = ~clk;   // rising edges at 10n+5

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Which table mechanisms a 5-bit piece exercises.
  function automatic void classify(input int p);
    int xp, cnt;
    if (p == 16) n_reset_word++;
    if (p == 0)  n_word_2a++;
    if (p >= 16) n_add++; else n_sub++;
    xp  = (p >= 16) ? p - 16 : (16 - p) % 16;
    cnt = 0;
    if (xp == 0) cnt = 3;
    else while (xp % 2 == 0) begin xp /= 2; cnt++; end
    n_shift[cnt]++;
  endfunction

  longint exp_q [$];
  int     edge_q [$];
  longint cur_a = 0;

  // Sampled one time unit before each rising edge (edge index n at 10n+5).
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      if (x_valid && x_ready) begin
        exp_q.push_back(longint'(x) * cur_a);
        edge_q.push_back(int'(($time + 1) / 10));
        for (int k = 0; k < K; k++) classify(int'((longint'(x) >> (5 * k)) & 31));
        if (coef_load) n_overlap++;
      end else if (x_valid && !x_ready) begin
        n_refused++;
      end
    end
  end

  // Sampled one time unit after each rising edge: the product of an operand
  // captured at this edge must be on y now.
  always @(posedge clk) begin
    #1;
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL at %0t: product without operand", $time);
      end else begin
        longint e;
        int     n;
        e = exp_q.pop_front();
        n = edge_q.pop_front();
        if (longint'(y) != e || int'(($time - 1) / 10) != n) begin
          failures++;
          $display("FAIL edge %0d: y=%0d expected %0d (accepted at edge %0d)",
                   ($time - 1) / 10, y, e, n);
        end
      end
    end
  end

  task automatic load_coef(input logic [W-1:0] a, input bit probe_refusal);
    longint t0;
    int dur;
    @(negedge clk);
    coef_load = 1; coef = a;
    t0 = $time + 5;
    @(negedge clk);
    coef_load = 0; coef = '0;
    x_valid = probe_refusal; x = XW'($urandom);
    while (!coef_ready) @(negedge clk);
    x_valid = 0;
    dur = int'(($time - 5 - t0) / 10);
    checks++;
    if (dur != 9) begin
      failures++;
      $display("FAIL load took %0d cycles, expected 9", dur);
    end
    cur_a = longint'(a);
    n_loads++;
  endtask

  task automatic stream_all(input bit gaps);
    for (int i = 0; i < (1 << XW); i++) begin
      @(negedge clk);
      x = XW'(i);
      x_valid = 1'b1;
      if (gaps && $urandom % 3 == 0) begin
        x_valid = 1'b0;
        @(negedge clk);
        x_valid = 1'b1;
      end
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    rst_n = 0; coef_load = 0; coef = '0; x_valid = 0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    x_valid = 1; x = XW'(77);
    @(negedge clk);
    checks++;
    if (x_ready || coef_ready || y_valid) begin
      failures++;
      $display("FAIL operand accepted before the first coefficient");
    end
    x_valid = 0;

    load_coef('1, 1'b1);
    stream_all(1'b0);
    load_coef(W'(0), 1'b0);
    stream_all(1'b1);
    load_coef(W'(1), 1'b1);
    stream_all(1'b0);
    for (int t = 0; t < 6; t++) begin
      load_coef(W'($urandom), t % 2 == 0);
      stream_all(t % 3 == 0);
    end

    // operand together with coef_load: uses the previous coefficient
    @(negedge clk);
    x_valid = 1; x = '1; coef_load = 1; coef = W'(8'ha5);
    @(negedge clk);
    x_valid = 0; coef_load = 0;
    while (!coef_ready) @(negedge clk);
    cur_a = longint'(W'(8'ha5));
    stream_all(1'b0);

    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", exp_q.size());
    end

    $display("mechanisms: loads=%0d refused=%0d reset_word=%0d word_2a=%0d add=%0d sub=%0d shifts=%0d/%0d/%0d/%0d overlap=%0d",
             n_loads, n_refused, n_reset_word, n_word_2a, n_add, n_sub,
             n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_overlap);
    if (n_loads == 0)      begin failures++; $display("FAIL no coefficient load"); end
    if (n_refused == 0)    begin failures++; $display("FAIL no refused operand"); end
    if (n_reset_word == 0) begin failures++; $display("FAIL piece 10000 never seen"); end
    if (n_word_2a == 0)    begin failures++; $display("FAIL piece 00000 never seen"); end
    if (n_add == 0)        begin failures++; $display("FAIL no addition"); end
    if (n_sub == 0)        begin failures++; $display("FAIL no subtraction"); end
    if (n_overlap == 0)    begin failures++; $display("FAIL no operand with coef_load"); end
    for (int i = 0; i < 4; i++)
      if (n_shift[i] == 0) begin failures++; $display("FAIL shift %0d never used", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
