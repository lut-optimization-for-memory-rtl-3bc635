// tb_apc_oms_multiplier: end-to-end test of the APC-OMS multiplier at its
// default parameters (W = 8).
//
// The testbench loads coefficients, then streams operands and compares every
// product with A*X computed here. It checks:
//   * operands are refused before the first coefficient and during loading;
//   * loading takes exactly nine cycles (one per table word);
//   * each product appears exactly one cycle after its operand is accepted;
//   * all 32 operands, for the extreme coefficients 0, 1 and 2^W-1 and for
//     random ones, including back-to-back streams and idle gaps;
//   * an operand presented together with coef_load uses the old coefficient.
// It also counts how often each mechanism of the design was exercised (the
// zero-word reset of X = 10000, the 2A word for X = 00000, each shift count,
// addition and subtraction around 16A, loading, refused operands) and counts
// a failure for any that never happened.
module tb_apc_oms_multiplier;
  localparam int W  = 8;
  localparam int YW = W + 5;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          coef_load;
  logic [W-1:0]  coef;
  logic          coef_ready;
  logic          x_valid;
  logic [4:0]    x;
  logic          x_ready;
  logic          y_valid;
  logic [YW-1:0] y;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_reset_word = 0, n_word_2a = 0, n_add = 0, n_sub = 0, n_loads = 0;
  int n_refused = 0, n_overlap = 0;
  int n_shift [4] = '{0, 0, 0, 0};

  apc_oms_multiplier dut (
    .clk(clk), .rst_n(rst_n),
    .coef_load(coef_load), .coef(coef), .coef_ready(coef_ready),
    .x_valid(x_valid), .x(x), .x_ready(x_ready),
    .y_valid(y_valid), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scoreboard: expected products, tagged with their acceptance cycle --
  int exp_q [$];
  int acc_cycle_q [$];
  int cur_a = 0;   // coefficient the LUT currently holds

  // Sampled one time unit before each rising edge, when the inputs the edge
  // will capture are stable.
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
      if (x_valid && x_ready) begin
        exp_q.push_back(int'(x) * cur_a);
        acc_cycle_q.push_back(int'(($time + 1) / 10));
        // classify the operand by the mechanism it exercises
        if (x == 5'b10000) n_reset_word++;
        else if (x == 5'b00000) n_word_2a++;
        if (x[4]) n_add++; else n_sub++;
        begin
          int xp, cnt;
          xp = x[4] ? int'(x[3:0]) : (16 - int'(x[3:0])) % 16;
          cnt = 0;
          if (xp == 0) cnt = 3;
          else while (xp % 2 == 0) begin xp /= 2; cnt++; end
          n_shift[cnt]++;
        end
        if (coef_load) n_overlap++;
      end else if (x_valid && !x_ready) begin
        n_refused++;
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL at %0t: product without operand", $time);
      end else begin
        int e, c;
        e = exp_q.pop_front();
        c = acc_cycle_q.pop_front();
        // Sampled 1 time unit after an edge. The edge that captured the
        // operand must be this one: the product is valid in the next cycle.
        if (int'(y) != e || int'(($time - 1) / 10) != c) begin
          failures++;
          $display("FAIL edge %0d: y=%0d expected %0d (accepted at edge %0d)", ($time - 1) / 10, y, e, c);
        end
      end
    end
  end

  task automatic load_coef(input logic [W-1:0] a, input bit probe_refusal);
    longint t0;
    int dur;
    @(negedge clk);
    coef_load = 1; coef = a;
    t0 = $time + 5;   // the edge that samples coef_load
    @(negedge clk);
    coef_load = 0; coef = '0;
    // offer an operand while loading: it must be refused
    x_valid = probe_refusal; x = 5'($urandom);
    while (!coef_ready) @(negedge clk);
    x_valid = 0;
    dur = int'(($time - 5 - t0) / 10);   // edges that wrote a word
    checks++;
    if (dur != 9) begin
      failures++;
      $display("FAIL load took %0d cycles, expected 9", dur);
    end
    cur_a = int'(a);
    n_loads++;
  endtask

  task automatic stream(input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      x_valid = gaps ? 1'($urandom) : 1'b1;
      x = 5'(i);
      if (i >= 32) x = 5'($urandom);
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    rst_n = 0; coef_load = 0; coef = '0; x_valid = 0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // operand before any coefficient: refused
    @(negedge clk);
    x_valid = 1; x = 5'd7;
    @(negedge clk);
    checks++;
    if (x_ready || coef_ready || y_valid) begin
      failures++;
      $display("FAIL operand accepted before the first coefficient");
    end
    x_valid = 0;

    load_coef('1, 1'b1);
    stream(32, 1'b0);
    load_coef(W'(0), 1'b1);
    stream(32, 1'b0);
    load_coef(W'(1), 1'b0);
    stream(32, 1'b0);
    for (int t = 0; t < 20; t++) begin
      load_coef(W'($urandom), t % 2 == 0);
      stream(32 + 40, t % 3 == 0);
    end

    // operand in the same cycle as coef_load still uses the old coefficient
    @(negedge clk);
    x_valid = 1; x = 5'd31; coef_load = 1; coef = W'(8'h5a);
    @(negedge clk);
    x_valid = 0; coef_load = 0;
    while (!coef_ready) @(negedge clk);
    cur_a = 8'h5a;
    stream(32, 1'b0);

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
    if (n_reset_word == 0) begin failures++; $display("FAIL X=10000 never seen"); end
    if (n_word_2a == 0)    begin failures++; $display("FAIL X=00000 never seen"); end
    if (n_add == 0)        begin failures++; $display("FAIL no addition"); end
    if (n_sub == 0)        begin failures++; $display("FAIL no subtraction"); end
    if (n_overlap == 0)    begin failures++; $display("FAIL no operand with coef_load"); end
    for (int i = 0; i < 4; i++)
      if (n_shift[i] == 0) begin failures++; $display("FAIL shift %0d never used", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
