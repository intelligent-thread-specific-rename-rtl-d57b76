// tb_cap_adjuster: checks the per-window cap update.
//  1. The worked example of the algorithm: 4 threads, C_m = 40, so caps
//     start at 10, C_h = 16, C_l = 4. With threads 0 and 1 always in the
//     low-miss half, the caps reach 16/16/4/4 after six windows and stay.
//  2. Random rankings against a reference model that applies the same rules
//     (high half -1 down to C_l, then low half +1 in rank order up to C_h
//     while the sum stays <= C_m); each limit must be hit at least once.
module tb_cap_adjuster;
  localparam int unsigned N  = 4;
  localparam int unsigned CW = 8;
  localparam int unsigned CM = 40;
  localparam int unsigned CL = 4;
  localparam int unsigned CH = 16;
  localparam int unsigned RW = 2;
  localparam int unsigned SW = CW + 3;

  logic clk = 0, rst = 1, adjust = 0;
  logic [N-1:0][RW-1:0] rank;
  logic [N-1:0]         low_half;
  logic [N-1:0][CW-1:0] cap;
  logic [SW-1:0]        cap_sum;
  logic [N-1:0]         inc_mask, dec_mask, blk_low, blk_high, blk_sum;
  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0, n_sum = 0;

  cap_adjuster #(.N(N), .CW(CW), .CM(CM), .CL(CL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // give ranks from a permutation: order[r] is the thread with rank r
  task automatic set_order(input int order [N]);
    for (int r = 0; r < N; r++) begin
      rank[order[r]]     = RW'(r);
      low_half[order[r]] = (r < N / 2);
    end
  endtask

  task automatic pulse;
    adjust = 1; @(negedge clk); adjust = 0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [N];
    int model [N];
    int sum, want_low, want_high, want_sum;
    rank = '0; low_half = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < N; t++) check(cap[t] == 10, "start value C_m/N");
    check(cap_sum == 40, "start sum");

    // 1. worked example
    order = '{1, 0, 3, 2};
    set_order(order);
    for (int w = 1; w <= 8; w++) begin
      pulse();
      for (int t = 0; t < 2; t++) check(int'(cap[t]) == ((10 + w > 16) ? 16 : 10 + w), "low thread grows");
      for (int t = 2; t < 4; t++) check(int'(cap[t]) == ((10 - w < 4) ? 4 : 10 - w), "high thread shrinks");
    end
    check(cap[0] == 16 && cap[1] == 16 && cap[2] == 4 && cap[3] == 4, "settles at 16/16/4/4");
    check(blk_high == 4'b0011 && blk_low == 4'b1100, "limits reported");
    check(cap_sum == 40, "sum kept at C_m");
    // caps hold without an adjust pulse
    repeat (10) @(negedge clk);
    check(cap[0] == 16 && cap[3] == 4, "hold between windows");

    // 2. random rankings against the reference model
    for (int t = 0; t < N; t++) model[t] = int'(cap[t]);
    for (int w = 0; w < 3000; w++) begin
      // random permutation
      for (int t = 0; t < N; t++) order[t] = t;
      for (int t = N - 1; t > 0; t--) begin
        int j, tmp; j = $urandom % (t + 1); tmp = order[t]; order[t] = order[j]; order[j] = tmp;
      end
      // bias: keep the same split for a while so caps reach their limits
      if ((w / 20) % 2 == 0) begin
        if (order[0] > 1 && order[1] > 1) begin int tmp; tmp = order[0]; order[0] = order[2]; order[2] = tmp; end
      end
      set_order(order);
      want_low = 0; want_high = 0; want_sum = 0;
      for (int r = N / 2; r < N; r++)
        if (model[order[r]] > int'(CL)) model[order[r]]--; else want_low++;
      sum = 0;
      for (int t = 0; t < N; t++) sum += model[t];
      for (int r = 0; r < N / 2; r++) begin
        if (model[order[r]] >= int'(CH)) want_high++;
        else if (sum >= int'(CM)) want_sum++;
        else begin model[order[r]]++; sum++; end
      end
      pulse();
      for (int t = 0; t < N; t++)
        check(int'(cap[t]) == model[t], $sformatf("window %0d thread %0d cap %0d want %0d", w, t, cap[t], model[t]));
      check(int'(cap_sum) == sum && sum <= int'(CM), "sum");
      check($countones(blk_low) == want_low && $countones(blk_high) == want_high &&
            $countones(blk_sum) == want_sum, "blocked counts");
      n_low += want_low; n_high += want_high; n_sum += want_sum;
    end
    check(n_low > 0, "lower limit reached");
    check(n_high > 0, "upper limit reached");
    check(n_sum > 0, "sum limit reached");
    $display("lower-limit holds %0d, upper-limit holds %0d, sum-limit holds %0d", n_low, n_high, n_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
