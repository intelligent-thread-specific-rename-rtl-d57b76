// tb_l2_miss_counter: drives random per-thread L2 miss reports over several
// windows and compares the latched per-window counts with counts kept by the
// testbench. The window is shortened to 100 cycles.
module tb_l2_miss_counter;
  localparam int unsigned N  = 4;
  localparam int unsigned MW = 11;
  localparam int unsigned WIN = 100;

  logic clk = 0, rst = 1;
  logic [N-1:0] l2_miss = '0;
  logic window_end = 0;
  logic [N-1:0][MW-1:0] running, count;
  logic count_valid;
  int checks = 0, failures = 0;

  l2_miss_counter #(.N(N), .MW(MW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model [N];
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(!count_valid, "count_valid low after reset");
    for (int w = 0; w < 6; w++) begin
      for (int t = 0; t < N; t++) model[t] = 0;
      for (int c = 0; c < int'(WIN); c++) begin
        // thread t misses with probability t/4 (thread 0 never, window 5 all heavy)
        for (int t = 0; t < N; t++) begin
          l2_miss[t] = (w == 5) ? 1'b1 : (($urandom % 4) < t);
          if (l2_miss[t]) model[t]++;
        end
        window_end = (c == int'(WIN) - 1);
        @(negedge clk);
      end
      l2_miss = '0; window_end = 0;
      check(count_valid, "count_valid after window");
      for (int t = 0; t < N; t++) begin
        check(int'(count[t]) == model[t],
              $sformatf("window %0d thread %0d: got %0d want %0d", w, t, count[t], model[t]));
        check(running[t] == '0, "running cleared");
      end
      // counts hold through the next window's first cycles
      l2_miss = '1;
      @(negedge clk);
      for (int t = 0; t < N; t++) check(int'(count[t]) == model[t], "count held");
      for (int t = 0; t < N; t++) check(running[t] == 1, "running counts");
      l2_miss = '0;
      // restart: clear the extra miss with a reset-free short window
      window_end = 1; @(negedge clk); window_end = 0;
      for (int t = 0; t < N; t++) check(count[t] == 1, "one-miss window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
