// tb_window_timer: checks that window_end pulses once every WINDOW cycles,
// on the last cycle of each window, and that a low enable pauses the count.
// Runs at the default 2000-cycle window.
module tb_window_timer;
  localparam int unsigned WINDOW = 2000;
  localparam int unsigned CW = $clog2(WINDOW);

  logic clk = 0, rst = 1, enable = 1;
  logic window_end;
  logic [CW-1:0] cycle;
  int checks = 0, failures = 0;

  window_timer #(.WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, pulses, last;
    repeat (3) @(posedge clk);
    rst <= 0;
    n = 0; pulses = 0; last = -1;
    // three windows at full enable: pulses at cycle WINDOW-1, 2*WINDOW-1, ...
    while (pulses < 3) begin
      @(negedge clk);
      if (window_end) begin
        check(n == int'((pulses + 1) * WINDOW - 1), $sformatf("pulse %0d at cycle %0d", pulses, n));
        if (last >= 0) check(n - last == int'(WINDOW), "window length");
        last = n;
        pulses++;
      end else begin
        check(int'(cycle) == n % int'(WINDOW), "cycle position");
      end
      n++;
    end
    // pause for 500 cycles: no pulse and no progress
    enable <= 0;
    @(negedge clk);
    begin
      logic [CW-1:0] held;
      held = cycle;
      repeat (500) begin
        @(negedge clk);
        check(!window_end && cycle == held, "paused");
      end
    end
    enable <= 1;
    n = 0;
    do begin @(negedge clk); n++; end while (!window_end);
    check(n == int'(WINDOW), $sformatf("window after pause took %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
