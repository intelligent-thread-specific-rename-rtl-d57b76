// tb_miss_ranker: compares ranks and the low-miss half of random and tied
// miss counts with a reference ranking computed by sorting in the testbench.
module tb_miss_ranker;
  localparam int unsigned N  = 4;
  localparam int unsigned MW = 11;
  localparam int unsigned RW = 2;

  logic [N-1:0][MW-1:0] count;
  logic [N-1:0][RW-1:0] rank;
  logic [N-1:0]         low_half;
  int checks = 0, failures = 0;

  miss_ranker #(.N(N), .MW(MW)) dut (.*);

  initial begin
    int idx [N];
    for (int it = 0; it < 2000; it++) begin
      for (int t = 0; t < N; t++)
        count[t] = (it % 3 == 0) ? MW'($urandom % 4) : MW'($urandom % 2001);
      #1;
      // reference: stable selection sort of thread numbers by count
      for (int t = 0; t < N; t++) idx[t] = t;
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          if (count[idx[b]] < count[idx[a]] ||
              (count[idx[b]] == count[idx[a]] && idx[b] < idx[a])) begin
            int tmp; tmp = idx[a]; idx[a] = idx[b]; idx[b] = tmp;
          end
      for (int r = 0; r < N; r++) begin
        checks++;
        if (int'(rank[idx[r]]) != r || low_half[idx[r]] != (r < N / 2)) begin
          failures++;
          $display("FAIL: counts %p thread %0d rank %0d want %0d", count, idx[r], rank[idx[r]], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
