// miss_ranker: ranks the threads by their L2 miss count of the last window.
//
// Purely combinational. Thread i's rank is the number of threads with fewer
// misses, plus the number of lower-numbered threads with the same count, so
// every thread gets a distinct rank 0..N-1 and rank 0 has the fewest misses.
// Threads ranked below N/2 form the "low-miss half" whose caps grow; the rest
// form the "high-miss half" whose caps shrink. Ranking and the half split are
// the algorithm's; breaking ties by thread number is this design's choice.
// Interface: count[t] in, rank[t] and low_half[t] out, no clock.
module miss_ranker #(
  parameter int unsigned N  = regcap_pkg::N_THREADS,
  parameter int unsigned MW = $clog2(regcap_pkg::WINDOW_CYCLES + 1),
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][MW-1:0] count,
  output logic [N-1:0][RW-1:0] rank,
  output logic [N-1:0]         low_half
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++) begin
        if (j != i && (count[j] < count[i] || (count[j] == count[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
      end
      low_half[i] = (int'(rank[i]) < int'(N / 2));
    end
  end

endmodule
