// l2_miss_counter: per-thread count of L2 cache misses in the current window.
//
// Each thread has a saturating counter that adds one for every cycle in which
// the L2 cache reports a miss for that thread. On window_end the counts,
// including a miss arriving in that same cycle, are copied to the `count`
// outputs (held stable for the whole next window, where the ranker reads them)
// and the running counters restart from zero. Counting misses per thread per
// window is the algorithm's; one miss report per thread per cycle and the
// saturating width are this design's choices.
// Interface: l2_miss[t] is a 1-cycle miss report of thread t; window_end
// closes the window; count[t] is thread t's miss total of the last closed
// window, valid from the cycle after window_end; count_valid rises then.
module l2_miss_counter #(
  parameter int unsigned N  = regcap_pkg::N_THREADS,
  parameter int unsigned MW = $clog2(regcap_pkg::WINDOW_CYCLES + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         l2_miss,
  input  logic                 window_end,
  output logic [N-1:0][MW-1:0] running,
  output logic [N-1:0][MW-1:0] count,
  output logic                 count_valid
);

  localparam logic [MW-1:0] MAXV = '1;

  logic [N-1:0][MW-1:0] next_run;

  always_comb begin
    for (int t = 0; t < N; t++)
      next_run[t] = (l2_miss[t] && running[t] != MAXV) ? running[t] + 1'b1 : running[t];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running     <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else if (window_end) begin
      count       <= next_run;
      running     <= '0;
      count_valid <= 1'b1;
    end else begin
      running     <= next_run;
    end
  end

endmodule
