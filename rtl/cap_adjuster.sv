// cap_adjuster: holds the per-thread rename register caps and adjusts them
// once per window.
//
// At reset every cap is CM/N. On each `adjust` pulse:
//   1. every thread in the high-miss half whose cap is above CL loses one;
//   2. then, in rank order (fewest misses first), every thread in the
//      low-miss half whose cap is below CH gains one, but only while the sum
//      of all caps stays at or below CM.
// Step 2 running after step 1 keeps the update complementary: a decrement
// that was blocked by CL also blocks one increment, so the sum of caps never
// grows past CM. The limits CL, CH, CM, the starting value and the half/half
// update are the algorithm's; the decrement-first order, granting increments
// in rank order and allowing the sum to equal CM are this design's reading.
// Interface: adjust (1-cycle pulse), rank[t]/low_half[t] from the ranker;
// cap[t] registered, cap_sum combinational from cap; inc_mask/dec_mask show
// which caps changed and blk_* which were held back, for one cycle after
// each adjust (diagnostic outputs).
module cap_adjuster #(
  parameter int unsigned N     = regcap_pkg::N_THREADS,
  parameter int unsigned CW    = regcap_pkg::CAP_W,
  parameter int unsigned CM    = regcap_pkg::cap_max_sum(
                                   regcap_pkg::rename_regs(regcap_pkg::RT_REGS, regcap_pkg::N_THREADS,
                                                           regcap_pkg::RA_REGS),
                                   regcap_pkg::N_THREADS),
  parameter int unsigned CL    = regcap_pkg::CAP_LOW,
  parameter int unsigned CH    = regcap_pkg::cap_high(CM, N, CL),
  parameter int unsigned CINIT = regcap_pkg::cap_start(CM, N),
  localparam int unsigned RW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW   = CW + $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 adjust,
  input  logic [N-1:0][RW-1:0] rank,
  input  logic [N-1:0]         low_half,
  output logic [N-1:0][CW-1:0] cap,
  output logic [SW-1:0]        cap_sum,
  output logic [N-1:0]         inc_mask,
  output logic [N-1:0]         dec_mask,
  output logic [N-1:0]         blk_low,    // wanted to drop but was at CL
  output logic [N-1:0]         blk_high,   // wanted to grow but was at CH
  output logic [N-1:0]         blk_sum     // wanted to grow but sum was at CM
);

  logic [N-1:0][CW-1:0] cap_n;
  logic [N-1:0]         inc_n, dec_n, bl_n, bh_n, bs_n;
  logic [SW-1:0]        sum;

  always_comb begin
    cap_n = cap;
    inc_n = '0; dec_n = '0; bl_n = '0; bh_n = '0; bs_n = '0;
    // step 1: decrements of the high-miss half
    for (int t = 0; t < N; t++) begin
      if (!low_half[t]) begin
        if (cap[t] > CW'(CL)) begin
          cap_n[t] = cap[t] - 1'b1;
          dec_n[t] = 1'b1;
        end else begin
          bl_n[t]  = 1'b1;
        end
      end
    end
    sum = '0;
    for (int t = 0; t < N; t++) sum = sum + SW'(cap_n[t]);
    // step 2: increments of the low-miss half, fewest misses first
    for (int r = 0; r < N; r++) begin
      for (int t = 0; t < N; t++) begin
        if (low_half[t] && int'(rank[t]) == r) begin
          if (cap[t] >= CW'(CH)) begin
            bh_n[t] = 1'b1;
          end else if (sum >= SW'(CM)) begin
            bs_n[t] = 1'b1;
          end else begin
            cap_n[t] = cap[t] + 1'b1;
            inc_n[t] = 1'b1;
            sum      = sum + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cap      <= {N{CW'(CINIT)}};
      inc_mask <= '0; dec_mask <= '0;
      blk_low  <= '0; blk_high <= '0; blk_sum <= '0;
    end else if (adjust) begin
      cap      <= cap_n;
      inc_mask <= inc_n; dec_mask <= dec_n;
      blk_low  <= bl_n;  blk_high <= bh_n;  blk_sum <= bs_n;
    end else begin
      inc_mask <= '0; dec_mask <= '0;
      blk_low  <= '0; blk_high <= '0; blk_sum <= '0;
    end
  end

  always_comb begin
    cap_sum = '0;
    for (int t = 0; t < N; t++) cap_sum = cap_sum + SW'(cap[t]);
  end

  // The sum of caps must never exceed C_m.
  a_sum_le_cm: assert property (@(posedge clk) disable iff (rst) cap_sum <= SW'(CM));

endmodule
