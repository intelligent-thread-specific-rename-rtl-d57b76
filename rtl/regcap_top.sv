// regcap_top: rename stage of an SMT core with L2-miss-driven, thread-specific
// rename register caps.
//
// Two halves work side by side:
//   * the cap controller - window_timer, l2_miss_counter, miss_ranker and
//     cap_adjuster - counts each thread's L2 misses over a 2000-cycle window,
//     ranks the threads at the end of the window and, one cycle later, raises
//     the caps of the low-miss half and lowers those of the high-miss half
//     within the limits CL, CH and the cap-sum limit CM;
//   * the rename datapath - rename_unit and free_list - renames up to W
//     instructions per cycle from one thread chosen round-robin, and refuses
//     a destination to any thread already holding as many shared rename
//     registers as its cap.
// The fetch/decode front end, the ROB that produces commit slots and the L2
// cache that reports misses are outside this block; their signals are ports.
// Timing: the rename result of a cycle is combinational on ren_*; caps change
// in the second cycle after the window's last cycle.
module regcap_top #(
  parameter int unsigned N      = regcap_pkg::N_THREADS,
  parameter int unsigned RT     = regcap_pkg::RT_REGS,
  parameter int unsigned RA     = regcap_pkg::RA_REGS,
  parameter int unsigned W      = regcap_pkg::WIDTH,
  parameter int unsigned WINDOW = regcap_pkg::WINDOW_CYCLES,
  parameter int unsigned CL     = regcap_pkg::CAP_LOW,
  localparam int unsigned CW    = regcap_pkg::CAP_W,
  localparam int unsigned PW    = regcap_pkg::PREG_W,
  localparam int unsigned TW    = regcap_pkg::TID_W,
  localparam int unsigned RR    = RT - N * RA,
  localparam int unsigned CM    = regcap_pkg::cap_max_sum(RR, N),
  localparam int unsigned NW    = $clog2(RR + 1),
  localparam int unsigned KW    = $clog2(W + 1),
  localparam int unsigned MW    = $clog2(WINDOW + 1),
  localparam int unsigned RW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW    = CW + $clog2(N + 1)
) (
  input  logic                                clk,
  input  logic                                rst,
  // from the L2 cache: one miss report per thread per cycle
  input  logic [N-1:0]                        l2_miss,
  // from decode
  input  logic [N-1:0][KW-1:0]                inst_count,
  input  regcap_pkg::dec_inst_t [N-1:0][W-1:0] inst,
  // from the ROB
  input  regcap_pkg::commit_t [W-1:0]         commit,
  // to dispatch
  output logic                                ren_valid,
  output logic [TW-1:0]                       ren_tid,
  output logic [KW-1:0]                       ren_count,
  output regcap_pkg::ren_inst_t [W-1:0]       ren,
  // status
  output logic [N-1:0][CW-1:0]                cap,
  output logic [SW-1:0]                       cap_sum,
  output logic [N-1:0][CW-1:0]                occ,
  output logic [NW-1:0]                       free_count,
  output logic [N-1:0][MW-1:0]                window_misses,
  output logic                                window_end,
  output logic                                cap_update,
  output logic [N-1:0]                        cap_inc,
  output logic [N-1:0]                        cap_dec,
  output logic [N-1:0]                        cap_at_low,
  output logic [N-1:0]                        cap_at_high,
  output logic [N-1:0]                        cap_sum_full,
  output logic [N-1:0]                        cap_block,
  output logic                                fl_block
);

  logic [N-1:0][MW-1:0] running;
  logic                 count_valid;
  logic [N-1:0][RW-1:0] rank;
  logic [N-1:0]         low_half;
  logic [$clog2(WINDOW)-1:0] win_cycle;

  logic [KW-1:0]        fl_pop;
  logic [W-1:0]         fl_push_valid;
  logic [W-1:0][PW-1:0] fl_push_reg, fl_head;

  window_timer #(.WINDOW(WINDOW)) u_timer (
    .clk, .rst, .enable(1'b1), .window_end, .cycle(win_cycle)
  );

  l2_miss_counter #(.N(N), .MW(MW)) u_miss (
    .clk, .rst, .l2_miss, .window_end,
    .running, .count(window_misses), .count_valid
  );

  miss_ranker #(.N(N), .MW(MW)) u_rank (
    .count(window_misses), .rank, .low_half
  );

  // The ranker sees the closed window's counts one cycle after window_end.
  always_ff @(posedge clk) begin
    if (rst) cap_update <= 1'b0;
    else     cap_update <= window_end;
  end

  cap_adjuster #(.N(N), .CW(CW), .CM(CM), .CL(CL)) u_caps (
    .clk, .rst, .adjust(cap_update), .rank, .low_half,
    .cap, .cap_sum,
    .inc_mask(cap_inc), .dec_mask(cap_dec),
    .blk_low(cap_at_low), .blk_high(cap_at_high), .blk_sum(cap_sum_full)
  );

  free_list #(.N(N), .RT(RT), .RA(RA), .W(W), .PW(PW)) u_free (
    .clk, .rst, .pop_count(fl_pop), .push_valid(fl_push_valid),
    .push_reg(fl_push_reg), .head(fl_head), .count(free_count)
  );

  rename_unit #(.N(N), .RT(RT), .RA(RA), .W(W), .CW(CW)) u_ren (
    .clk, .rst, .inst_count, .inst, .cap,
    .fl_head, .fl_count(free_count), .fl_pop, .fl_push_valid, .fl_push_reg,
    .commit, .ren_valid, .ren_tid, .ren_count, .ren,
    .occ, .cap_block, .fl_block
  );

endmodule
