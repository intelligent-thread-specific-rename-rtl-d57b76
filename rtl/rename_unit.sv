// rename_unit: capped, round-robin register rename stage of the SMT core.
//
// Holds one rename table per thread (architectural -> physical register) and
// one occupancy counter per thread: the number of shared rename registers the
// thread holds beyond its RA architectural ones. Each cycle it picks one
// thread, round-robin among threads that can rename, and renames up to W of
// that thread's instructions in program order:
//   * sources read the thread's table, or the destination of an earlier
//     instruction of the same group (intra-group bypass);
//   * each destination takes the next free register from the free list and
//     reports the register it replaces (old_pdst), which the ROB frees when
//     the instruction commits;
//   * the group stops at the first destination that would take the thread's
//     occupancy past its cap, or that finds the free list exhausted.
// A thread whose occupancy is at or above its cap cannot rename an
// instruction with a destination: this is the per-thread cap gate the capping
// algorithm relies on. Commit slots return old_pdst to the free list and
// lower the committing thread's occupancy. The allocate-at-rename / free-at-
// next-writer's-commit rule, round-robin rename and the cap gate follow the
// published scheme; the single-thread-per-cycle group, in-order group cut-off and the
// absence of mispredict recovery (the scheme does not describe one) are
// this design's choices.
// Timing: ren_* outputs and fl_pop are combinational in the current cycle;
// tables, occupancy and round-robin pointer update at the clock edge.
module rename_unit #(
  parameter int unsigned N  = regcap_pkg::N_THREADS,
  parameter int unsigned RT = regcap_pkg::RT_REGS,
  parameter int unsigned RA = regcap_pkg::RA_REGS,
  parameter int unsigned W  = regcap_pkg::WIDTH,
  parameter int unsigned CW = regcap_pkg::CAP_W,
  localparam int unsigned PW = regcap_pkg::PREG_W,
  localparam int unsigned RR = RT - N * RA,
  localparam int unsigned NW = $clog2(RR + 1),
  localparam int unsigned KW = $clog2(W + 1),
  localparam int unsigned TW = regcap_pkg::TID_W
) (
  input  logic                clk,
  input  logic                rst,
  // decoded instructions waiting at the head of each thread's queue
  input  logic [N-1:0][KW-1:0]             inst_count,
  input  regcap_pkg::dec_inst_t [N-1:0][W-1:0] inst,
  // caps from the cap adjuster
  input  logic [N-1:0][CW-1:0]             cap,
  // free list
  input  logic [W-1:0][PW-1:0]             fl_head,
  input  logic [NW-1:0]                    fl_count,
  output logic [KW-1:0]                    fl_pop,
  output logic [W-1:0]                     fl_push_valid,
  output logic [W-1:0][PW-1:0]             fl_push_reg,
  // commit
  input  regcap_pkg::commit_t [W-1:0]      commit,
  // rename result of this cycle
  output logic                             ren_valid,
  output logic [TW-1:0]                    ren_tid,
  output logic [KW-1:0]                    ren_count,
  output regcap_pkg::ren_inst_t [W-1:0]    ren,
  // status
  output logic [N-1:0][CW-1:0]             occ,
  output logic [N-1:0]                     cap_block,   // held back by its cap
  output logic                             fl_block     // held back by an empty free list
);
  import regcap_pkg::*;

  localparam int unsigned SELW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0]   rat [N][RA];
  logic [SELW-1:0] rr_ptr;

  logic [N-1:0]    eligible;
  logic [SELW-1:0] sel;
  logic            any;
  logic [CW-1:0]   room;
  logic [KW-1:0]   n_ren, n_dst;
  logic [AREG_W-1:0] wr_areg [W];
  logic [W-1:0]      wr_en;

  // Which threads can rename at least one instruction this cycle
  always_comb begin
    fl_block = 1'b0;
    for (int t = 0; t < N; t++) begin
      cap_block[t] = (inst_count[t] != '0) && inst[t][0].has_dest && (occ[t] >= cap[t]);
      eligible[t]  = (inst_count[t] != '0) &&
                     (!inst[t][0].has_dest || (occ[t] < cap[t] && fl_count != '0));
      if (inst_count[t] != '0 && inst[t][0].has_dest && occ[t] < cap[t] && fl_count == '0)
        fl_block = 1'b1;
    end
  end

  // Round-robin choice, starting at rr_ptr
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      automatic int unsigned t;
      t = (int'(rr_ptr) + k) % N;
      if (!any && eligible[t]) begin
        sel = SELW'(t);
        any = 1'b1;
      end
    end
  end

  // Rename the selected thread's group
  always_comb begin
    automatic logic stop = 1'b0;
    room = (cap[sel] > occ[sel]) ? cap[sel] - occ[sel] : '0;
    if (int'(fl_count) < int'(room)) room = CW'(fl_count);
    n_ren = '0;
    n_dst = '0;
    ren   = '0;
    wr_en = '0;
    for (int i = 0; i < W; i++) wr_areg[i] = '0;
    for (int i = 0; i < W; i++) begin
      if (any && !stop && i < int'(inst_count[sel])) begin
        if (inst[sel][i].has_dest && int'(n_dst) >= int'(room)) begin
          stop = 1'b1;
        end else begin
          ren[i].psrc1 = rat[sel][inst[sel][i].src1];
          ren[i].psrc2 = rat[sel][inst[sel][i].src2];
          ren[i].old_pdst = rat[sel][inst[sel][i].dst];
          for (int j = 0; j < i; j++) begin
            if (wr_en[j] && wr_areg[j] == inst[sel][i].src1) ren[i].psrc1 = ren[j].pdst;
            if (wr_en[j] && wr_areg[j] == inst[sel][i].src2) ren[i].psrc2 = ren[j].pdst;
            if (wr_en[j] && wr_areg[j] == inst[sel][i].dst)  ren[i].old_pdst = ren[j].pdst;
          end
          if (inst[sel][i].has_dest) begin
            ren[i].has_dest = 1'b1;
            ren[i].pdst     = fl_head[n_dst];
            wr_en[i]        = 1'b1;
            wr_areg[i]      = inst[sel][i].dst;
            n_dst           = n_dst + 1'b1;
          end else begin
            ren[i].old_pdst = '0;
          end
          n_ren = n_ren + 1'b1;
        end
      end
    end
  end

  assign ren_valid = any;
  assign ren_tid   = TW'(sel);
  assign ren_count = n_ren;
  assign fl_pop    = n_dst;

  // Commit: return replaced registers to the free list
  always_comb begin
    for (int k = 0; k < W; k++) begin
      fl_push_valid[k] = commit[k].valid && commit[k].has_dest;
      fl_push_reg[k]   = commit[k].old_pdst;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < N; t++)
        for (int a = 0; a < RA; a++)
          rat[t][a] <= PW'(t * RA + a);
      occ    <= '0;
      rr_ptr <= '0;
    end else begin
      for (int i = 0; i < W; i++)
        if (wr_en[i]) rat[sel][wr_areg[i]] <= ren[i].pdst;
      for (int t = 0; t < N; t++) begin
        automatic logic [CW-1:0] o = occ[t];
        if (any && sel == SELW'(t)) o = o + CW'(n_dst);
        for (int k = 0; k < W; k++)
          if (commit[k].valid && commit[k].has_dest && commit[k].tid == TW'(t)) o = o - 1'b1;
        occ[t] <= o;
      end
      if (any) rr_ptr <= SELW'((int'(sel) + 1) % N);
    end
  end

  // A thread cannot release more rename registers than it holds.
  for (genvar t = 0; t < N; t++) begin : g_chk
    a_occ_le_rr: assert property (@(posedge clk) disable iff (rst) int'(occ[t]) <= int'(RR));
  end

endmodule
