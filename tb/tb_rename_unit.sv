// tb_rename_unit: drives the rename stage with random instruction streams of
// four threads, a queue model of the free list and an in-order-per-thread ROB
// model, and checks every renamed group against a reference model that
// renames one instruction at a time: round-robin thread choice, group length
// cut by the cap and by the free list, source and old-destination mappings
// (including bypass from earlier instructions of the same group), the
// registers allocated and the per-thread occupancy. Caps change at random,
// also below the current occupancy.
module tb_rename_unit;
  import regcap_pkg::*;
  localparam int unsigned N = 4, RT = 160, RA = 32, W = 8, CW = 8, PW = PREG_W;
  localparam int unsigned RR = RT - N * RA;
  localparam int unsigned NW = $clog2(RR + 1), KW = $clog2(W + 1);

  logic clk = 0, rst = 1;
  logic [N-1:0][KW-1:0] inst_count;
  dec_inst_t [N-1:0][W-1:0] inst;
  logic [N-1:0][CW-1:0] cap;
  logic [W-1:0][PW-1:0] fl_head;
  logic [NW-1:0] fl_count;
  logic [KW-1:0] fl_pop;
  logic [W-1:0] fl_push_valid;
  logic [W-1:0][PW-1:0] fl_push_reg;
  commit_t [W-1:0] commit;
  logic ren_valid;
  logic [TID_W-1:0] ren_tid;
  logic [KW-1:0] ren_count;
  ren_inst_t [W-1:0] ren;
  logic [N-1:0][CW-1:0] occ;
  logic [N-1:0] cap_block;
  logic fl_block;
  int checks = 0, failures = 0;

  rename_unit #(.N(N), .RT(RT), .RA(RA), .W(W), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dec_inst_t rand_inst(input bit narrow);
    dec_inst_t d;
    int m;
    m = narrow ? 4 : 32;
    d.has_dest = ($urandom % 4) != 0;
    d.dst  = AREG_W'($urandom % m);
    d.src1 = AREG_W'($urandom % m);
    d.src2 = AREG_W'($urandom % m);
    return d;
  endfunction

  typedef struct { bit has_dest; int old_pdst; } rob_e;

  initial begin
    int rat [N][RA];
    int m_occ [N];
    int fl [$];
    rob_e rob [N][$];
    int rr = 0;
    int n_cap = 0, n_fl = 0, n_bypass = 0, n_switch = 0, n_cut = 0, last_tid = -1;
    dec_inst_t pend [N][W];

    for (int t = 0; t < N; t++) begin
      for (int a = 0; a < int'(RA); a++) rat[t][a] = t * int'(RA) + a;
      m_occ[t] = 0;
      for (int i = 0; i < int'(W); i++) pend[t][i] = rand_inst(t == 1);
    end
    for (int i = 0; i < int'(RR); i++) fl.push_back(int'(N * RA) + i);
    inst_count = '0; inst = '0; cap = '0; commit = '0; fl_head = '0; fl_count = '0;
    repeat (2) @(negedge clk);
    rst = 0;

    for (int c = 0; c < 30000; c++) begin
      int e_sel, e_n, room, nd, done, phase;
      bit elig [N];
      bit any;
      int grp_dst [W];
      bit grp_wr [W];

      phase = (c / 500) % 3;   // 0: free flowing, 1: slow commit (free list drains), 2: tight caps
      // caps
      if (c % 97 == 0)
        for (int t = 0; t < N; t++)
          cap[t] = CW'((phase == 2) ? ($urandom % 6) : (4 + $urandom % 20));
      // instructions on offer
      for (int t = 0; t < N; t++) begin
        inst_count[t] = KW'($urandom % (W + 1));
        for (int i = 0; i < int'(W); i++) inst[t][i] = pend[t][i];
      end
      // free list head
      fl_count = NW'(fl.size());
      for (int k = 0; k < int'(W); k++) fl_head[k] = (k < fl.size()) ? PW'(fl[k]) : '0;
      // ROB: commit up to W instructions, oldest first per thread
      commit = '0;
      for (int k = 0; k < int'(W); k++) begin
        int t;
        t = $urandom % N;
        if (rob[t].size() > 0 && ($urandom % 8) < ((phase == 1) ? 1 : 6)) begin
          rob_e e;
          e = rob[t].pop_front();
          commit[k].valid = 1'b1;
          commit[k].tid = TID_W'(t);
          commit[k].has_dest = e.has_dest;
          commit[k].old_pdst = PW'(e.old_pdst);
        end
      end
      #1;
      // reference: eligibility and round-robin choice
      any = 0; e_sel = 0;
      for (int t = 0; t < N; t++)
        elig[t] = inst_count[t] != 0 &&
                  (!inst[t][0].has_dest || (m_occ[t] < int'(cap[t]) && fl.size() > 0));
      for (int k = 0; k < N; k++)
        if (!any && elig[(rr + k) % N]) begin any = 1; e_sel = (rr + k) % N; end
      check(ren_valid == any, "ren_valid");
      for (int t = 0; t < N; t++) begin
        bit want_cb;
        want_cb = inst_count[t] != 0 && inst[t][0].has_dest && m_occ[t] >= int'(cap[t]);
        check(cap_block[t] == want_cb, "cap_block");
        if (want_cb) n_cap++;
      end
      if (fl_block) n_fl++;
      check(fl_pop == '0 || any, "no pop when idle");
      if (any) begin
        check(int'(ren_tid) == e_sel, $sformatf("cycle %0d tid %0d want %0d", c, ren_tid, e_sel));
        if (last_tid != e_sel) n_switch++;
        last_tid = e_sel;
        room = int'(cap[e_sel]) - m_occ[e_sel];
        if (room < 0) room = 0;
        if (fl.size() < room) room = fl.size();
        e_n = 0; nd = 0; done = 0;
        for (int i = 0; i < int'(inst_count[e_sel]) && !done; i++) begin
          dec_inst_t d;
          d = inst[e_sel][i];
          if (d.has_dest && nd >= room) begin done = 1; n_cut++; end
          else begin
            // sources
            check(int'(ren[i].psrc1) == rat[e_sel][d.src1] && int'(ren[i].psrc2) == rat[e_sel][d.src2],
                  $sformatf("cycle %0d slot %0d sources", c, i));
            for (int j = 0; j < i; j++)
              if (grp_wr[j] && (grp_dst[j] == int'(d.src1) || grp_dst[j] == int'(d.src2))) begin
                n_bypass++; break;
              end
            check(ren[i].has_dest == d.has_dest, "has_dest");
            if (d.has_dest) begin
              check(int'(ren[i].old_pdst) == rat[e_sel][d.dst], "old_pdst");
              check(int'(ren[i].pdst) == fl[nd], "pdst from free list head");
              rob[e_sel].push_back('{1'b1, rat[e_sel][d.dst]});
              rat[e_sel][d.dst] = fl[nd];
              grp_wr[i] = 1; grp_dst[i] = int'(d.dst);
              nd++;
            end else begin
              rob[e_sel].push_back('{1'b0, 0});
              grp_wr[i] = 0;
            end
            e_n++;
          end
        end
        check(int'(ren_count) == e_n, $sformatf("cycle %0d count %0d want %0d", c, ren_count, e_n));
        check(int'(fl_pop) == nd, "fl_pop");
        // consume renamed instructions from the thread's stream
        for (int i = 0; i < int'(W); i++)
          pend[e_sel][i] = (i + e_n < int'(W)) ? pend[e_sel][i + e_n] : rand_inst(e_sel == 1);
        for (int k = 0; k < nd; k++) void'(fl.pop_front());
        m_occ[e_sel] += nd;
        rr = (e_sel + 1) % N;
      end
      // commit: pushes to the free list
      for (int k = 0; k < int'(W); k++) begin
        check(fl_push_valid[k] == (commit[k].valid && commit[k].has_dest), "push_valid");
        if (commit[k].valid && commit[k].has_dest) begin
          check(fl_push_reg[k] == commit[k].old_pdst, "push_reg");
          fl.push_back(int'(commit[k].old_pdst));
          m_occ[commit[k].tid]--;
        end
      end
      @(negedge clk);
      for (int t = 0; t < N; t++)
        check(int'(occ[t]) == m_occ[t], $sformatf("cycle %0d occ[%0d] %0d want %0d", c, t, occ[t], m_occ[t]));
    end
    $display("cap blocks %0d, free-list blocks %0d, group cut-offs %0d, bypasses %0d, thread switches %0d",
             n_cap, n_fl, n_cut, n_bypass, n_switch);
    check(n_cap > 0, "cap gate used");
    check(n_fl > 0, "free list exhausted");
    check(n_cut > 0, "group cut short");
    check(n_bypass > 0, "intra-group bypass");
    check(n_switch > 100, "round robin switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
