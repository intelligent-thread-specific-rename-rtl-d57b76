// tb_regcap_top: end-to-end test of the capped rename stage at its default
// size (4 threads, 160 physical registers, 8-wide, 2000-cycle windows).
//
// The testbench plays the L2 cache, the decode stage and the ROB. Each window
// it chooses an order of the threads and makes them miss in the L2 at rates
// 0, 1/4, 2/4 and 3/4 in that order; threads that miss more also commit more
// slowly. It checks:
//   * window_end every 2000 cycles and the per-window miss counts;
//   * the caps after each update against a reference model of the algorithm
//     (start C_m/N = 10; C_l = 4; C_h = 16; C_m = 40);
//   * every rename: the physical registers given out were free, sources read
//     the latest mapping, and no thread takes a register past its cap;
//   * occupancy per thread and free registers + occupancy = R_r = 32.
// Windows 0-6 keep threads 0,1 in the low-miss half, which drives the caps to
// the scheme's worked 16/16/4/4 example; later windows reorder the threads so the
// upper, lower and sum limits all act. Each mechanism must occur at least once.
module tb_regcap_top;
  import regcap_pkg::*;
  localparam int unsigned N = 4, RT = 160, RA = 32, W = 8, WIN = 2000;
  localparam int unsigned RR = RT - N * RA, CM = RR + 2 * N, CL = 4, CH = 2 * CM / N - CL;
  localparam int unsigned KW = $clog2(W + 1);
  localparam int NWIN = 14;

  logic clk = 0, rst = 1;
  logic [N-1:0] l2_miss;
  logic [N-1:0][KW-1:0] inst_count;
  dec_inst_t [N-1:0][W-1:0] inst;
  commit_t [W-1:0] commit;
  logic ren_valid;
  logic [TID_W-1:0] ren_tid;
  logic [KW-1:0] ren_count;
  ren_inst_t [W-1:0] ren;
  logic [N-1:0][CAP_W-1:0] cap;
  logic [CAP_W+2:0] cap_sum;
  logic [N-1:0][CAP_W-1:0] occ;
  logic [5:0] free_count;
  logic [N-1:0][10:0] window_misses;
  logic window_end, cap_update;
  logic [N-1:0] cap_inc, cap_dec, cap_at_low, cap_at_high, cap_sum_full, cap_block;
  logic fl_block;

  regcap_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (NWIN * WIN + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit has_dest; int old_pdst; } rob_e;

  function automatic dec_inst_t rand_inst();
    dec_inst_t d;
    d.has_dest = ($urandom % 5) != 0;
    d.dst  = AREG_W'($urandom % 8);
    d.src1 = AREG_W'($urandom % 8);
    d.src2 = AREG_W'($urandom % 32);
    return d;
  endfunction

  initial begin
    int order [N];            // order[r]: thread meant to have rank r this window
    int m_cap [N], m_occ [N], m_miss [N], rat [N][RA];
    bit in_use [RT];
    rob_e rob [N][$];
    dec_inst_t pend [N][W];
    int cyc = 0, win = 0;
    int n_win = 0, n_inc = 0, n_dec = 0, n_low = 0, n_high = 0, n_sum = 0;
    int n_capblk = 0, n_flblk = 0, n_cut = 0, n_switch = 0, n_bypass = 0, last_tid = -1;
    bit seen_example = 0;

    for (int t = 0; t < N; t++) begin
      m_cap[t] = int'(CM / N); m_occ[t] = 0; m_miss[t] = 0;
      for (int a = 0; a < int'(RA); a++) rat[t][a] = t * int'(RA) + a;
      for (int i = 0; i < int'(W); i++) pend[t][i] = rand_inst();
    end
    for (int p = 0; p < int'(RT); p++) in_use[p] = p < int'(N * RA);
    order = '{0, 1, 2, 3};
    l2_miss = '0; inst_count = '0; inst = '0; commit = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    while (win < NWIN) begin
      int pos, slow;
      // L2 misses: thread of rank r misses when (cycle % 4) < r
      pos = cyc % int'(WIN);
      for (int r = 0; r < N; r++) l2_miss[order[r]] = (cyc % 4) < r;
      // decode offers
      for (int t = 0; t < N; t++) begin
        inst_count[t] = KW'($urandom % (W + 1));
        for (int i = 0; i < int'(W); i++) inst[t][i] = pend[t][i];
      end
      // ROB: commit, slower for threads that miss more; a stall phase each window
      slow = (pos >= 1000 && pos < 1100);
      commit = '0;
      for (int k = 0; k < int'(W); k++) begin
        int t, r;
        t = $urandom % N;
        r = 0;
        for (int j = 0; j < N; j++) if (order[j] == t) r = j;
        if (!slow && rob[t].size() > 0 && int'($urandom % 8) >= 2 * r) begin
          rob_e e;
          e = rob[t].pop_front();
          commit[k].valid = 1; commit[k].tid = TID_W'(t);
          commit[k].has_dest = e.has_dest; commit[k].old_pdst = PREG_W'(e.old_pdst);
        end
      end
      #1;
      // ---- cap update of the previous window
      if (cap_update) begin
        int idx [N], sum;
        // reference ranking: stable sort by miss count
        for (int t = 0; t < N; t++) begin
          idx[t] = t;
          check(int'(window_misses[t]) == m_miss[t],
                $sformatf("window %0d thread %0d misses %0d want %0d", win, t, window_misses[t], m_miss[t]));
        end
        for (int a = 0; a < N; a++)
          for (int b = a + 1; b < N; b++)
            if (m_miss[idx[b]] < m_miss[idx[a]] || (m_miss[idx[b]] == m_miss[idx[a]] && idx[b] < idx[a])) begin
              int tmp; tmp = idx[a]; idx[a] = idx[b]; idx[b] = tmp;
            end
        for (int r = N / 2; r < N; r++) if (m_cap[idx[r]] > int'(CL)) m_cap[idx[r]]--;
        sum = 0;
        for (int t = 0; t < N; t++) sum += m_cap[t];
        for (int r = 0; r < N / 2; r++)
          if (m_cap[idx[r]] < int'(CH) && sum < int'(CM)) begin m_cap[idx[r]]++; sum++; end
        for (int t = 0; t < N; t++) m_miss[t] = 0;
        win++;
        // the next window's order
        if (win == 7)      order = '{0, 2, 1, 3};
        else if (win == 8) order = '{1, 2, 0, 3};
        else if (win > 8) begin
          for (int t = N - 1; t > 0; t--) begin
            int j, tmp; j = $urandom % (t + 1); tmp = order[t]; order[t] = order[j]; order[j] = tmp;
          end
        end
      end
      for (int t = 0; t < N; t++) if (l2_miss[t]) m_miss[t]++;
      if (window_end) begin
        n_win++;
        check(pos == int'(WIN) - 1, $sformatf("window_end at position %0d", pos));
      end
      n_inc += $countones(cap_inc); n_dec += $countones(cap_dec);
      n_low += $countones(cap_at_low); n_high += $countones(cap_at_high); n_sum += $countones(cap_sum_full);
      if (cap == {8'd4, 8'd4, 8'd16, 8'd16}) seen_example = 1;
      // ---- rename checks
      n_capblk += $countones(cap_block);
      if (fl_block) n_flblk++;
      if (ren_valid) begin
        int t, nd;
        t = int'(ren_tid);
        if (t != last_tid) n_switch++;
        last_tid = t;
        if (ren_count < inst_count[t]) n_cut++;
        nd = 0;
        for (int i = 0; i < int'(ren_count); i++) begin
          dec_inst_t d;
          d = inst[t][i];
          check(int'(ren[i].psrc1) == rat[t][d.src1] && int'(ren[i].psrc2) == rat[t][d.src2], "sources");
          for (int j = 0; j < i; j++)
            if (inst[t][j].has_dest && inst[t][j].dst == d.src1) begin n_bypass++; break; end
          if (d.has_dest) begin
            int p;
            p = int'(ren[i].pdst);
            check(p < int'(RT) && !in_use[p], $sformatf("pdst %0d was free", p));
            check(int'(ren[i].old_pdst) == rat[t][d.dst], "old_pdst");
            in_use[p] = 1;
            rob[t].push_back('{1'b1, rat[t][d.dst]});
            rat[t][d.dst] = p;
            nd++;
          end else begin
            rob[t].push_back('{1'b0, 0});
          end
        end
        m_occ[t] += nd;
        check(nd == 0 || m_occ[t] <= int'(cap[t]), $sformatf("thread %0d above its cap", t));
        for (int i = 0; i < int'(W); i++)
          pend[t][i] = (i + int'(ren_count) < int'(W)) ? pend[t][i + int'(ren_count)] : rand_inst();
      end
      for (int k = 0; k < int'(W); k++)
        if (commit[k].valid && commit[k].has_dest) begin
          check(in_use[commit[k].old_pdst], "freed register was in use");
          in_use[commit[k].old_pdst] = 0;
          m_occ[commit[k].tid]--;
        end
      @(negedge clk);
      cyc++;
      begin
        int s;
        s = 0;
        for (int t = 0; t < N; t++) begin
          check(int'(occ[t]) == m_occ[t], $sformatf("occ[%0d]", t));
          check(int'(cap[t]) == m_cap[t], $sformatf("cycle %0d cap[%0d] %0d want %0d", cyc, t, cap[t], m_cap[t]));
          s += int'(occ[t]);
        end
        check(s + int'(free_count) == int'(RR), "register conservation");
        check(int'(cap_sum) <= int'(CM), "cap sum within C_m");
      end
    end
    $display("windows %0d, cap +1 %0d, cap -1 %0d, held at C_l %0d, held at C_h %0d, held by C_m %0d",
             n_win, n_inc, n_dec, n_low, n_high, n_sum);
    $display("cap blocks %0d, free-list blocks %0d, cut groups %0d, thread switches %0d, bypasses %0d, 16/16/4/4 reached %0d",
             n_capblk, n_flblk, n_cut, n_switch, n_bypass, seen_example);
    check(n_win == NWIN, "window count");
    check(n_inc > 0, "cap increments");
    check(n_dec > 0, "cap decrements");
    check(n_low > 0, "lower cap limit");
    check(n_high > 0, "upper cap limit");
    check(n_sum > 0, "cap-sum limit");
    check(n_capblk > 0, "rename held by cap");
    check(n_flblk > 0, "rename held by empty free list");
    check(n_cut > 0, "group cut short");
    check(n_switch > 0, "round-robin thread switch");
    check(n_bypass > 0, "intra-group bypass");
    check(seen_example, "caps reach 16/16/4/4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
