// tb_free_list: random pops and returns against a queue model.
// The testbench keeps the registers it has taken and returns random ones in
// random commit slots; the FIFO order, head entries and count must match the
// model, the free list must fill to RR and run empty at least once.
module tb_free_list;
  localparam int unsigned N = 4, RT = 160, RA = 32, W = 8, PW = regcap_pkg::PREG_W;
  localparam int unsigned RR = RT - N * RA;
  localparam int unsigned NW = $clog2(RR + 1), KW = $clog2(W + 1);

  logic clk = 0, rst = 1;
  logic [KW-1:0] pop_count = '0;
  logic [W-1:0] push_valid = '0;
  logic [W-1:0][PW-1:0] push_reg = '0;
  logic [W-1:0][PW-1:0] head;
  logic [NW-1:0] count;
  int checks = 0, failures = 0;

  free_list #(.N(N), .RT(RT), .RA(RA), .W(W), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q [$];      // model of the free list, oldest first
    int held [$];   // registers taken by the "rename stage"
    int n_empty = 0, n_full = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < int'(RR); i++) q.push_back(int'(N * RA) + i);
    for (int c = 0; c < 20000; c++) begin
      int np, maxp, phase;
      // model check of the visible state
      check(int'(count) == q.size(), $sformatf("count %0d want %0d", count, q.size()));
      for (int k = 0; k < int'(W) && k < q.size(); k++)
        check(int'(head[k]) == q[k], "head entry");
      if (q.size() == 0) n_empty++;
      if (q.size() == int'(RR)) n_full++;
      // phases that drain and refill the list
      phase = (c / 300) % 2;
      maxp = (q.size() < int'(W)) ? q.size() : int'(W);
      np = (maxp == 0) ? 0 : $urandom % (maxp + 1);
      if (phase == 1 && np > 0) np = np / 2;
      pop_count = KW'(np);
      push_valid = '0;
      for (int k = 0; k < int'(W); k++) begin
        if (held.size() > 0 && ($urandom % 4 < ((phase == 1) ? 3 : 1))) begin
          int i; i = $urandom % held.size();
          push_valid[k] = 1'b1;
          push_reg[k] = PW'(held[i]);
          held.delete(i);
        end
      end
      @(negedge clk);
      // update the model: pops from the head, pushes in slot order
      for (int k = 0; k < np; k++) held.push_back(q.pop_front());
      for (int k = 0; k < int'(W); k++) if (push_valid[k]) q.push_back(int'(push_reg[k]));
    end
    check(n_empty > 0, "free list ran empty");
    check(n_full > 1, "free list refilled");
    $display("empty %0d cycles, full %0d cycles", n_empty, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
