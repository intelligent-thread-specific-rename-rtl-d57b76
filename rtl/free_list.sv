// free_list: pool of the free shared rename registers.
//
// A circular FIFO of physical register numbers, RR entries deep (RR = RT -
// N*RA is the most that can ever be free, because every thread always keeps
// RA registers mapped). After reset it holds registers N*RA .. RT-1, the ones
// not mapped to any architectural register. Each cycle the rename stage may
// take the first pop_count entries (offered on head[], oldest first) and
// commit may return up to W registers, given as a valid mask in push_valid /
// push_reg and packed into the FIFO in slot order. Both happen in the same
// cycle. The capping scheme fixes only that a register is allocated at rename
// and released when the next writer of the same architectural register
// commits; the FIFO organisation is this design's choice.
// Interface: count = number of free registers (registered); head[k] valid for
// k < count; pop_count <= min(count, W); pushes may never overflow.
module free_list #(
  parameter int unsigned N  = regcap_pkg::N_THREADS,
  parameter int unsigned RT = regcap_pkg::RT_REGS,
  parameter int unsigned RA = regcap_pkg::RA_REGS,
  parameter int unsigned W  = regcap_pkg::WIDTH,
  parameter int unsigned PW = regcap_pkg::PREG_W,
  localparam int unsigned RR = RT - N * RA,
  localparam int unsigned IW = $clog2(RR),
  localparam int unsigned NW = $clog2(RR + 1),
  localparam int unsigned KW = $clog2(W + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [KW-1:0]       pop_count,
  input  logic [W-1:0]        push_valid,
  input  logic [W-1:0][PW-1:0] push_reg,
  output logic [W-1:0][PW-1:0] head,
  output logic [NW-1:0]       count
);

  logic [PW-1:0] mem [RR];
  logic [IW-1:0] rd_ptr, wr_ptr;
  logic [KW-1:0] n_push;

  function automatic logic [IW-1:0] wrap(input int unsigned base, input int unsigned off);
    return IW'((base + off) % RR);
  endfunction

  always_comb begin
    for (int k = 0; k < W; k++) head[k] = mem[wrap(32'(rd_ptr), 32'(k))];
    n_push = '0;
    for (int k = 0; k < W; k++) n_push = n_push + KW'(push_valid[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RR; i++) mem[i] <= PW'(N * RA + i);
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= NW'(RR);
    end else begin
      automatic int unsigned slot = 0;
      for (int k = 0; k < W; k++) begin
        if (push_valid[k]) begin
          mem[wrap(32'(wr_ptr), slot)] <= push_reg[k];
          slot++;
        end
      end
      rd_ptr <= wrap(32'(rd_ptr), 32'(pop_count));
      wr_ptr <= wrap(32'(wr_ptr), 32'(n_push));
      count  <= count - NW'(pop_count) + NW'(n_push);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (rst) NW'(pop_count) <= count);
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst)
                                   int'(count) - int'(pop_count) + int'(n_push) <= int'(RR));

endmodule
