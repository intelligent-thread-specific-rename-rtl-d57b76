// regcap_pkg: shared constants and types of the thread-specific rename
// register capping design.
//
// The default machine is a 4-thread SMT core with a 160-entry integer physical
// register file, 32 architectural registers per thread and an 8-wide rename
// stage. From these follow the number of shared rename registers
// (RR = RT - N*RA), the maximum sum of caps (CM = RR + 2N), the per-thread cap
// lower limit (CL = 4), the upper limit (CH = 2*CM/N - 4) and the starting
// cap of every thread (CM/N). The cap window is 2000 cycles. Everything except
// the type widths comes from the algorithm's published numbers; the widths are
// this design's own choice, sized for the defaults.
package regcap_pkg;

  // Machine size
  localparam int unsigned N_THREADS = 4;     // threads sharing the register file
  localparam int unsigned RT_REGS   = 160;   // integer physical registers in total
  localparam int unsigned RA_REGS   = 32;    // architectural registers per thread
  localparam int unsigned WIDTH     = 8;     // rename / commit width

  // Capping algorithm
  localparam int unsigned WINDOW_CYCLES = 2000;  // cycles per adjustment window
  localparam int unsigned CAP_LOW       = 4;     // C_l, hard lower limit

  // Derived quantities (functions so that any parameter set can use them)
  function automatic int unsigned rename_regs(int unsigned rt, int unsigned n, int unsigned ra);
    return rt - n * ra;                        // R_r = R_t - N*R_a
  endfunction

  function automatic int unsigned cap_max_sum(int unsigned rr, int unsigned n);
    return rr + 2 * n;                         // C_m = R_r + 2N
  endfunction

  function automatic int unsigned cap_high(int unsigned cm, int unsigned n, int unsigned cl);
    return (2 * cm) / n - cl;                  // C_h = (2/N) C_m - 4
  endfunction

  function automatic int unsigned cap_start(int unsigned cm, int unsigned n);
    return cm / n;                             // every thread starts at C_m / N
  endfunction

  // Field widths
  localparam int unsigned AREG_W = 5;          // architectural register index (32 regs)
  localparam int unsigned PREG_W = 9;          // physical register index (up to 512 regs)
  localparam int unsigned CAP_W  = 8;          // cap values and occupancy counts
  localparam int unsigned TID_W  = 3;          // thread index (up to 8 threads)

  // One decoded instruction as the rename stage sees it
  typedef struct packed {
    logic              has_dest;   // writes an integer register
    logic [AREG_W-1:0] dst;        // destination architectural register
    logic [AREG_W-1:0] src1;       // first source architectural register
    logic [AREG_W-1:0] src2;       // second source architectural register
  } dec_inst_t;

  // One renamed instruction, handed on to dispatch / ROB
  typedef struct packed {
    logic              has_dest;
    logic [PREG_W-1:0] pdst;       // newly allocated physical destination
    logic [PREG_W-1:0] old_pdst;   // previous mapping of dst, freed at commit
    logic [PREG_W-1:0] psrc1;
    logic [PREG_W-1:0] psrc2;
  } ren_inst_t;

  // One commit slot: an instruction leaving the ROB
  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  tid;
    logic              has_dest;
    logic [PREG_W-1:0] old_pdst;   // register released by this commit
  } commit_t;

endpackage
