// window_timer: marks the end of each cap-adjustment window.
//
// A free-running counter counts clock cycles from 0 to WINDOW-1 and raises
// window_end for exactly one cycle, on the last cycle of every window, so the
// first pulse comes WINDOW cycles after reset is released. The 2000-cycle
// window is the algorithm's own number; the counter form is this design's.
// Interface: clk, synchronous active-high rst, enable (counting pauses while
// low), window_end (1-cycle pulse), cycle (position in the current window).
module window_timer #(
  parameter int unsigned WINDOW = regcap_pkg::WINDOW_CYCLES,
  localparam int unsigned CW    = $clog2(WINDOW)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  output logic          window_end,
  output logic [CW-1:0] cycle
);

  localparam logic [CW-1:0] LAST = CW'(WINDOW - 1);

  always_ff @(posedge clk) begin
    if (rst)            cycle <= '0;
    else if (enable)    cycle <= (cycle == LAST) ? '0 : cycle + 1'b1;
  end

  assign window_end = enable && (cycle == LAST);

endmodule
