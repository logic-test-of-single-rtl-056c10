// gcl: gated clock element of one line of a gated SCA page.
//
// Gives the line's cells the clock when they are to be written or to capture,
// and stops it otherwise, which is how the gated structure holds a line:
//   enable = ls | (~gse & ce)
//   * ls=1              : the line is selected, its cells load the scan data;
//   * gse=1, ls=0       : test access to another line, the clock is stopped
//                         and the line holds;
//   * gse=0             : functional mode or capture, the clock runs whenever
//                         the functional clock enable ce is high (tie ce high
//                         where the logic has no clock enable).
// The enable is held in a latch that is transparent while clk is low, and the
// gated clock is clk AND the latched enable, the usual glitch-free clock gate.
// The latch is intended and is the only one in the design. gclk follows clk
// with the delay of one AND gate.
module gcl (
  input  logic clk,
  input  logic ls,
  input  logic gse,
  input  logic ce,
  output logic gclk
);

  logic en;
  logic en_l;

  assign en = ls | (~gse & ce);

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
