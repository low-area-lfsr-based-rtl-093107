// mc_clock_gate: the "control logic" of the modified clock scheme.
//
// A flip-flop fed by this gate receives a clock edge only in a cycle where
// its data input differs from its data output, i.e. only when the stored
// value is about to change (0->1 or 1->0). In every other cycle the flip-flop
// sees no edge and dissipates no clock power.
//
// How it works: an XOR compares d with q and an AND passes the clock when they
// differ; both gates follow the published scheme. A plain AND of the clock
// with the XOR would glitch, because q (and often d) changes right after the
// rising edge it triggers. This design therefore holds the XOR result in a
// latch that is transparent while clk is low, the usual integrated clock-gate
// arrangement, so the gated clock is a clean full-width pulse. The latch is
// this design's addition and the reason for the latch warning lint reports.
//
// Interface: clk (free-running clock), d and q of the controlled flip-flop,
// gclk (modified clock). Timing: d and q must settle while clk is low; the
// gated rising edge coincides with the rising edge of clk.
module mc_clock_gate (
  input  logic clk,
  input  logic d,
  input  logic q,
  output logic gclk
);

  logic change;     // the flip-flop would change on the next edge
  logic change_l;   // change, held while clk is high

  assign change = d ^ q;

  always_latch begin
    if (!clk) change_l = change;
  end

  assign gclk = clk & change_l;

endmodule
