// mc_lfsr: standard (Fibonacci) LFSR whose stages are modified-clock
// flip-flops.
//
// Stage 1 (Y1) takes the XOR of the tapped stage outputs and every further
// stage k takes the output of stage k-1, so the register shifts from Y1
// towards YW once per clock. Each stage is an mc_dff: a stage whose next
// value equals its present one gets no clock edge, which removes the clock
// power of every stage that does not toggle in a cycle.
//
// The three-stage default with its XOR feedback into the first stage and the
// per-stage control logic follows the published "standard LFSR with modified
// clock". The tap set (Y2 and Y3, polynomial x^3 + x^2 + 1, period 7), the
// parallel seed load, the hold input and the reset seed are this design's
// choices. For another width W set TAPS to a primitive polynomial for that W;
// the default expression taps the last two stages, which is maximal only for
// some widths (3, 4, 6, 7, 15, ...). The all-zero state is a lock-up state and
// must not be loaded.
//
// Interface: clk, rst_n (asynchronous, active low, register <= SEED), en
// (shift when high), load (synchronous; register <= seed, has priority over
// en), seed, y (y[k-1] is stage output Yk). Timing: one shift per rising clock
// edge; a loaded seed is visible on y one clock later.
module mc_lfsr
  import tpg_pkg::*;
#(
  parameter int unsigned W    = LFSR_W_DEF,
  parameter logic [W-1:0] TAPS = {{2{1'b1}}, {(W-2){1'b0}}},
  parameter logic [W-1:0] SEED = {{(W-1){1'b0}}, 1'b1}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] y
);

  logic         fb;
  logic [W-1:0] shifted;
  logic [W-1:0] d;

  always_comb begin
    fb      = ^(y & TAPS);
    shifted = {y[W-2:0], fb};
    if (load)    d = seed;
    else if (en) d = shifted;
    else         d = y;
  end

  for (genvar k = 0; k < W; k++) begin : g_stage
    mc_dff #(.RST_VAL(SEED[k])) u_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (d[k]),
      .q     (y[k])
    );
  end

endmodule
