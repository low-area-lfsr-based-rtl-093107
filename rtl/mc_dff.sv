// mc_dff: D flip-flop with the modified clock scheme.
//
// The flip-flop is clocked through its own mc_clock_gate, so it sees a rising
// clock edge only in cycles where d differs from q. Its behaviour at the
// output is that of an ordinary rising-edge D flip-flop; only the number of
// clock edges the storage element receives (and with it the clock power)
// drops to the number of times its value actually changes.
//
// Interface: clk (free-running clock), rst_n (asynchronous, active-low reset
// to RST_VAL), d, q. Timing: q takes d at the rising edge of clk, one cycle of
// latency, like a plain flip-flop. The gated flip-flop and its control logic
// follow the published block scheme; the asynchronous reset and its value are
// this design's choice.
module mc_dff #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic gclk;

  mc_clock_gate u_gate (
    .clk  (clk),
    .d    (d),
    .q    (q),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RST_VAL;
    else        q <= d;
  end

endmodule
