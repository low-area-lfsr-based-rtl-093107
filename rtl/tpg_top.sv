// tpg_top: low-power test pattern generator for built-in self-test.
//
// Two pattern sources, each built only from modified-clock flip-flops (a
// flip-flop is clocked only in cycles where its value changes), stand side by
// side and both feed the circuit under test, which is outside this design:
//   - gray_code_gen: exhaustive GRAY_N-bit patterns, one bit changing per
//     step, so one flip-flop is clocked per step;
//   - mc_lfsr: the standard LFSR_W-stage LFSR with XOR feedback, which gives a
//     pseudo-random sequence of 2^LFSR_W - 1 patterns and can be loaded with a
//     seed.
// Which generator drives which inputs of the circuit under test is left to
// the integrator: both pattern buses are brought out.
//
// Interface: clk, rst_n (asynchronous, active low: Gray pattern <= 0, LFSR <=
// LFSR_SEED), gray_en and lfsr_en (advance the respective generator), lfsr_load
// and lfsr_seed (synchronous seed load), gray_pattern, lfsr_pattern. Timing:
// one new pattern per generator per enabled clock, visible one clock after the
// edge. The pairing of Gray code generator and modified-clock LFSR follows the
// published proposal; the separate enables, the seed port and the default
// widths are this design's choices.
module tpg_top
  import tpg_pkg::*;
#(
  parameter int unsigned       GRAY_N    = GRAY_W_DEF,
  parameter int unsigned       LFSR_W    = LFSR_W_DEF,
  parameter logic [LFSR_W-1:0] LFSR_TAPS = {{2{1'b1}}, {(LFSR_W-2){1'b0}}},
  parameter logic [LFSR_W-1:0] LFSR_SEED = {{(LFSR_W-1){1'b0}}, 1'b1}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              gray_en,
  input  logic              lfsr_en,
  input  logic              lfsr_load,
  input  logic [LFSR_W-1:0] lfsr_seed,
  output logic [GRAY_N-1:0] gray_pattern,
  output logic [LFSR_W-1:0] lfsr_pattern
);

  gray_code_gen #(.N(GRAY_N)) u_gray (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (gray_en),
    .pattern (gray_pattern)
  );

  mc_lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (lfsr_en),
    .load  (lfsr_load),
    .seed  (lfsr_seed),
    .y     (lfsr_pattern)
  );

endmodule
