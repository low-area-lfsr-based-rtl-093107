// gray_code_gen: exhaustive test pattern generator in Gray code, built from
// modified-clock flip-flops.
//
// With N bits it produces all 2^N patterns, starting from all zeros after
// reset, and consecutive patterns always differ in exactly one bit (Hamming
// distance one). Because every bit is stored in an mc_dff, only the one
// flip-flop whose bit changes receives a clock edge in a given cycle; the
// other N-1 flip-flops are not clocked at all. This pairing of an exhaustive
// single-bit-change sequence with the modified clock is the published idea;
// how the next pattern is formed is this design's own: the current pattern is
// turned back into binary, incremented, and turned into Gray code again.
//
// Interface: clk, rst_n (asynchronous, active low, pattern <= 0), en (advance
// one pattern per clock when high, hold when low; while held no flip-flop is
// clocked), pattern (current test pattern). Timing: a new pattern appears one
// clock after each rising edge with en high; after 2^N steps the sequence
// wraps to all zeros.
module gray_code_gen
  import tpg_pkg::*;
#(
  parameter int unsigned N = GRAY_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] pattern
);

  logic [MAX_W-1:0] cur_ext;
  logic [N-1:0]     nxt_bin;
  logic [N-1:0]     d;

  // Next pattern: Gray(binary(pattern) + 1), counted modulo 2^N.
  always_comb begin
    cur_ext          = '0;
    cur_ext[N-1:0]   = pattern;
    nxt_bin          = N'(gray2bin(cur_ext)) + N'(1);
    d                = en ? (nxt_bin ^ (nxt_bin >> 1)) : pattern;
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    mc_dff #(.RST_VAL(1'b0)) u_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (d[i]),
      .q     (pattern[i])
    );
  end

endmodule
