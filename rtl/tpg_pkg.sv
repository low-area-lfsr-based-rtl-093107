// tpg_pkg: constants and helper functions shared by the low-power test
// pattern generators.
//
// The generators step through test patterns whose consecutive members differ
// in a single bit (reflected binary Gray code), so each clock cycle toggles
// exactly one flip-flop. bin2gray/gray2bin convert between the Gray pattern
// held in the state register and the plain binary count used to work out the
// next pattern. They are pure combinational functions for any width up to
// MAX_W bits. The Gray code form is this design's choice of the single-bit-
// change code; the widths and seeds below are defaults, see each module.
package tpg_pkg;

  // Widest pattern generator the helper functions support.
  localparam int unsigned MAX_W = 64;

  // Default widths: the standard LFSR has three stages (FF1..FF3), the Gray
  // code generator four bits.
  localparam int unsigned LFSR_W_DEF = 3;
  localparam int unsigned GRAY_W_DEF = 4;

  // Binary -> reflected Gray code: g = b ^ (b >> 1).
  function automatic logic [MAX_W-1:0] bin2gray(input logic [MAX_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected Gray code -> binary: b[i] = XOR of g[MAX_W-1:i].
  function automatic logic [MAX_W-1:0] gray2bin(input logic [MAX_W-1:0] g);
    logic [MAX_W-1:0] b;
    b[MAX_W-1] = g[MAX_W-1];
    for (int i = MAX_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
