// tpg_pkg: sizes shared by the Gray-counter/decoder test pattern generator.
// The counter is 3 bits wide, so the decoder produces 2**3 = 8 one-hot lines
// and every register and the adder in the pattern path are 8 bits wide.
// The 4x4 multiplier under test (operand width CUT_OP_W) is this design's own
// choice: it consumes one 8-bit pattern as two 4-bit operands.
package tpg_pkg;
  localparam int unsigned CNT_W    = 3;
  localparam int unsigned PAT_W    = 1 << CNT_W;  // 8
  localparam int unsigned CUT_OP_W = PAT_W / 2;   // 4
endpackage
