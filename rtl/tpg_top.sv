// tpg_top: test pattern generator built from a Gray counter and a decoder,
// driving a multiplier as the circuit under test.
//
// Datapath, one rising clock edge per step:
//   gray counter (c1) -> 3-to-8 decoder (d1) -> Register B (r2)
//   adder (a1): A_out + B_out            -> Register A (r1)
// Register A's output A_out is the test pattern. Each cycle Register B takes
// the one-hot word of the current Gray code and Register A accumulates it:
//   B(t+1) = onehot(gray(t)),  A(t+1) = A(t) + B(t)  (mod 256).
// Over one counter period the eight one-hot words add up to 255, so A falls
// by one (mod 256) every 8 cycles and the pattern sequence repeats after
// 8 * 256 = 2048 cycles. The pattern is applied to the multiplier under test
// (high nibble times low nibble); its product is brought out so that it can
// be compared with the expected value.
//
// Interface: clk, rst (synchronous, active high, clears the counter and both
// registers). Outputs: a_out (the pattern, registered) and product (the
// multiplier's response to a_out, combinational from a_out). These 18 pins
// (clock, reset, 8 + 8 data) match the pin count of the reference FPGA
// build; the Gray code, Register B and the adder carry stay internal.
// The block chain and the adder feeding Register A follow the generator's
// block diagram; clocking everything on one edge, the reset, the wrap-around
// sum and the multiplier size are this design's choices.
module tpg_top
  import tpg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  output logic [PAT_W-1:0] a_out,
  output logic [PAT_W-1:0] product
);
  logic [CNT_W-1:0] gray;
  logic [PAT_W-1:0] dec;
  logic [PAT_W-1:0] b_out;
  logic [PAT_W-1:0] sum;
  logic             carry;  // the sum wraps; the carry out is not used

  gray_counter #(.WIDTH(CNT_W)) c1 (.clk, .rst, .gray);

  decoder_3x8 #(.IN_W(CNT_W)) d1 (.sel(gray), .onehot(dec));

  reg_8bit #(.WIDTH(PAT_W)) r2 (.clk, .rst, .d(dec), .q(b_out));

  adder_8bit #(.WIDTH(PAT_W)) a1 (.a(b_out), .b(a_out), .sum, .carry);

  reg_8bit #(.WIDTH(PAT_W)) r1 (.clk, .rst, .d(sum), .q(a_out));

  multiplier_cut #(.OP_W(CUT_OP_W)) cut (.pattern(a_out), .product);
endmodule
