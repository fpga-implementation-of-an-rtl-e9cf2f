// multiplier_cut: unsigned OP_W x OP_W array multiplier used as the circuit
// under test (4x4 by default).
//
// Combinational. The 2*OP_W-bit test pattern is split into two operands,
// x = pattern[2*OP_W-1:OP_W] and y = pattern[OP_W-1:0], and the product x*y
// is formed by adding shifted partial products (x & y[i]) << i row by row,
// as an array multiplier does. The product is exactly 2*OP_W bits wide.
// That the patterns drive a multiplier comes from the generator's
// description; its size and the operand split are this design's choices.
//
// Interface: pattern (2*OP_W bits), product (2*OP_W bits).
module multiplier_cut #(
  parameter int unsigned OP_W = 4
) (
  input  logic [2*OP_W-1:0] pattern,
  output logic [2*OP_W-1:0] product
);
  logic [OP_W-1:0] x, y;

  assign x = pattern[2*OP_W-1:OP_W];
  assign y = pattern[OP_W-1:0];

  always_comb begin
    product = '0;
    for (int unsigned i = 0; i < OP_W; i++)
      product = product + ((2*OP_W)'(x & {OP_W{y[i]}}) << i);
  end
endmodule
