// reg_8bit: WIDTH-bit D register with synchronous reset (8 bits by default).
//
// Loads d on every rising clock edge; rst (active high, synchronous) clears
// it to zero. The generator uses two of these: Register B holds the decoder
// word and Register A holds the running sum, which is the test pattern.
// Loading on every clock without an enable, and the zero reset value, are
// this design's choices.
//
// Interface: clk, rst, d (WIDTH bits), q (WIDTH bits, registered).
module reg_8bit #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
