// adder_8bit: WIDTH-bit ripple-carry adder (8 bits by default).
//
// Combinational. A chain of full adders forms sum = a + b modulo 2**WIDTH;
// carry is the carry out of the top bit. In the generator it adds Register B
// (the decoder word) to Register A (the previous pattern), and the sum
// becomes the next pattern. The sum wrapping around and the carry not being
// fed back are this design's choices; the carry is only brought out.
//
// Interface: a, b (WIDTH bits), sum (WIDTH bits), carry (1 bit).
module adder_8bit #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             carry
);
  always_comb begin
    logic c;  // carry into the current bit position
    c = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    carry = c;
  end
endmodule
