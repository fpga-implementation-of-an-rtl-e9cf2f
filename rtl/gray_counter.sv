// gray_counter: free-running WIDTH-bit Gray-code counter.
//
// A binary counter advances by one on every rising clock edge and its value is
// converted to reflected Gray code (g = b ^ (b >> 1)), so consecutive outputs
// differ in exactly one bit. With WIDTH = 3 the output sequence is
// 000, 001, 011, 010, 110, 111, 101, 100 and then repeats.
//
// Interface: clk, rst (synchronous, active high, clears the count to 000),
// gray (registered output, valid one cycle after reset is released).
// The 3-bit width and the Gray ordering follow the generator's description;
// the binary-plus-XOR structure and the reset polarity are this design's choice.
module gray_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] gray
);
  logic [WIDTH-1:0] bin_q;

  always_ff @(posedge clk) begin
    if (rst) bin_q <= '0;
    else     bin_q <= bin_q + WIDTH'(1);
  end

  assign gray = bin_q ^ (bin_q >> 1);
endmodule
