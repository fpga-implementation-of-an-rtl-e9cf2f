// gray_counter_tb: self-checking test of the 3-bit Gray counter.
// Holds reset, then follows the counter for three full periods and compares
// every state with the reflected Gray sequence 0,1,3,2,6,7,5,4 written out
// by hand; also checks that successive states differ in exactly one bit and
// that a reset in mid-count returns the counter to 000.
module gray_counter_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [2:0] gray;
  int checks = 0, failures = 0;

  localparam logic [2:0] SEQ [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                     3'b110, 3'b111, 3'b101, 3'b100};

  gray_counter #(.WIDTH(3)) dut (.clk, .rst, .gray);

  always #5 clk = ~clk;

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (gray !== exp) begin
      failures++;
      $display("FAIL %s: gray=%b expected %b", what, gray, exp);
    end
  endtask

  initial begin
    logic [2:0] prev;
    repeat (2) @(negedge clk);
    check(3'b000, "after reset");
    rst = 1'b0;
    for (int k = 1; k <= 24; k++) begin
      prev = gray;
      @(negedge clk);
      check(SEQ[k % 8], "sequence");
      checks++;
      if ($countones(prev ^ gray) != 1) begin
        failures++;
        $display("FAIL step %b -> %b changes %0d bits", prev, gray, $countones(prev ^ gray));
      end
    end
    // reset in the middle of a period
    repeat (3) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(3'b000, "mid-count reset");
    rst = 1'b0;
    @(negedge clk);
    check(3'b001, "first step after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
