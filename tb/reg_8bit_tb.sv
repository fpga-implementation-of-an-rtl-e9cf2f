// reg_8bit_tb: self-checking test of the 8-bit register.
// Drives random data, checks that q shows the value present at the previous
// rising edge and holds it between edges, and that synchronous reset clears
// q to zero on the next edge only.
module reg_8bit_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] d = '0, q;
  logic [7:0] expected;
  int checks = 0, failures = 0;

  reg_8bit #(.WIDTH(8)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    d = 8'hA5;
    @(negedge clk);
    check(8'h00, "reset");
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      d = 8'($urandom);
      expected = d;
      @(negedge clk);
      check(expected, "load");
      d = ~d;  // change d away from the edge: q must hold
      #2;
      check(expected, "hold");
      if (k == 100) begin
        rst = 1'b1;
        #1;
        check(expected, "reset is synchronous");
        @(negedge clk);
        check(8'h00, "mid-run reset");
        rst = 1'b0;
      end
    end
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
