// adder_8bit_tb: exhaustive self-checking test of the 8-bit adder.
// All 65,536 operand pairs are applied; {carry, sum} is compared with the
// 9-bit sum of the operands computed in the testbench.
module adder_8bit_tb;
  logic [7:0] a, b, sum;
  logic       carry;
  int checks = 0, failures = 0;

  adder_8bit #(.WIDTH(8)) dut (.a, .b, .sum, .carry);

  initial begin
    logic [8:0] exp;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        exp = 9'(i + j);
        checks++;
        if ({carry, sum} !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d + %0d: carry=%b sum=%0d", i, j, carry, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
