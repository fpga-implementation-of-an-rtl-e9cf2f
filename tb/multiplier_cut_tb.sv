// multiplier_cut_tb: exhaustive self-checking test of the 4x4 multiplier
// under test. Every 8-bit pattern is applied; the product of its high and
// low nibbles is worked out in the testbench by repeated addition and
// compared with the block's output.
module multiplier_cut_tb;
  logic [7:0] pattern, product;
  int checks = 0, failures = 0;

  multiplier_cut #(.OP_W(4)) dut (.pattern, .product);

  initial begin
    int unsigned x, y, exp;
    for (int p = 0; p < 256; p++) begin
      pattern = 8'(p);
      x = p / 16;
      y = p % 16;
      exp = 0;
      for (int k = 0; k < x; k++) exp += y;
      #1;
      checks++;
      if (product !== 8'(exp)) begin
        failures++;
        $display("FAIL %0d * %0d: product=%0d expected %0d", x, y, product, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
