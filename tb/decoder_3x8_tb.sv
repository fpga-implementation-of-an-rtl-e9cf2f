// decoder_3x8_tb: exhaustive self-checking test of the 3-to-8 decoder.
// Every input code is applied and the output is compared with a one-hot
// table written out by hand (000 -> 00000001 ... 111 -> 10000000).
module decoder_3x8_tb;
  logic [2:0] sel;
  logic [7:0] onehot;
  int checks = 0, failures = 0;

  localparam logic [7:0] TABLE [8] = '{8'b0000_0001, 8'b0000_0010, 8'b0000_0100,
                                       8'b0000_1000, 8'b0001_0000, 8'b0010_0000,
                                       8'b0100_0000, 8'b1000_0000};

  decoder_3x8 #(.IN_W(3)) dut (.sel, .onehot);

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int n = 0; n < 8; n++) begin
        sel = 3'(n);
        #1;
        checks++;
        if (onehot !== TABLE[n]) begin
          failures++;
          $display("FAIL sel=%b onehot=%b expected %b", sel, onehot, TABLE[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
