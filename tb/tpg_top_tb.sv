// tpg_top_tb: end-to-end self-checking test of the test pattern generator
// with the multiplier under test, at the design's default sizes.
//
// A cycle-accurate reference model kept in the testbench (binary count ->
// Gray code by table, one-hot by shifting, pattern by integer addition mod
// 256) is advanced on every rising edge. At each falling edge the pattern,
// the multiplier's response and three internal nodes (the Gray code,
// Register B and the adder carry, read hierarchically) are compared with
// it. The response is checked against the product of the pattern's nibbles
// worked out here: the "compare with the expected response" step of a
// self-test.
//
// The run covers two full pattern periods (2 x 2048 cycles) and a reset in
// the middle. Counted mechanisms, each of which must occur: counter
// wrap-around (100 -> 000), adder overflow (carry out), mid-run reset and a
// full pattern period (the generator returning, 2048 cycles later, to the
// state it had 8 cycles after reset; the all-zero reset state itself is not
// on the cycle). The number of distinct patterns seen is printed.
module tpg_top_tb;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] a_out, product;
  logic [2:0] gray;
  logic [7:0] b_out;
  logic       carry;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_carry = 0, n_reset = 0, n_period = 0;

  localparam logic [2:0] GRAY [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                      3'b110, 3'b111, 3'b101, 3'b100};
  localparam int PERIOD = 8 * 256;

  // reference model state
  int unsigned m_cnt, m_b, m_a, m_steps;
  bit          seen [256];
  int unsigned ref_state;

  tpg_top dut (.clk, .rst, .a_out, .product);

  // internal nodes observed hierarchically
  assign gray  = dut.gray;
  assign b_out = dut.b_out;
  assign carry = dut.carry;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst) begin
      m_cnt = 0; m_b = 0; m_a = 0; m_steps = 0;
    end else begin
      m_a   = (m_a + m_b) % 256;
      m_b   = 1 << GRAY[m_cnt];
      m_cnt = (m_cnt + 1) % 8;
      m_steps++;
    end
  end

  task automatic expect_eq(input int unsigned got, input int unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL step %0d %s: got %0d expected %0d", m_steps, what, got, exp);
    end
  endtask

  task automatic check_all();
    int unsigned x, y;
    expect_eq(32'(gray), 32'(GRAY[m_cnt]), "gray");
    expect_eq(32'(b_out), m_b, "b_out");
    expect_eq(32'(a_out), m_a, "a_out (pattern)");
    expect_eq(32'(carry), 32'((m_a + m_b) > 255), "carry");
    x = m_a / 16;
    y = m_a % 16;
    expect_eq(32'(product), (x * y) % 256, "multiplier response");
  endtask

  task automatic run(input int n);
    logic [2:0] prev_gray;
    for (int k = 0; k < n; k++) begin
      prev_gray = gray;
      if (carry) n_carry++;
      @(negedge clk);
      if (prev_gray == 3'b100 && gray == 3'b000) n_wrap++;
      check_all();
      seen[a_out] = 1'b1;
      if (m_steps == 8) ref_state = {gray, b_out, a_out};
      if (m_steps > 8 && m_steps % PERIOD == 8) begin
        // one full period later the generator is back in the same state
        n_period++;
        expect_eq(32'({gray, b_out, a_out}), ref_state, "state one period later");
      end
    end
  endtask

  initial begin
    int distinct;
    repeat (2) @(negedge clk);
    check_all();
    expect_eq(32'({gray, b_out, a_out}), 0, "state after reset");
    rst = 1'b0;
    run(PERIOD + 300);
    rst = 1'b1;
    n_reset++;
    @(negedge clk);
    check_all();
    expect_eq(32'({gray, b_out, a_out}), 0, "state after mid-run reset");
    rst = 1'b0;
    run(PERIOD + 10);
    distinct = 0;
    foreach (seen[i]) if (seen[i]) distinct++;
    $display("patterns: %0d distinct values; wraps=%0d carries=%0d resets=%0d periods=%0d",
             distinct, n_wrap, n_carry, n_reset, n_period);
    checks++; if (n_wrap   == 0) begin failures++; $display("FAIL no counter wrap"); end
    checks++; if (n_carry  == 0) begin failures++; $display("FAIL no adder overflow"); end
    checks++; if (n_reset  == 0) begin failures++; $display("FAIL no mid-run reset"); end
    checks++; if (n_period == 0) begin failures++; $display("FAIL no full period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
