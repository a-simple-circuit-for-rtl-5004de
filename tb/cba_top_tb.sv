// End-to-end testbench for cba_top at its default width (32 digits).
//
// Writes operands into the two input memories, starts an addition and
// compares the result word with the low 32 digits of the reference sum,
// worked out on Gaussian integers. Cases:
//   - 1 + 1 = 1100 (2), 2 + (-j) = 111011 (2 - j), and its serial digit
//     stream as it leaves the adder, least significant digit first;
//   - the zero rule 11 + 111 = 0 (j + -j);
//   - 2004 + j2004 (a 28-digit operand) plus small numbers;
//   - random operands of up to 24 digits: the sum is always complete and no
//     carry may be left in carry_state;
//   - random operands of 32 digits: the true sum may be longer; carry_state
//     must then be non-zero, and zero otherwise;
//   - the same operands added again without rewriting the memories;
//   - a start pulse during an addition, which must be ignored.
// Each addition must raise done exactly WIDTH+1 clocks after start is
// sampled (one clock to load, then one digit per clock). The testbench also
// counts how often each mechanism happened (carry left beyond the word, zero
// rule, every one of the 16 states entered, restart ignored, operand reuse)
// and fails if one never did.
module cba_top_tb;
  import cba_tb_pkg::*;

  localparam int unsigned W = 32;

  logic         clk = 0, rst_n = 0;
  logic         wr_a_en = 0, wr_b_en = 0, start = 0;
  logic [W-1:0] wr_a_data = '0, wr_b_data = '0;
  logic         busy, done, sum_bit, sum_bit_valid;
  logic [W-1:0] sum;
  logic [3:0]   carry_state;

  cba_top dut (.*);

  int checks = 0, failures = 0;
  int n_overflow = 0, n_zero_rule = 0, n_restart_ignored = 0, n_reuse = 0;
  int state_seen [16];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy) state_seen[carry_state]++;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic write_ops(input logic [W-1:0] x, input logic [W-1:0] y);
    @(negedge clk);
    wr_a_en = 1; wr_a_data = x;
    wr_b_en = 1; wr_b_data = y;
    @(negedge clk);
    wr_a_en = 0; wr_b_en = 0;
    wr_a_data = '0; wr_b_data = '0;
  endtask

  // Starts an addition and waits for done; checks latency. Collects the
  // serial digit stream. With poke set, pulses start again mid-addition.
  task automatic run_add(input bit poke, output logic [W-1:0] stream);
    int cycles = 0, k = 0;
    stream = '0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      if (sum_bit_valid) begin
        stream[k] = sum_bit;
        k++;
      end
      if (poke && cycles == W / 2) begin
        start = 1;
        n_restart_ignored++;
      end else begin
        start = 0;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 4 * W) break;
    end
    start = 0;
    checks++;
    if (cycles != W + 1) fail($sformatf("done after %0d clocks, expected %0d", cycles, W + 1));
    checks++;
    if (k != W) fail($sformatf("%0d serial digits, expected %0d", k, W));
    checks++;
    if (busy) fail("still busy at done");
  endtask

  task automatic check_add(input logic [W-1:0] x, input logic [W-1:0] y,
                           input bit rewrite, input bit poke, input string what);
    digits_t exp;
    int len;
    logic [W-1:0] stream;
    if (rewrite) write_ops(x, y);
    run_add(poke, stream);
    exp = cbn_encode(gauss_add(cbn_value(64'(x)), cbn_value(64'(y))), len);
    checks++;
    if (sum != exp[W-1:0]) fail($sformatf("%s: %h + %h = %h, expected %h", what, x, y, sum, exp[W-1:0]));
    checks++;
    if (stream != sum) fail($sformatf("%s: serial stream %h differs from word %h", what, stream, sum));
    checks++;
    if ((len > int'(W)) != (carry_state != 0))
      fail($sformatf("%s: sum has %0d digits but carry_state=%0d", what, len, carry_state));
    if (len > int'(W)) n_overflow++;
    if (x != 0 && y != 0 && len == 0) n_zero_rule++;
    if (!rewrite) n_reuse++;
  endtask

  initial begin
    logic [W-1:0] x, y, stream;
    logic [W-1:0] big;
    big = '0;
    foreach (big[i]) if (i inside {27, 26, 25, 23, 15, 14, 13, 11, 10, 9, 6, 5}) big[i] = 1'b1;

    #12 rst_n = 1;

    // Reference operand 2004 + j2004.
    begin
      gauss_t v;
      v = cbn_value(64'(big));
      checks++;
      if (v.re != 2004 || v.im != 2004) fail($sformatf("2004+j2004 encodes %0d,%0d", v.re, v.im));
    end

    // 1 + 1 = 1100.
    check_add(32'h1, 32'h1, 1, 0, "1 + 1");
    checks++;
    if (sum != 32'b1100) fail($sformatf("1 + 1 = %b", sum));

    // 2 + (-j) = 111011, also watched on the serial output.
    write_ops(32'hC, 32'h7);
    run_add(0, stream);
    checks++;
    if (sum != 32'b111011) fail($sformatf("2 + -j = %b", sum));
    checks++;
    if (stream[5:0] != 6'b111011 || stream[W-1:6] != '0) fail($sformatf("2 + -j stream %b", stream));

    // Zero rule.
    check_add(32'b11, 32'b111, 1, 0, "zero rule");
    checks++;
    if (sum != '0) fail("11 + 111 is not zero");

    check_add(big, 32'h0, 1, 0, "2004+j2004 + 0");
    check_add(big, 32'hC, 1, 0, "2004+j2004 + 2");
    check_add(big, 32'h7, 1, 0, "2004+j2004 + -j");
    check_add(big, 32'h7, 0, 0, "2004+j2004 + -j again");
    check_add(big, big, 1, 0, "2004+j2004 doubled");

    // 1001011 + 1001011 walks the longest carry chain, through the 8-digit
    // carries (states 7 and 13) to state 15.
    check_add(32'h4B, 32'h4B, 1, 0, "long carry");

    // Random operands of up to 24 digits: complete sums.
    for (int t = 0; t < 200; t++) begin
      x = W'($urandom) & 32'h00FF_FFFF;
      y = W'($urandom) & 32'h00FF_FFFF;
      check_add(x, y, 1, (t % 50) == 7, "24-digit");
      checks++;
      if (carry_state != 0) fail("carry left after 24-digit operands");
      if (t % 40 == 3) check_add(x, y, 0, 0, "24-digit again");
    end

    // Random operands of 32 digits: carries may run past the word.
    for (int t = 0; t < 200; t++) begin
      x = W'($urandom);
      y = W'($urandom);
      check_add(x, y, 1, 0, "32-digit");
    end

    // Negation pairs: x + (-x) = 0.
    for (int t = 0; t < 20; t++) begin
      digits_t nx;
      gauss_t v;
      int len;
      x = W'($urandom) & 32'h0000_FFFF;
      v = cbn_value(64'(x));
      nx = cbn_encode('{-v.re, -v.im}, len);
      if (len <= int'(W) && x != 0) check_add(x, W'(nx), 1, 0, "x + -x");
    end

    $display("mechanisms: overflow=%0d zero_rule=%0d restart_ignored=%0d reuse=%0d",
             n_overflow, n_zero_rule, n_restart_ignored, n_reuse);
    checks++; if (n_overflow == 0) fail("no carry ever ran past the word");
    checks++; if (n_zero_rule == 0) fail("zero rule never happened");
    checks++; if (n_restart_ignored == 0) fail("no start during an addition");
    checks++; if (n_reuse == 0) fail("operands never reused");
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (state_seen[s] == 0) fail($sformatf("state %0d never entered", s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
