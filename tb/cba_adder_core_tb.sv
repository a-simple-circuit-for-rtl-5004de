// Testbench for cba_adder_core, the serial (-1+j)-base adder.
//  1. 1 + 1 from state 0: states 0,1,2,3,0 and sum digits 0,0,1,1 (= 1100,
//     which is 2).
//  2. 2 + (-j): 1100 + 111 must give 111011 (= 2 - j).
//  3. 11 + 111 (j + -j) must give 0 and return to state 0.
//  4. Random operands of up to 24 digits, 32 clocks each: the 32 sum digits
//     must equal the encoding of the Gaussian-integer sum, and the machine
//     must end in state 0.
// One digit per clock: each check compares the digit produced in the clock
// in which its operand digits are presented.
module cba_adder_core_tb;
  import cba_pkg::*;
  import cba_tb_pkg::*;

  localparam int unsigned N = 32;

  logic   clk = 0, rst_n = 0, clear = 0, en = 0, a = 0, b = 0;
  logic   sum_bit;
  state_t state;
  int checks = 0, failures = 0;

  cba_adder_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Adds x and y over N clocks starting from state 0; returns the digits.
  task automatic add_serial(input digits_t x, input digits_t y, output digits_t s);
    s = '0;
    @(negedge clk);
    clear = 1; en = 0;
    @(negedge clk);
    clear = 0;
    for (int k = 0; k < N; k++) begin
      en = 1; a = x[k]; b = y[k];
      #1 s[k] = sum_bit;
      @(negedge clk);
    end
    en = 0;
  endtask

  task automatic check_sum(input digits_t x, input digits_t y, input string what);
    digits_t got, exp;
    int len;
    add_serial(x, y, got);
    exp = cbn_encode(gauss_add(cbn_value(x), cbn_value(y)), len);
    checks++;
    if (got[N-1:0] != exp[N-1:0]) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, x, y, got[N-1:0], exp[N-1:0]);
    end
    checks++;
    if (state != '0) begin
      failures++;
      $display("FAIL %s: carry state %0d left over", what, state);
    end
  endtask

  initial begin
    state_t exp_state [5] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd0};
    logic   exp_digit [4] = '{1'b0, 1'b0, 1'b1, 1'b1};
    digits_t x, y;
    #12 rst_n = 1;

    // 1. 1 + 1, state by state.
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (state != exp_state[k]) begin
        failures++;
        $display("FAIL 1+1 step %0d: state %0d expected %0d", k, state, exp_state[k]);
      end
      en = 1; a = (k == 0); b = (k == 0);
      #1;
      checks++;
      if (sum_bit != exp_digit[k]) begin
        failures++;
        $display("FAIL 1+1 step %0d: digit %0b", k, sum_bit);
      end
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (state != exp_state[4]) begin
      failures++;
      $display("FAIL 1+1 end: state %0d", state);
    end

    // 2. 2 + (-j) = 2 - j.
    begin
      digits_t got;
      add_serial(64'hC, 64'h7, got);
      checks++;
      if (got[N-1:0] != 32'b111011) begin
        failures++;
        $display("FAIL 2 + -j = %b", got[N-1:0]);
      end
    end

    // 3. Zero rule and the rest against the reference.
    check_sum(64'b11, 64'b111, "zero rule");
    check_sum(64'hC, 64'h7, "2 + -j");
    for (int t = 0; t < 300; t++) begin
      x = 64'($urandom) & 64'hFF_FFFF;
      y = 64'($urandom) & 64'hFF_FFFF;
      check_sum(x, y, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
