// Testbench for cba_input_shift_reg: after a load the digits must come out
// least significant first, one per shift, followed by zeros; a cycle
// without shift must hold the current digit.
module cba_input_shift_reg_tb;
  localparam int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH;  // the block's default width

  logic             clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [WIDTH-1:0] load_data = '0;
  logic             serial_out;
  int checks = 0, failures = 0;

  cba_input_shift_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] word;
    int pos;
    logic expected;
    #12 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      word = WIDTH'($urandom);
      @(negedge clk);
      load = 1; load_data = word; shift = 0;
      @(negedge clk);
      load = 0;
      pos = 0;
      while (pos < WIDTH + 4) begin
        shift = ($urandom_range(0, 3) != 0);
        expected = (pos < WIDTH) ? word[pos] : 1'b0;
        checks++;
        if (serial_out != expected) begin
          failures++;
          $display("FAIL word %h digit %0d: %0b", word, pos, serial_out);
        end
        @(negedge clk);
        if (shift) pos++;
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
