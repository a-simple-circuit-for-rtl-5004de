// Testbench for cba_output_shift_reg: WIDTH digits shifted in (with idle
// cycles between them) must form the word with the first digit in bit 0;
// clear must empty it.
module cba_output_shift_reg_tb;
  localparam int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH;  // the block's default width

  logic             clk = 0, rst_n = 0, clear = 0, shift = 0, serial_in = 0;
  logic [WIDTH-1:0] word;
  int checks = 0, failures = 0;

  cba_output_shift_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] sent;
    int n;
    #12 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      sent = WIDTH'($urandom);
      n = 0;
      while (n < WIDTH) begin
        @(negedge clk);
        shift = ($urandom_range(0, 3) != 0);
        serial_in = shift ? sent[n] : 1'($urandom);
        if (shift) n++;
      end
      @(negedge clk);
      shift = 0;
      checks++;
      if (word != sent) begin
        failures++;
        $display("FAIL word %h expected %h", word, sent);
      end
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (word != '0) begin
        failures++;
        $display("FAIL clear left %h", word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
