// Testbench for cba_input_memory: random writes with and without wr_en; the
// stored word must change only on an enabled write and survive otherwise.
module cba_input_memory_tb;
  localparam int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH;  // the block's default width

  logic             clk = 0, rst_n = 0, wr_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data, model;
  int checks = 0, failures = 0;

  cba_input_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (rd_data != model) begin
        failures++;
        $display("FAIL cycle %0d: %h expected %h", i, rd_data, model);
      end
      wr_en   = ($urandom_range(0, 3) == 0);
      wr_data = WIDTH'($urandom);
      if (wr_en) model = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
