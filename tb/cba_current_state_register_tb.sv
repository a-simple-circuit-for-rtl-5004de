// Testbench for cba_current_state_register: random clear/load/next_state
// against a reference model, plus an asynchronous reset in mid-run.
module cba_current_state_register_tb;
  import cba_pkg::*;

  logic   clk = 0, rst_n = 0, clear = 0, load = 0;
  state_t next_state = '0, state, model;
  int checks = 0, failures = 0;

  cba_current_state_register dut (.*);

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
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (state != model) begin
        failures++;
        $display("FAIL cycle %0d: state %0d expected %0d", i, state, model);
      end
      clear      = ($urandom_range(0, 7) == 0);
      load       = $urandom_range(0, 1) == 1;
      next_state = state_t'($urandom);
      if (clear)     model = '0;
      else if (load) model = next_state;
      if (i == 250) begin
        // Asynchronous reset between edges.
        clear = 0; load = 0;
        #1 rst_n = 0;
        #1;
        checks++;
        if (state != '0) begin
          failures++;
          $display("FAIL asynchronous reset: state %0d", state);
        end
        rst_n = 1;
        model = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
