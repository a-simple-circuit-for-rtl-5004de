// Testbench for cba_single_bit_adder: all four pairs of input digits must
// select the bank of their arithmetic sum (0, 1 or 2), one-hot and encoded.
module cba_single_bit_adder_tb;
  import cba_pkg::*;

  logic       a, b;
  logic [2:0] sel;
  bank_e      bank;
  int checks = 0, failures = 0;

  cba_single_bit_adder dut (.a(a), .b(b), .sel(sel), .bank(bank));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      s = int'(a) + int'(b);
      checks++;
      if (sel != 3'(1 << s)) begin
        failures++;
        $display("FAIL a=%0b b=%0b sel=%b", a, b, sel);
      end
      checks++;
      if (int'(bank) != s) begin
        failures++;
        $display("FAIL a=%0b b=%0b bank=%0d", a, b, bank);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
