// Testbench for cba_state_output_memory. Each state stands for a carry,
// given here as a Gaussian integer (the carry column of the state table read
// in base (-1+j)). For every state and digit sum s the expected sum digit
// and next carry are worked out with integer arithmetic: r = carry + s,
// digit = parity of Re(r)+Im(r), next carry = (r - digit)/(-1+j). The memory
// word must carry that digit and name a state holding that next carry.
module cba_state_output_memory_tb;
  import cba_pkg::*;

  bank_e  bank;
  state_t state;
  entry_t data;
  int checks = 0, failures = 0;

  // Carry of each state as (re, im).
  localparam int CARRY_RE [16] = '{0, -1, 0, 1, 0, -1, 1, -1, 0, -1, 1, 0, -1, -2, -2, 1};
  localparam int CARRY_IM [16] = '{0, -1, 1, 0, -1, 0, 1, -2, 2, 1, -1, -2, 1, -1, 0, 2};

  cba_state_output_memory dut (.bank(bank), .state(state), .data(data));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int re, im, d, nre, nim;
    for (int st = 0; st < 16; st++) begin
      for (int s = 0; s < 3; s++) begin
        state = state_t'(st);
        bank  = bank_e'(s);
        #1;
        re = CARRY_RE[st] + s;
        im = CARRY_IM[st];
        d  = ((re + im) % 2 != 0) ? 1 : 0;
        re -= d;
        nre = (im - re) / 2;
        nim = (-re - im) / 2;
        checks++;
        if (int'(data.out_bit) != d) begin
          failures++;
          $display("FAIL state %0d sum %0d: digit %0d, expected %0d", st, s, data.out_bit, d);
        end
        checks++;
        if (CARRY_RE[data.next] != nre || CARRY_IM[data.next] != nim) begin
          failures++;
          $display("FAIL state %0d sum %0d: next %0d, expected carry %0d re, %0d im", st, s, data.next, nre, nim);
        end
        checks++;
        if (data.unused != 3'b000) begin
          failures++;
          $display("FAIL state %0d sum %0d: spare bits %b", st, s, data.unused);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
