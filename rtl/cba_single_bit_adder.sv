// Single-bit adder of the serial complex binary adder.
//
// Adds the two current operand digits a and b and presents the sum (0, 1 or
// 2) as a one-hot select of one of the three state/output memory banks:
// sel[0] for 0+0, sel[1] for 0+1 or 1+0, sel[2] for 1+1. It does not add the
// carry; the carry lives in the state machine. The same sum is also given as
// an encoded bank number for the memory address.
//
// Purely combinational. Three select lines labelled 0, 1 and 2 follow the
// functional diagram of the adder; the gates chosen are this design's own.
module cba_single_bit_adder
  import cba_pkg::*;
(
  input  logic       a,     // current digit of operand A
  input  logic       b,     // current digit of operand B
  output logic [2:0] sel,   // one-hot bank select
  output bank_e      bank   // same select, encoded
);

  always_comb begin
    sel[0] = ~a & ~b;
    sel[1] =  a ^  b;
    sel[2] =  a &  b;
    unique case (1'b1)
      sel[2]:  bank = BANK_SUM2;
      sel[1]:  bank = BANK_SUM1;
      default: bank = BANK_SUM0;
    endcase
  end

  // Exactly one bank is selected for every pair of input digits.
  always_comb assert ($onehot(sel));

endmodule
