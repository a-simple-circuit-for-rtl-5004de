// State and output memory of the serial complex binary adder.
//
// Three banks of 16 bytes hold the whole logic of the adder. The bank is
// chosen by the sum of the two current input digits (bank 1 for 0+0, bank 2
// for 0+1 or 1+0, bank 3 for 1+1) and the location within the bank by the
// current state. The byte read gives the sum digit for this position (bit 7)
// and the next state (bits 3:0).
//
// How the contents arise: each state stands for a carry c, a Gaussian integer
// written in base (-1+j). Adding the digit sum s gives r = c + s; the output
// digit is the parity of Re(r)+Im(r), and the next carry is (r - digit)/(-1+j)
// (the sum shifted right one digit). States 9 and 12 hold the same carry,
// -1+j; one of them is redundant and only fills the 16th location. The
// contents below are the published state table, byte for byte.
//
// Read is asynchronous: data follows bank/state in the same cycle, so the
// memory access sits in the path that the current state register closes.
// The one-hot select of the single-bit adder is taken here in encoded form.
module cba_state_output_memory
  import cba_pkg::*;
(
  input  bank_e  bank,    // which bank: digit sum 0, 1 or 2
  input  state_t state,   // current state = location within the bank
  output entry_t data     // {output digit, 3'b000, next state}
);

  // Row = location (current state); columns = bank 1, bank 2, bank 3.
  localparam logic [7:0] TABLE [NUM_STATES][3] = '{
    '{8'h00, 8'h80, 8'h01},   // 00  carry 0
    '{8'h02, 8'h82, 8'h05},   // 01  carry 0110     = -1-j
    '{8'h83, 8'h04, 8'h84},   // 02  carry 0011     = j
    '{8'h80, 8'h01, 8'h81},   // 03  carry 0001     = 1
    '{8'h82, 8'h05, 8'h85},   // 04  carry 0111     = -j
    '{8'h86, 8'h00, 8'h80},   // 05  carry 11101    = -1
    '{8'h04, 8'h84, 8'h07},   // 06  carry 1110     = 1+j
    '{8'h88, 8'h09, 8'h89},   // 07  carry 11101001 = -1-2j
    '{8'h0A, 8'h8A, 8'h0B},   // 08  carry 1110100  = 2j
    '{8'h03, 8'h83, 8'h04},   // 09  carry 0010     = -1+j
    '{8'h05, 8'h85, 8'h0D},   // 10  carry 111010   = 1-j
    '{8'h0C, 8'h8C, 8'h0E},   // 11  carry 0100     = -2j
    '{8'h03, 8'h83, 8'h04},   // 12  carry 0010     = -1+j (redundant)
    '{8'h8F, 8'h02, 8'h82},   // 13  carry 11101011 = -2-j
    '{8'h06, 8'h86, 8'h00},   // 14  carry 11100    = -2
    '{8'h8A, 8'h0B, 8'h8B}    // 15  carry 1110101  = 1+2j
  };

  always_comb begin
    unique case (bank)
      BANK_SUM1: data = entry_t'(TABLE[state][1]);
      BANK_SUM2: data = entry_t'(TABLE[state][2]);
      default:   data = entry_t'(TABLE[state][0]);
    endcase
  end

endmodule
