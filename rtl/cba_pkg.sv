// Shared types and constants of the serial (-1+j)-base complex binary adder.
//
// A number in base (-1+j) is a string of binary digits d_k whose value is
// sum d_k * (-1+j)^k; one string carries both the real and the imaginary
// part. The adder takes two such strings one digit per clock, least
// significant digit first, and is a 16-state machine whose state is the
// carry still to be added into the higher digits.
//
// The state is 4 bits and each state/output memory word is one byte with
// the output digit in bit 7 and the next state in bits 3:0, as in the
// state table this design follows. The bank-select encoding of the digit
// sum and the default operand width are this design's choices.
package cba_pkg;

  // Default operand width in digits (the reference implementation adds two
  // 32-digit numbers).
  localparam int unsigned DEFAULT_WIDTH = 32;

  // Number of states of the machine, and of locations in each memory bank.
  localparam int unsigned NUM_STATES = 16;

  // Current/next state: the carry from the previous digit addition.
  typedef logic [3:0] state_t;

  // Sum of the two current input digits; it selects one of the three banks.
  typedef enum logic [1:0] {
    BANK_SUM0 = 2'd0,   // 0+0      -> bank 1
    BANK_SUM1 = 2'd1,   // 0+1, 1+0 -> bank 2
    BANK_SUM2 = 2'd2    // 1+1 (adds 1100 in base -1+j) -> bank 3
  } bank_e;

  // One byte of the state/output memory.
  typedef struct packed {
    logic       out_bit;   // sum digit produced by this transition
    logic [2:0] unused;    // always zero
    state_t     next;      // next state
  } entry_t;

endpackage
