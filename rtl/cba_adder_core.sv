// Serial (-1+j)-base adder core: the state machine.
//
// Adds two complex binary numbers one digit per clock, least significant
// digit first. The single-bit adder turns the two current digits into a bank
// select, the state/output memory read at {bank, current state} gives the sum
// digit and the next state, and the current state register keeps the carry
// for the next digit. No carry is computed with gates: all of the carry logic
// is in the memory contents. The core knows nothing of operand length, so
// operands must carry enough high-order zero digits for the final carry to
// run out (a carry can be up to 8 digits long).
//
// Timing: sum_bit is combinational from a, b and the current state and is
// valid during the cycle in which a and b are presented; the state advances
// at the rising clock edge when en is high. clear puts the machine back in
// state 0 (no carry) at the next edge and takes precedence over en. The
// structure follows the adder's functional diagram; clear and en are this
// design's own.
module cba_adder_core
  import cba_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,     // asynchronous reset to state 0
  input  logic   clear,     // synchronous return to state 0
  input  logic   en,        // consume a and b on this clock
  input  logic   a,         // current digit of operand A
  input  logic   b,         // current digit of operand B
  output logic   sum_bit,   // sum digit for the current position
  output state_t state      // current state (carry still pending)
);

  logic [2:0] sel;
  bank_e      bank;
  entry_t     entry;

  cba_single_bit_adder u_bit_adder (
    .a    (a),
    .b    (b),
    .sel  (sel),
    .bank (bank)
  );

  cba_state_output_memory u_memory (
    .bank  (bank),
    .state (state),
    .data  (entry)
  );

  cba_current_state_register u_state_reg (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .load       (en),
    .next_state (entry.next),
    .state      (state)
  );

  assign sum_bit = entry.out_bit;

  // The one-hot select and the encoded bank must name the same bank, and the
  // three spare bits of every memory word are zero.
  always_comb assert (sel[bank]);
  always_comb assert (entry.unused == 3'b000);

endmodule
