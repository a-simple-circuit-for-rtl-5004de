// Current state register of the serial complex binary adder.
//
// Four flip-flops that hold the state of the adder, which is the carry from
// the previous digit addition. On each enabled clock it takes the next state
// read from the state/output memory. An addition must begin in state 0 (no
// carry): rst_n clears it asynchronously and clear empties it synchronously
// before a new addition; clear wins over load.
//
// The 4-bit width follows the functional diagram; reset and clear are this
// design's choices.
module cba_current_state_register
  import cba_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,   // asynchronous reset to state 0
  input  logic   clear,   // synchronous return to state 0
  input  logic   load,    // take next_state on this clock
  input  state_t next_state,
  output state_t state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= '0;
    else if (clear)  state <= '0;
    else if (load)   state <= next_state;
  end

endmodule
