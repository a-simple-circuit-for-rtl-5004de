// Input shift register of the serial complex binary adder.
//
// Takes an operand word from its input memory and hands it to the adder one
// digit per clock, least significant digit first. Each shift moves the word
// one place towards bit 0 and fills the top with a zero, so once the operand
// has been shifted out the adder sees high-order zero digits, which is the
// padding a trailing carry needs.
//
// Timing: load copies load_data at the rising edge (load wins over shift);
// shift moves the word at the rising edge. serial_out is bit 0 of the
// register, i.e. the digit the adder consumes in the current cycle.
module cba_input_shift_reg #(
  parameter int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_data,
  input  logic             shift,
  output logic             serial_out
);

  logic [WIDTH-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr_q <= '0;
    else if (load)  sr_q <= load_data;
    else if (shift) sr_q <= {1'b0, sr_q[WIDTH-1:1]};
  end

  assign serial_out = sr_q[0];

endmodule
