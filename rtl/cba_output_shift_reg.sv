// Output shift register of the serial complex binary adder.
//
// Collects the sum digits that the adder produces, least significant digit
// first. Each new digit enters at the top and the word moves one place
// towards bit 0, so after WIDTH shifts the first digit sits in bit 0 and the
// word reads as an ordinary base (-1+j) number: bit k is the coefficient of
// (-1+j)^k. Digits beyond WIDTH push the earliest ones out; a full-width
// addition therefore shifts exactly WIDTH times.
//
// Timing: with shift high, serial_in is taken at the rising edge. clear
// empties the register at the rising edge and wins over shift.
module cba_output_shift_reg #(
  parameter int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift,
  input  logic             serial_in,
  output logic [WIDTH-1:0] word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     word <= '0;
    else if (clear) word <= '0;
    else if (shift) word <= {serial_in, word[WIDTH-1:1]};
  end

endmodule
