// Input memory of the serial complex binary adder (one per operand).
//
// Holds one operand, a WIDTH-digit number in base (-1+j), written in one
// cycle by the host and read as a whole word by the input shift register at
// the start of an addition. The stored word keeps its value until the next
// write, so the same operand can be added again. Digit k of the word is the
// coefficient of (-1+j)^k.
//
// Timing: a write (wr_en high) takes effect at the rising edge; rd_data shows
// the stored word from the next cycle on. Reset clears the word to zero. The
// word-wide write port is this design's choice; the operand width follows
// the 32-digit reference implementation.
module cba_input_memory #(
  parameter int unsigned WIDTH = cba_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mem_q <= '0;
    else if (wr_en) mem_q <= wr_data;
  end

  assign rd_data = mem_q;

endmodule
