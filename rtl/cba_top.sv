// Serial adder for complex numbers in base (-1+j).
//
// Two operands, each a WIDTH-digit number in base (-1+j), are written into
// input memories A and B. A start pulse copies them into the input shift
// registers, puts the adder core in state 0 (no carry) and empties the
// output shift register. For the next WIDTH clocks the shift registers feed
// one digit of each operand per clock, least significant first, into the
// adder core, and each sum digit it produces is shifted into the output
// shift register. After WIDTH clocks the sum is in sum[] and done pulses.
//
// The sum is the low WIDTH digits of A+B. A carry that is still pending after
// the last digit is not added anywhere: it stays visible in carry_state
// (non-zero means the true sum is longer than WIDTH digits). A carry may be
// up to 8 digits long, so operands of at most WIDTH-8 digits always give the
// complete sum.
//
// Interface and timing:
//   wr_a_en/wr_a_data, wr_b_en/wr_b_data  write an operand (one clock).
//   start  sampled when idle (busy low); ignored while busy.
//   busy   high from the clock after start until the last digit is added.
//   sum_bit / sum_bit_valid  the digit the core produces in each clock,
//          for watching the result leave the adder serially.
//   done   one-clock pulse that rises with the (WIDTH+1)-th rising edge,
//          counting the edge that samples start; sum and carry_state are
//          valid from then until the next start is sampled.
// The block structure (input memories, shift registers, single-bit adder,
// state/output memory, current state register, output shift register, one
// master clock) follows the adder's functional diagram. The start/busy/done
// sequencing, the host write ports and the carry_state output are this
// design's own.
module cba_top
  import cba_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             clk,            // master clock
  input  logic             rst_n,          // asynchronous active-low reset
  input  logic             wr_a_en,
  input  logic [WIDTH-1:0] wr_a_data,
  input  logic             wr_b_en,
  input  logic [WIDTH-1:0] wr_b_data,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             sum_bit,
  output logic             sum_bit_valid,
  output logic [WIDTH-1:0] sum,
  output logic [3:0]       carry_state
);

  typedef enum logic {IDLE, RUN} phase_e;

  localparam int unsigned CW = $clog2(WIDTH + 1);

  phase_e          phase_q;
  logic [CW-1:0]   count_q;     // digits added so far in this addition
  logic            done_q;
  logic            launch;      // start accepted this clock
  logic            step;        // one digit added this clock
  logic [WIDTH-1:0] mem_a, mem_b;
  logic            bit_a, bit_b;
  state_t          state;

  assign launch = (phase_q == IDLE) && start;
  assign step   = (phase_q == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= IDLE;
      count_q <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (launch) begin
        phase_q <= RUN;
        count_q <= '0;
      end else if (step) begin
        if (count_q == CW'(WIDTH - 1)) begin
          phase_q <= IDLE;
          done_q  <= 1'b1;
        end
        count_q <= count_q + 1'b1;
      end
    end
  end

  cba_input_memory #(.WIDTH(WIDTH)) u_mem_a (
    .clk (clk), .rst_n (rst_n), .wr_en (wr_a_en), .wr_data (wr_a_data), .rd_data (mem_a)
  );

  cba_input_memory #(.WIDTH(WIDTH)) u_mem_b (
    .clk (clk), .rst_n (rst_n), .wr_en (wr_b_en), .wr_data (wr_b_data), .rd_data (mem_b)
  );

  cba_input_shift_reg #(.WIDTH(WIDTH)) u_sr_a (
    .clk (clk), .rst_n (rst_n), .load (launch), .load_data (mem_a),
    .shift (step), .serial_out (bit_a)
  );

  cba_input_shift_reg #(.WIDTH(WIDTH)) u_sr_b (
    .clk (clk), .rst_n (rst_n), .load (launch), .load_data (mem_b),
    .shift (step), .serial_out (bit_b)
  );

  cba_adder_core u_core (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (launch),
    .en      (step),
    .a       (bit_a),
    .b       (bit_b),
    .sum_bit (sum_bit),
    .state   (state)
  );

  cba_output_shift_reg #(.WIDTH(WIDTH)) u_out_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (launch),
    .shift     (step),
    .serial_in (sum_bit),
    .word      (sum)
  );

  assign busy          = (phase_q == RUN);
  assign done          = done_q;
  assign sum_bit_valid = step;
  assign carry_state   = state;

  // An addition never runs past WIDTH digits.
  assert property (@(posedge clk) step |-> count_q < CW'(WIDTH));

endmodule
