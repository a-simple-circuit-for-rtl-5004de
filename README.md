# Serial adder for complex numbers in base (−1+j)

Every Gaussian integer a + jb can be written as a single string of binary
digits in base (−1+j): the digit string d_n … d_1 d_0 stands for
Σ d_k·(−1+j)^k. One string holds both the real and the imaginary part, so
one addition of two such strings replaces the two separate additions that
a real/imaginary pair needs. This RTL adds two such numbers serially, one
digit per clock, least significant digit first. No adder gates are used: a
16-state machine whose logic is a 48-byte lookup memory does the work.

A few values make the number system concrete:

| value      | base (−1+j) digits |
|------------|--------------------|
| 1          | 1                  |
| 2          | 1100               |
| −1         | 11101              |
| j          | 11                 |
| −j         | 111                |
| 2 − j      | 111011             |
| 2004 + j2004 | 1110 1000 0000 1110 1110 0110 0000 (28 digits, hex 0E80EE60) |

Two rules give the flavour of the arithmetic. First, 1 + 1 = 1100, so a
carry out of one position lands two and three positions higher, not in the
next one. Second, 11 + 111 = 0 (j + (−j)), so carries can also cancel.

## Carries as states

In base 2 the carry into the next position is 0 or 1. In base (−1+j) the
amount still owed to the higher positions is itself a short digit string.
It can be up to 8 digits long, such as 11101001 = −1−2j. The adder keeps
that pending carry as its **state**. There are only 15 distinct carries
that can ever arise. Each one gets a 4-bit state number, and a 16th
location is filled by a duplicate.

One step of the machine works like this:

1. Take the carry c of the current state, as a Gaussian integer.
2. Add s, the sum of the two input digits. s is 0, 1 or 2, and 2 is the
   digit string 1100.
3. The output digit is the low digit of r = c + s. That digit is the parity
   of Re(r) + Im(r).
4. The next carry is (r − digit)/(−1+j). This is r shifted right by one
   digit.

Worked out for all states, this gives the following machine. It is exactly
what the memory holds. Entries are *next state / output digit*.

| state | carry (digits) | carry (value) | s = 0 | s = 1 | s = 2 |
|------:|---------------:|:-------------:|:-----:|:-----:|:-----:|
| 0  | 0        | 0      | 0/0  | 0/1  | 1/0  |
| 1  | 0110     | −1−j   | 2/0  | 2/1  | 5/0  |
| 2  | 0011     | j      | 3/1  | 4/0  | 4/1  |
| 3  | 0001     | 1      | 0/1  | 1/0  | 1/1  |
| 4  | 0111     | −j     | 2/1  | 5/0  | 5/1  |
| 5  | 11101    | −1     | 6/1  | 0/0  | 0/1  |
| 6  | 1110     | 1+j    | 4/0  | 4/1  | 7/0  |
| 7  | 11101001 | −1−2j  | 8/1  | 9/0  | 9/1  |
| 8  | 1110100  | 2j     | 10/0 | 10/1 | 11/0 |
| 9  | 0010     | −1+j   | 3/0  | 3/1  | 4/0  |
| 10 | 111010   | 1−j    | 5/0  | 5/1  | 13/0 |
| 11 | 0100     | −2j    | 12/0 | 12/1 | 14/0 |
| 12 | 0010     | −1+j   | 3/0  | 3/1  | 4/0  |
| 13 | 11101011 | −2−j   | 15/1 | 2/0  | 2/1  |
| 14 | 11100    | −2     | 6/0  | 6/1  | 0/0  |
| 15 | 1110101  | 1+2j   | 10/1 | 11/0 | 11/1 |

States 9 and 12 hold the same carry. State 12 is reached only from
state 11, and it behaves exactly like state 9. Merging them would change
nothing but the contents of the table.

Example: 1 + 1 starting from state 0. The machine goes through states
0 → 1 → 2 → 3 → 0 and outputs the digits 0, 0, 1, 1, which read as 1100 = 2.

## The memory word

The state/output memory is three banks of 16 bytes. The bank is chosen by s:

- bank 1 for 0+0
- bank 2 for 0+1 or 1+0
- bank 3 for 1+1

The location within the bank is the current state. Each byte holds:

- bit 7: the output digit
- bits 6:4: zero
- bits 3:0: the next state

For example, state 13 in bank 1 holds 8'h8F: output digit 1, next state 15.
The contents are in `cba_state_output_memory.sv`, written row by row with
the carry of each state as a comment.

## Datapath

```
  wr_a ─► input memory A ─► input shift reg A ─┐ a
                                               ├─► single-bit adder ─ bank ─┐
  wr_b ─► input memory B ─► input shift reg B ─┘ b                          ▼
                                                      ┌──── state/output memory (3×16×8)
                                                      │ next state      │ output digit
                                                      ▼                 ▼
                                       current state register      output shift reg ─► sum
                                              (4 bits) ──► back to the memory address
```

- The **input memories** hold the two operands. The host writes each one as
  a single word.
- The **input shift registers** load both words when an addition starts.
  They then hand out one digit per clock, least significant first, and fill
  from the top with zeros. Those zeros are the high-order padding that a
  trailing carry needs.
- The **single-bit adder** is three gates: NOR, XOR and AND of the two
  digits. Together they form a one-hot select of bank 1, 2 or 3.
- The **state/output memory** is read asynchronously. In each clock the
  output digit and the next state appear combinationally from the input
  digits and the current state.
- The **current state register** takes the next state at the clock edge.
  The only timing loop in the design is: current state register → memory
  address → memory data → current state register.
- The **output shift register** takes each digit in at the top. After WIDTH
  shifts the first digit sits in bit 0, so `sum` reads as an ordinary base
  (−1+j) word.

The adder itself is unaware of the operand length. `WIDTH` (default 32)
only sets the sizes of the memories and shift registers.

## Timing and interface (`cba_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | The single master clock. `rst_n` is an asynchronous active-low reset. |
| `wr_a_en`, `wr_a_data[WIDTH-1:0]` | in | Write operand A. Digit k is the coefficient of (−1+j)^k. |
| `wr_b_en`, `wr_b_data[WIDTH-1:0]` | in | Write operand B. |
| `start` | in | Starts an addition. It is sampled only while idle and ignored while `busy` is high. |
| `busy` | out | High while digits are being added. |
| `done` | out | A one-clock pulse. |
| `sum[WIDTH-1:0]` | out | The low WIDTH digits of A + B. Valid from `done` until the next start. |
| `carry_state[3:0]` | out | The current state. After `done`, a non-zero value is the carry that did not fit. |
| `sum_bit`, `sum_bit_valid` | out | The digit leaving the adder in each clock. It is the serial form of the result. |

An addition takes WIDTH + 1 rising edges. `done` rises with the last of
them, counting the edge that samples `start` as the first:

- The first edge loads the shift registers, puts the machine in state 0
  and clears the output register.
- The next WIDTH edges each add one digit.

A new `start` may be given in the same clock in which `done` is high. The
edge that samples it clears `sum`, so read the result first. The operands
stay in the input memories, so the same addition can be run again without
rewriting them.

## Operand length and lost carries

A carry can be up to 8 digits long. The sum is therefore complete only if
both operands fit in WIDTH − 8 digits: 24 digits at the default width.
With longer operands the high part of the sum can run past the word. In
that case the design does what a fixed-width adder usually does:

- `sum` holds the low WIDTH digits.
- `carry_state` is left non-zero.

The true sum is `sum` + carry·(−1+j)^WIDTH, where the carry is the one
listed for that state in the table above. To handle longer numbers, raise
`WIDTH`. The logic of the adder does not change.

## Files

| file | contents |
|------|----------|
| `rtl/cba_pkg.sv` | State, bank-select enum and memory-word struct types; default width |
| `rtl/cba_single_bit_adder.sv` | Digit pair → one-hot / encoded bank select |
| `rtl/cba_state_output_memory.sv` | The 3×16-byte table |
| `rtl/cba_current_state_register.sv` | 4-bit state register with reset and clear |
| `rtl/cba_adder_core.sv` | The serial state machine: the three blocks above |
| `rtl/cba_input_memory.sv` | Operand storage |
| `rtl/cba_input_shift_reg.sv` | Parallel-in, LSB-first serial-out register |
| `rtl/cba_output_shift_reg.sv` | Serial-in, parallel-out result register |
| `rtl/cba_top.sv` | The whole adder with its start/done sequencing |
| `tb/cba_tb_pkg.sv` | Reference arithmetic: digits ↔ Gaussian integers |
| `tb/*_tb.sv` | One self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cba_pkg.sv tb/cba_tb_pkg.sv rtl/cba_*.sv tb/cba_top_tb.sv \
  --top-module cba_top_tb -o sim
./obj_dir/sim
```

To run another testbench, replace `cba_top_tb` with its name. The top
testbench runs `cba_top` at its default width and needs well under a
second.

## Verification

The testbenches do not compare against the state table. They compute
expected results independently, on Gaussian integers:

- convert digit strings to a + jb by summing powers of (−1+j);
- convert back by repeated division by (−1+j).

They cover the following:

- **State/output memory.** For all 48 entries, the output digit and the
  carry of the next state are recomputed from the carry of the current
  state.
- **Adder core.**
  - The 1 + 1 example, state by state.
  - 2 + (−j) = 111011.
  - The zero rule 11 + 111 = 0.
  - 300 random additions of operands up to 24 digits, each checked to end
    in state 0.
- **Top, end to end at the default 32 digits.**
  - The examples above.
  - 2004 + j2004 plus small values, and doubled.
  - Random 24-digit operands, where the sum must be complete.
  - Random 32-digit operands, where `carry_state` must be non-zero exactly
    when the true sum is longer than 32 digits.
  - Pairs x + (−x).
  - Operand reuse, and a `start` pulse during an addition.
  - The serial digit stream and the WIDTH + 1 latency of every addition.

  It also checks that every one of the 16 states is entered. The case
  1001011 + 1001011 is included because it follows the longest chain of
  carries, through the 8-digit ones, to state 15.
- **Remaining modules.** Each has a randomized testbench against a small
  model.

Immediate assertions check two things:

- the bank select is one-hot and agrees with the encoded bank;
- the spare bits of every memory word are zero.

## Design choices beyond the original circuit

The structure and the table follow the published design. The following
points are choices of this RTL:

- **Input side.** Word-wide operand writes. The original loads its input
  memories by means that are not specified.
- **Sequencing.** The start/busy/done sequencing, and its one load clock.
- **Reset and clear.** An asynchronous reset, and clearing of the state and
  output registers at each start.
- **Carry output.** The `carry_state` output. The original makes no
  provision for carries past the word. This design does not add such a
  carry either, but it shows it.
- **Memory organization.** Three 16-location banks. A single 48-location
  memory would work equally well.
- **Gates.** The gate choice in the single-bit adder.
- **Clock.** The clock is an input. No clock generator is included.
