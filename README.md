# Fully parallel PG(2,2^3) LDPC decoder

This is a synthesizable SystemVerilog decoder for the length-73 LDPC code
built on the projective plane over GF(8). The code has these properties:

- 73 points are the 73 code bits and 73 lines are the 73 parity checks.
- Every check involves 9 bits and every bit is in 9 checks.
- H has rank 28, so the rate is 45/73.

The decoder runs log-domain belief propagation with a flooding schedule. It
has one processing unit per bit and one per check. Every unit owns a small
dual-port message memory.

A microprogrammed controller sends one 40-bit control word per clock to all
146 units at once. One iteration takes 42 clocks. Decoding stops as soon as
the hard decisions satisfy every check, or after 50 iterations.

```
 intr[73] --> 73 x bit_node ----> 73 x bit memory --+
                 ^                                  | pg_interconnect (bit -> check)
                 |                                  v
 pg_interconnect (check -> bit)              73 x check_node
                 ^                                  |
                 +------ 73 x check memory <--------+
                                          parity[73] --> cword_decide --> codeword, valid_word
 ucode_seq --> control_rom --> 40-bit control word to every unit, memory and switch
```

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | rising-edge clock, synchronous reset |
| start | in | 1 | one-cycle pulse that starts a block |
| intr | in | 73 x 9 | intrinsic LLR per bit, sign-magnitude, 3.5 fixed point |
| codeword | out | 73 | hard decisions of the last iteration |
| valid_word | out | 1 | `codeword` satisfies all 73 checks |
| done | out | 1 | finished; held until the next start |
| fail | out | 1 | the 50-iteration limit ended the block |
| busy | out | 1 | decoding |
| iterations | out | 7 | iterations used |

Keep `intr` stable for the two cycles after `start`. The bit units latch
it only in the first iteration, so later changes are ignored.

For n iterations, `done` rises (n-1)*42 + 24 clock edges after the edge
that samples `start`. Throughput is 73*f/(42*n_avg) bits per second.
`MAX_ITER` (default 50) is the only parameter of the top.

## Number format

Messages are 9 bits: one sign bit and an 8-bit magnitude. The magnitude
has 3 integer and 5 fraction bits, so the largest value is 7.96875.

The LLR sign convention is log(P(0)/P(1)). A negative total therefore means
the bit is 1. With this convention the (-1)^|N| factor of the check update
disappears. The convention is a free design choice. The original design
states its equations with the opposite sign.

Internal widths:

- The bit units work in 13-bit two's complement. That is enough for ten
  9-bit terms.
- The check units add unsigned phi values in 12 bits.
- Both unit types saturate to 9 bits before anything is written to memory.

## The memory layout and the perfect access pattern

This is the part that makes the fully parallel structure work.

The incidence of the plane comes from one perfect difference set modulo 73:

```
D = {0, 1, 71, 38, 11, 20, 43, 59, 67}
point p lies on lines (p + D[k]) mod 73
line  l holds points  (l - D[k]) mod 73
```

Each memory stores its nine messages in the order of D. Location k of bit
memory p is the message from bit p to check p + D[k]. Location k of check
memory l is the message from check l to bit l - D[k].

Both memory kinds have this map:

| location | content |
|---|---|
| 0..8 | the nine messages, in D order |
| 9 | constant zero (writes are ignored) |
| 10, 11 | value vector (codeword test) |

Because every memory uses the same order, one address generator per memory
kind serves all 73 blocks. In access cycle c:

- port A reads location 2c;
- port B reads location 2c+1.

The difference set is perfect, so in any cycle the 146 words read go to
146 different unit inputs: two per unit, with no conflicts. Five cycles
deliver all nine messages plus the zero word.

The interconnect is fixed wiring:

- Each memory port feeds a registered 1:5 rotating **memory switch**.
- Each unit input is fed by a registered 5:1 rotating **processor switch**.
- Output c of the switch at memory i, port A, is wired to input c of unit
  `i + S*D[2c]`. Port B is wired the same way with `D[2c+1]`.
- S is +1 from check memories to bit units and -1 from bit memories to
  check units.
- The fifth output of each port-B memory switch is left open. The fifth
  input of each port-B processor switch is tied to zero, so every unit
  sees a clean zero as its tenth operand.

Data read in cycle t reaches the unit in cycle t+2. The original design's
detailed interconnect example lists the incidence sets in sorted order.
That order does not give one shared address sequence, so this design keeps
the shift-invariant order throughout.

The memories use NO CHANGE mode: a write leaves the port's read output
unchanged. This matters in the codeword test. The value vector is read once,
then stays on the memory outputs for five cycles while the same memories
take the new bit-to-check messages at other addresses.

## The 42-cycle iteration

The control store holds the schedule bit for bit. Main events, in iteration
cycles:

| cycles | event |
|---|---|
| 1 | latch intrinsic values (first iteration only) |
| 2-6 | check memories read, two locations per cycle |
| 5-9 | check-to-bit messages at the bit units |
| 6-10 | bit accumulation; intrinsic added in 11 |
| 12 | total and hard decision (guess) valid |
| 13 | value vector {9{guess}} written to bit memory locations 10/11 |
| 14-15 | value vector read |
| 16-20 | bit-to-check messages written (locations 0..9) |
| 17-21 | check units XOR the value vectors |
| 22 | parity of each check valid; decision taken at the end of the cycle |
| 24-28 | bit-to-check messages at the check units |
| 38-42 | check-to-bit messages written to check memories |

The codeword test runs alongside the bit output scan. The decoder never
stalls to wait for the test. If the word is valid, the bit messages just
written are not used.

The decision at the end of cycle 22 does one of two things. If all parities
are zero, or the iteration limit is reached, the sequencer enters STOP and
clears the control word. Otherwise the iteration runs on to cycle 42 and the
next one starts.

Each new block begins with a one-cycle START state. START clears every
memory, so the first iteration sees zero check-to-bit messages.

## Bit node

The bit node computes "total minus own" in two scans:

1. **Accumulation scan.** Each operand pair is converted to 13-bit two's
   complement and registered. A 3-input adder with synchronous clear then
   sums the pairs over five cycles. The latched intrinsic value is added
   once more to form the total. The sign of the total is the guess.
2. **Output scan.** Two 6-deep shift registers replay the converted
   operands in arrival order. The subtractors form total - operand. The
   result is converted to sign-magnitude, saturated to 8-bit magnitude and
   registered, two words per cycle.

## Check node

Signs and magnitudes take separate paths.

The sign path:

- An XOR accumulator with synchronous clear forms the total sign.
- Two 13-deep 1-bit shift registers hold each edge's own sign, which is
  XORed back out of the total.
- In the codeword test the same XOR accumulator forms the check's parity
  over the value vectors.

The magnitude path works in the phi domain, where phi(x) = -log(tanh(x/2)):

1. Two phi units transform the incoming magnitudes.
2. A 12-bit accumulator sums them.
3. Two 5-deep shift registers replay the phi values.
4. The subtractors form total - own - phi(0). The tenth operand is a zero
   word, and phi(0) is not zero, so this removes its contribution.
5. The result is clamped to 0..255.
6. The same phi units apply the inverse transform. phi is its own inverse.

phi uses the modified Masera piecewise-linear approximation. It has nine
pieces. Slopes and offsets are scaled by 1, 2, 8 or 16 so that every slope
is an integer, and the result is shifted back:

| x (1/32 units) | value, 1/32 units |
|---|---|
| x < 4 | 254 - 48x |
| x <= 8 | (248 - 15x) / 2 |
| x <= 24 | 82 - 2x |
| x <= 32 | 56 - x |
| x <= 64 | (80 - x) / 2 |
| x <= 90 | (128 - x) / 8 |
| x <= 120 | (160 - x) / 16 |
| x <= 194 | 2 |
| otherwise | 0 |

The phi unit is three registered stages:

1. pick the operand and its coefficients;
2. multiply-add;
3. shift and clamp.

The schedule spaces the control signals for these stages two cycles apart.
phi(0) is 254 here, the value of the first piece at x = 0. The original
text quotes 252 for the offset. That value does not match its own first
linear piece, and subtracting 252 would leave a bias of 2/32 on every
check message.

## Controller

`ucode_seq` has four states: IDLE, START, RUN and STOP.

- In RUN it counts the control store address 0..41 and wraps around.
- It counts iterations and stops on a valid word or at `MAX_ITER`.

`control_rom` returns the word for an address one cycle later. Its table is
the iteration schedule written out as per-signal cycle intervals in
`ldpc_pkg::ucode_row`.

`cword_decide` does three things:

- captures the guesses when the value vector is formed;
- checks the 73 parities at the end of cycle 22;
- registers the decoded word.

## Differences from the original implementation

- The sign convention is log(P0/P1); see above.
- phi(0) = 254 instead of 252; see above.
- One shift-invariant message order in every memory instead of sorted
  incidence lists.
- A flush at START replaces memory initialisation files.
- The control store is logic, not a RAM loaded from a file. It is 40 bits
  wide, matching the schedule tables, where the text says 38.
- The schedule still pulses the port-B write enable for location 9. The
  memory ignores that write, so the zero word stays zero.
- Only rising clock edges are used.
- The intrinsic values are held in enabled flip-flops, not level-sensitive
  latches.
- Disabled blocks hold their outputs; nothing is tristated.
- The phi multiply-add is plain logic, not a vendor DSP block.
- The start/done/fail/busy/iterations interface is this design's own.

## Verification

Every module has a self-checking testbench in `tb/`. The full-size
testbench is `tb/tb_ldpc_decoder.sv`. It runs the top at its default
parameters and checks it against a bit-true model of the same fixed-point
algorithm:

- It derives a 45-dimensional basis of the code by Gauss-Jordan elimination
  and checks the rank of H.
- It sends random codewords over a BPSK/AWGN channel with sigma 0.84, 0.81,
  0.78, 0.73, 0.68, 0.63 and 0.57, ten blocks each. It also sends clean
  blocks and pure-noise blocks.
- For every block it compares valid_word, fail, codeword, the iteration
  count and the exact cycle count with the model.
- It requires that these cases all occurred:
  - a first-iteration stop, a multi-iteration stop and a limit stop;
  - saturation in both unit types;
  - zero-word reads;
  - NO CHANGE holds.

One run of the full-size testbench gave these results (ten random blocks
per point, so they are indicative only):

| sigma | SNR (dB) | mean iterations | wrong bits of 730 |
|---|---|---|---|
| 0.84 | 1.51 | 4.7 | 58 |
| 0.81 | 1.83 | 10.7 | 56 |
| 0.78 | 2.16 | 14.5 | 48 |
| 0.73 | 2.73 | 8.1 | 31 |
| 0.68 | 3.35 | 2.4 | 10 |
| 0.63 | 4.01 | 2.1 | 0 |
| 0.57 | 4.88 | 2.2 | 0 |

Blocks that reach the 50-iteration limit dominate the mean at low SNR.

The unit testbenches check:

| testbench | what it checks |
|---|---|
| bit and check nodes | each against integer models over full iterations |
| phi unit | every input against the table, monotonicity, and accuracy against the real function |
| control store | row by row against a literal copy of the schedule |
| sequencer | cycle by cycle, including the iteration limit, restarts and reset |
| switches, memory, address generator | against their own models |

Two concurrent assertions run in every simulation. The memory checks that
its two ports never write the same word in one cycle. The address
generator checks that port A is even and port B is the next word.

All of these tests pass. The top synthesises with yosys to about 27,600
word-level cells and 44,000 flip-flop bits. The message memories add
47,900 memory bits. No timing figure is given here. The original design
reports about 130 MHz before routing on its FPGA.
