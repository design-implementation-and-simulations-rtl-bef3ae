# A YES/NO voting machine built from adders

An assembly of 24 members votes on a motion. Each member has a three-position
switch at their seat: **YES**, **NO** or **undecided**. Two two-digit decimal
displays show, at every moment, how many members are at YES and how many at NO.
While the vote is open, members can change their minds and the totals follow.
A member who leaves their switch at undecided is counted on neither display.

The machine has no counter, clock or memory. Counting how many of 24 lines are
high is an addition of 24 one-bit numbers. The machine does it with a tree of
full adders and 4-bit parallel adders of the 74x283 kind. The 5-bit binary
total then goes through a small converter that adds six, up to twice, to turn
the total into two decimal digits. Everything is combinational: the displays
show the adders' outputs as soon as they settle.

```
 sw[0..23] ──► vote_input_select ──► 24 YES lines ──► vote_tally ──► yes_count[4:0] ──► hex_to_decimal_converter ──► 2 × seven_segment_decoder
 (vote_e)                        └─► 24 NO lines  ──► vote_tally ──► no_count[4:0]  ──► hex_to_decimal_converter ──► 2 × seven_segment_decoder
```

## Switches and vote lines

`vote_input_select` stands for the switch contacts. Each voter's switch,
`sw[i]`, is a `voting_pkg::vote_e`:

| code | position  | YES line | NO line |
|------|-----------|----------|---------|
| 00   | undecided | 0        | 0       |
| 01   | YES       | 1        | 0       |
| 10   | NO        | 0        | 1       |
| 11   | (cannot come from a real switch) | 0 | 0 |

A mechanical switch closes one contact at a time, so a voter can never reach
both adder trees. The code 11 is treated as undecided so that the logic keeps
that rule too. Voter *i* drives bit *i* of both line vectors. The number of
undecided voters is `24 − yes_count − no_count`; the machine does not display it.

## Counting 24 lines with adders (`vote_tally`)

This is the core of the design. The YES lines go to one copy of `vote_tally`,
and the NO lines go to an identical second copy.

1. **Full adder as a 3-vote counter.** A full adder's three inputs are three
   voters' lines. Its outputs `{cout, sum}` form a 2-bit number, 0..3, that
   says how many of those voters are set (`full_adder`).
2. **Six-vote cell (`six_vote_counter`).** Two full adders each give a 0..3
   count. These go into the low two bit positions of a 4-bit parallel adder:
   one count into A1/A2, the other into B1/B2. A3, A4, B3, B4 and the carry-in
   are held low. The adder's low three sum bits are the count 0..6.
3. **Twelve-vote group (`twelve_vote_counter`).** Two six-vote cells, which
   together hold the twelve inputs of four full adders, feed a second-level
   parallel adder. The result is 0..12 in four bits.
4. **Twenty-four votes (`vote_tally`).** Two twelve-vote groups feed a
   third-level parallel adder. Its four sum bits and its carry-out form the
   5-bit total, 0..24.

Each tally therefore uses 8 full adders and 7 four-bit adders. The two tallies
together use 16 full adders and 14 four-bit adders.

Note the bit positions in step 2. A full adder's count occupies the *two
lowest* positions of the 4-bit adder inputs, because its carry has weight 2.
Putting the counts of further full adders into the upper positions (A3/A4,
B3/B4) would give their votes weights of 4 and 8. So each 4-bit adder here
only adds two counts, and the tree grows by levels instead.

### The 4-bit parallel adder (`parallel_adder_4bit`)

The model follows the 74x283: it computes `a + b + cin` with a 4-bit result and
a carry-out that is the fifth bit. Each sum bit is formed as in a full adder,
`p[i] ^ c[i]`. The carries are not rippled from stage to stage. Each carry is
computed directly from the generate (`a & b`) and propagate (`a ^ b`) terms of
all lower bits, which is the part's fast look-ahead carry. Bit 0 is the 2⁰
input (pins A1/B1) and bit 3 is the 2³ input (A4/B4).

## Binary to decimal: adding six (`hex_to_decimal_converter`)

A 4-bit hexadecimal display fed a count of ten or more would show a letter, or
would need a fifth bit it does not have. The converter fixes this the way BCD
adders do: it adds six (0110) to skip the six codes 1010..1111 that are not
decimal digits. Call the count's bits `Cout A B C D`, from 16 down to 1.

**Stage 1.** The detector `F1 = A·(B + C) + Cout` is true for 10..15, where
the low nibble is not a decimal digit, and for every count of 16 or more. When
F1 is set, a 4-bit adder adds six to the low nibble. F1 itself is the tens
digit "1".

**Stage 2.** Counts of 20..24 still leave 10..14 in the units after stage 1.
A second detector, `F2 = Cout·(A + B)` ("twenty and above"), has a second
4-bit adder add six again. The units wrap to 0..4 and the adder carries out.
A half adder adds that carry to F1, which raises the tens digit from 1 to 2.

| count | binary  | F1 | units after stage 1 | F2 | units | stage-2 carry | tens = F1 + carry |
|------:|---------|----|--------------------:|----|------:|---------------|------------------:|
| 7     | 0_0111  | 0  | 7                   | 0  | 7     | 0             | 0                 |
| 13    | 0_1101  | 1  | 13 + 6 = 19 → 3     | 0  | 3     | 0             | 1                 |
| 18    | 1_0010  | 1  | 2 + 6 = 8           | 0  | 8     | 0             | 1                 |
| 22    | 1_0110  | 1  | 6 + 6 = 12          | 1  | 12 + 6 = 18 → 2 | 1     | 2                 |

The stage-1 carry-out is not needed: whenever it is set, F1 is set too. The
converter is correct for inputs 0..25, which covers a 24-voter machine.
Counts of 26..31 cannot occur and would be shown wrongly. The tens digit is
output as a full BCD nibble whose upper two bits are zero.

## Displays (`seven_segment_decoder`)

Each of the four digits (YES tens and units, NO tens and units) has a standard
hexadecimal seven-segment decoder. It shows 0..9 and A b C d E F. Only 0..9
reach it in this machine, but the letters show what an unconverted count would
look like. Segments are active high, `seg[0]` = a … `seg[6]` = g.

## Interface of the top, `voting_machine`

| port | dir | type | meaning |
|------|-----|------|---------|
| `sw` | in | `vote_e [24]` (unpacked) | switch of each voter |
| `yes_count`, `no_count` | out | `logic [4:0]` | binary totals 0..24 |
| `yes_dec`, `no_dec` | out | `bcd2_t` (`{tens, units}`, 4 bits each) | decimal totals |
| `yes_seg_tens`, `yes_seg_units`, `no_seg_tens`, `no_seg_units` | out | `seg7_t` (7 bits) | segment drives |

There is no clock and no reset. Outputs are valid one propagation delay after
the last switch change. The deepest path runs through three levels of 4-bit
adders in a tally and two more in the converter. The binary totals are
brought out as well as the displays, for testing and for any logic added
around the machine. `voting_pkg` holds the shared types and the sizes
`N_VOTERS = 24` and `COUNT_W = 5`.

## What follows the original design and what is chosen here

Taken from the original design:
- the full adder as a 3-vote counter;
- full-adder counts summed by 74x283 parallel adders;
- two parallel-adder stages feeding a third;
- the 5-bit count;
- the two add-six stages with detectors `A(B+C) + Cout` and "twenty and
  above";
- the half-adder tens increment;
- 24 voters;
- separate YES and NO displays.

Chosen here:
- the switch encoding;
- treating code 11 as undecided;
- the exact tree shape. The original groups "3 × 4 = 12 inputs" per parallel
  adder. Here each 4-bit adder adds only two counts (see above), so a group of
  twelve takes three 4-bit adders.
- the detector for "twenty and above", taken from the binary count;
- segment order and polarity;
- bringing out the binary counts.

The original also describes how the machine can be extended to more voters:
more full adders and more adder levels. This RTL is fixed at 24 voters.
`N_VOTERS` is a package constant, not a free parameter of the tally. To grow
the machine, add adder levels to `vote_tally` and widen the converter. The
converter would then also need more correction stages for counts of 30 and
above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_half_adder`, `tb_full_adder` | every input row against literal truth tables (and the sum arithmetic) |
| `tb_parallel_adder_4bit` | all 512 input combinations against `a + b + cin` |
| `tb_six_vote_counter`, `tb_twelve_vote_counter` | every input pattern against the population count |
| `tb_vote_tally` | none/all/each single vote, every run length at every position, 20 000 random patterns |
| `tb_vote_input_select` | random switch positions including the illegal code |
| `tb_hex_to_decimal_converter` | every count 0..25; it requires each correction path (none, one add-six, two add-sixes) to be exercised |
| `tb_seven_segment_decoder` | all 16 digits, segment by segment from per-segment masks |
| `tb_voting_machine` | the full-size machine end to end (see below) |

`tb_voting_machine` runs the top with its default size and checks the binary
counts, decimal digits and segment drives of both displays. It sets:
- all 24 voters at YES (24 / 00);
- eleven voters moved to NO (13 / 11);
- a session of 12 YES, 10 NO and 2 undecided;
- all voters at NO, then all undecided;
- voters changing their minds one at a time;
- 5 000 random sessions.

It also counts the undecided votes, the changes of mind, the single and
double add-six corrections and the 00 displays, and it fails if any of these
never happened.

To run one testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/voting_pkg.sv tb/tb_voting_machine.sv \
          --top-module tb_voting_machine -Mdir obj -o sim && obj/sim
```

Swap in another `tb_*.sv` file and its module name to run a different
testbench. Verilator's `-Wall` warns about a few adder outputs that are left
unused on purpose: the sum bit 3 in the six-vote cell, and carry-outs that
can never be set. The comments in those modules explain why.
