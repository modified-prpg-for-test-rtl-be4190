# BAST with a modified PRPG: RTL

BIST-aided scan test (BAST) feeds the scan chains of a circuit from an on-chip
pseudorandom pattern generator (PRPG) and lets the tester correct the
pseudorandom bits that disagree with a deterministic ATPG pattern. The
correction is done by an *inverter block*: one flip-flop and one XOR per scan
chain. The tester sends a short *BAST code* for every bit to be flipped, and
one more code per scan slice to shift it in. The test data therefore grows with
the number of conflicting care bits.

This design adds a small change to the PRPG. Some LFSR flip-flops get a 2:1 MUX
on their input, and a few of those MUXes get a NOT gate. With one reset-mode
code the tester can then force all MUXed stages of the *next* slice to 0 or to
1. A NOT-gated stage gets the opposite value. When the care bits of a slice lean
one way, which is common because scan chains are correlated, this removes many
flips. The positions of the MUXes and NOT gates are chosen per circuit,
offline, from correlation tables of the ATPG patterns. In the RTL they are two
parameters.

Everything is SystemVerilog (IEEE 1800-2017). It lints cleanly with
`verilator -Wall`, apart from informational notes (unused package parameters, one deliberately open output pin, and the reset also used in an assertion's disable condition), and it elaborates in
yosys/slang.

## Architecture

```
            code_valid, code[5:0]           x_mask[15:0]   scan_out[15:0]
                    |                            |              |
              +-----v------+                 +---v--------------v---+
              |bast_decoder|                 |        x_mask        |
              +--+---+--+--+                 +----------+-----------+
      inv_set[16]|   |  |M, L0                          | masked
                 |   |  |                          +----v----+
                 |   |  +----------->+--------+    |  misr   |--> signature
                 |   | shift (step)  |mod_prpg|    +----^----+
                 |   +-------------->+---+----+         | en = scan_shift
                 |   | clear             | prpg[16]     |
              +--v---v-------------------v--+           |
              |  inverter_block (FF + XOR)  |--> scan_in[16]
              +-----------------------------+     scan_shift ----+
```

| module | role |
|---|---|
| `bast_pkg` | N_CH = 16, the code type (`bast_code_t`, `bast_mode_e`), reset sub-mode values, default polynomial |
| `bast_decoder` | code → set one inverter flip-flop, or shift + clear + PRPG step with {M, L0} |
| `mod_prpg` | 16-bit LFSR with MUXes (and NOT gates) on selected stages |
| `inverter_block` | 16 flip-flops holding the inverter code, 16 XORs onto the PRPG bits |
| `x_mask` | forces unknown scan-out bits to 0 before compaction |
| `misr` | 16-bit multiple-input signature register, steps on every scan shift |
| `bast_top` | wires the above together |

There is one scan chain per PRPG stage: stage *i* drives chain *i*, and there is
no phase shifter. The scan-chain length is not a parameter of this logic. It
belongs to the circuit under test, and the tester decides how many slices make
a pattern and when the circuit captures.

## BAST codes and the life of a scan slice

A code is `{mode[1:0], addr[3:0]}`, i.e. 2 + ceil(log2 16) = 6 bits. The decoder
takes one code per clock in which `code_valid` is high:

| mode | name | effect at the clock edge |
|---|---|---|
| `10` | invert | inverter flip-flop `addr` is set to 1 |
| `00` | reset | the slice `scan_in = prpg ^ inv_code` is shifted (`scan_shift` = 1); all inverter flip-flops clear; the PRPG steps using {M, L0} = `addr[1:0]` |
| `01`, `11` | — | no operation |

Reset sub-modes (`addr[1:0]` in a reset code):

| addr[1:0] | M L0 | PRPG step | inverter block |
|---|---|---|---|
| `00` (and `01`) | 0 0 | normal LFSR step | cleared |
| `10` | 1 0 | MUXed stages load 0, NOT-gated stages load 1 | cleared |
| `11` | 1 1 | MUXed stages load 1, NOT-gated stages load 0 | cleared |

To load a slice, the tester does three things:

1. It sends one invert code for each chain whose PRPG bit conflicts with a care
   bit of the ATPG slice.
2. It sends a reset code. `scan_in` is combinational from the PRPG state and the
   inverter flip-flops, so it already holds the corrected slice during the
   cycle of the reset code. The chains capture it at that clock edge.
3. It chooses the sub-mode of that reset code by looking at the **next** slice.
   The sub-mode decides the PRPG state the next slice starts from.
   `tb/tb_bast_top.sv` and `tb/tb_bast_workloads.sv` use a simple greedy rule:
   they pick whichever of normal / load-0 / load-1 leaves the fewest conflicts
   in the next slice.

A slice therefore costs exactly `1 + (number of flips)` clock cycles and the same
number of codes. For a test set this gives

    TD = (Nvect * Nlen + Ninv) * (2 + ceil(log2 Nch))   bits

Here Nvect is the number of vectors, Nlen the chain length and Ninv the number
of invert codes. The testbenches check the cycle count against this.

## The modified PRPG

`mod_prpg` is a Fibonacci LFSR. Each step computes
`next = {state[14:0], ^(state & POLY)}`. Then, when M = 1:

    next[i] = L0 ^ NOT_MASK[i]    for every i with MUX_MASK[i] = 1

Stages without a MUX keep their normal next value, even in load-0/1 mode. So a
forced step still shifts the unforced part of the register.

Defaults:

- `N` = 16, as in the published configuration.
- `POLY` = 16'hD008, i.e. x^16 + x^15 + x^13 + x^4 + 1. This is a primitive
  polynomial, and the PRPG testbench checks that the period is 65535. The
  polynomial is this design's choice.
- `SEED` = 16'hACE1. Also this design's choice.
- `MUX_MASK` = 16'h1FFF, i.e. 13 MUXes on stages 0–12. Thirteen is the published
  maximum.
- `NOT_MASK` = 16'h0124, i.e. NOT gates on stages 2, 5 and 8. Three is the
  published maximum.

The default positions are only an example. The real positions come from the
analysis of each circuit's ATPG patterns, which is described next. A NOT gate
only makes sense on a MUXed stage; an elaboration-time assertion checks this.

**Lock-up.** If `NOT_MASK` is zero, a load-0 step can leave the LFSR all-zero. A
Fibonacci LFSR stays there under normal steps, so the tester must then issue a
load-1 step. With at least one NOT-gated stage and at least one plain MUXed
stage, as in the defaults, a forced step can never produce the all-zero state.
The method as published does not address this.

### Choosing MUX and NOT positions (offline, not RTL)

The positions come from the ATPG pattern set, outside the chip. For every pair
of scan chains, the procedure counts the slices in which the two chains'
values are the same, conflict, or include a don't-care. This gives 16×16
correlation tables for 'same', 'conflict' and 'don't care'.

- **Which table to use.** It depends on the don't-care ratio of the pattern set:
  - below 60 %: 'same'. NOT gates are allowed.
  - 60–80 %: 'same minus conflict'.
  - above 80 %: 'same plus don't care'.
- **MUX positions.** One row of the chosen table is picked: the second of the
  largest rows, because the table is symmetric. Its chains, in descending order
  of value, get MUXes.
- **NOT gates.** A MUX gets a NOT gate when that chain's 'conflict' entry is
  larger than its 'same' entry.

The result goes into `MUX_MASK` and `NOT_MASK`.

## Response side: X-masking and MISR

The original BAST architecture has an X-masking block and a MISR, but their
internals are not specified there, so both are minimal here.

- `x_mask` ANDs each chain output with the inverted `x_mask` bit. The mask comes
  from the tester through a top-level port.
- `misr` is a MISR with external (Fibonacci) feedback and the PRPG's polynomial:
  `sig' = {sig[14:0], ^(sig & POLY)} ^ masked`. It updates on every
  `scan_shift` and has a synchronous `misr_clear`.

## Interface of `bast_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset. Reset sets the PRPG to SEED and clears the inverter code and the MISR. |
| `code_valid`, `code` | in | 1, 6 | BAST code for this cycle |
| `misr_clear` | in | 1 | synchronous signature clear |
| `x_mask` | in | 16 | 1 = this chain's scan-out bit is unknown this shift |
| `scan_out` | in | 16 | chain outputs, sampled at the shift edge |
| `scan_in` | out | 16 | slice for the chain inputs (valid during a reset code) |
| `scan_shift` | out | 1 | chains shift at this edge (scan-enable/clock-enable for the chains) |
| `signature` | out | 16 | MISR contents |

Everything acts on the rising edge of the cycle in which the code is presented.
There is no pipeline latency.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. The reference models in
`tb/bast_ref_pkg.sv` spell the polynomial out as explicit taps, so they are
independent of the RTL.

| testbench | what it checks |
|---|---|
| `tb_mod_prpg` | seed, hold, normal steps and random normal/load-0/load-1 steps against the reference; exact forced patterns (0x0124 / 0x1EDB on stages 0–12); period 65535 |
| `tb_bast_decoder` | all 64 codes with `code_valid` high and low |
| `tb_inverter_block` | random set/clear sequences; `scan_in = prpg ^ code` every cycle |
| `tb_x_mask`, `tb_misr` | random vectors against the reference |
| `tb_bast_top` | end to end at default parameters (see below) |
| `tb_bast_workloads` | the 13 benchmark shapes (see below) |

**`tb_bast_top`** is the full-size end-to-end test. It plays the tester and a
circuit under test with 16 chains of 8 flip-flops, and runs 40 patterns. The
pattern set is synthetic, with about 60 % don't-cares. The test checks:

- every slice, bit for bit;
- that the loaded chains hold each pattern;
- the MISR signature against a reference compaction. Some response bits are
  made unknown with random values, so a masking error would show up.
- the exact cycle count.

It also requires each mechanism to occur at least once: invert code, each of
the three reset sub-modes, a NOT-gated stage actually used, a no-op code, an
idle cycle, a masked bit and a MISR clear. For its pattern set it reports 599
invert codes, against 1027 that a plain LFSR would need.

**`tb_bast_workloads`** runs pattern sets shaped like the 13 ISCAS/ITC
benchmark circuits of the published evaluation (b14 … s38584.1). Each set
uses that circuit's chain length, vector count and don't-care ratio. The real
ATPG patterns are not available, so the care bits are synthetic: within a
slice they lean towards 0 or 1, or are random. The invert-code counts therefore
show the mechanism and do not reproduce published numbers. On these sets the
forced modes cut Ninv by roughly 35–57 % against an unmodified PRPG.

Every testbench was also run against a deliberately broken copy of its module,
and each one detected the fault.

To simulate with plain Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/bast_pkg.sv tb/bast_ref_pkg.sv \
        tb/tb_bast_top.sv --top-module tb_bast_top
    ./obj_dir/Vtb_bast_top

Replace `tb_bast_top` with any other testbench name. The unit testbenches for
the decoder, inverter block and X-mask do not need `tb/bast_ref_pkg.sv`, but
including it does no harm. Every testbench finishes in well under a second.

## What is this design's own choice

The published method fixes these points:

- the blocks;
- the inverter block's FF+XOR structure;
- the reset and invert operations;
- the three reset sub-modes and their control values;
- the 6-bit code length;
- the counts (16 stages, 16 chains, at most 13 MUXes and three NOT gates).

This design chose the following:

- the LFSR form, polynomial and seed;
- which stage drives which chain;
- the default MUX/NOT positions;
- the bit encoding of the modes: reset = 00 is given, invert = 10 is chosen,
  and 01/11 are no-ops;
- where M and L0 sit in the address (`addr[1:0]`);
- that a forced value applies to the slice after the reset code;
- one code per clock, decoded without a register;
- an asynchronous active-low reset;
- the X-mask source (a port);
- the MISR form and its clear input;
- leaving the capture cycle of the circuit under test to the tester.

The printed control-signal table shows the first signal with an overbar, but
the text calls it M. The RTL follows the listed values, reading the first bit
as an active-high M.

Not in the RTL:

- the correlation analysis, which is offline software whose result is the two
  mask parameters;
- the tester;
- the circuit under test.

In the testbenches these roles are played by behavioural code.

## Changing it

- **Per-circuit MUX/NOT placement.** Override `MUX_MASK` and `NOT_MASK` on
  `bast_top`.
- **Different chain count.** Change `N`, together with a primitive `POLY`, a
  nonzero `SEED` and masks of that width. The code width follows as
  `2 + ceil(log2 N)`.
- **Testbenches.** They assume the defaults, because the reference models
  hard-code the 16-bit taps. Change `tb/bast_ref_pkg.sv` along with any
  parameter change.
