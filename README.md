# Soft-decision (32400, 32208) BCH decoder for DVB-S2

In DVB-S2 the BCH code is the outer code behind an LDPC decoder. By the time a
frame reaches the BCH decoder, the LDPC decoder has already said how sure it is
of every bit. This decoder uses that: it assumes that any remaining errors sit
among the **2t least reliable bits** of the codeword. It therefore never solves
the key equation and never runs a Chien search. It collects the 2t weakest
positions while the codeword streams in, then solves one small linear system
over GF(2^16) for their error values. When that solution is a 0/1 vector, it
is the error pattern.

The RTL follows the architecture of the soft BCH decoder chip published as
*"A 26.9 K 314.5 Mb/s Soft (32400,32208) BCH Decoder Chip for DVB-S2 System"*
(IEEE JSSC, 2010). It uses that chip's block structure, its Björck–Pereyra
solver with a single multiplier and a composite-field inverter, and its cycle
counts. The defaults are the chip's code: N = 32400, K = 32208, t = 12 over
GF(2^16), with 7-bit soft inputs. A codeword takes 34 104 cycles, which is
32208 bits per 34 104 cycles, or 314.5 Mb/s at 333 MHz.

## What the decoder computes

Let R be the received hard decisions and S_j = R(α^j), j = 1..2t, the
syndromes. Let l_1..l_2t be the 2t least reliable positions and β_i = α^(l_i)
their error locators. If every error is at one of those positions, the error
values γ_i ∈ {0,1} satisfy

    Σ_i β_i^j · γ_i = S_j        j = 1 .. 2t                       (B·Γ = S)

B is a 2t × 2t Vandermonde-type matrix. The β_i are distinct and nonzero, so
the system always has exactly one solution over GF(2^16). Two cases follow:

* **Binary solution.** Every γ_i is 0 or 1. The decoder flips the bits at the
  l_i with γ_i = 1 and raises `out_ok`.
* **Non-binary solution.** Some error lies outside the candidate set. The
  decoder passes the codeword through uncorrected with `out_ok = 0`.

Up to 2t = 24 errors can be corrected, twice what a hard decoder manages, but
only when all of them are among the 24 least reliable bits. An error on a bit
the LDPC decoder was confident about cannot be corrected. How well this works
depends on how good the soft information is. It pays off after an LDPC
decoder, whose reliabilities are far better than raw channel LLRs.

## Block structure

```
             +--> syndrome_calc ------ S_1..S_2t ---------+
             |                                             v
 in_llr --+--+--> error_locator_eval -- β, l --------> bp_ems -- Γ, ok --+
 (serial) |                                                               v
          +-----> codeword_fifo (N x 1) -------------------------> error_corrector --> out_bit
```

| module | role |
|---|---|
| `bch_pkg` | GF(2^16) and GF(2^8) arithmetic, composite-field constants |
| `syndrome_calc` | 2t Horner cells S_i ← S_i·α^i + r |
| `error_locator_eval` | sorts out the 2t least reliable bits and records α^l and l for each |
| `bp_ems` | Björck–Pereyra error magnitude solver: one multiplier, one inverter |
| `composite_inv` | GF(2^16) inversion through GF((2^8)^2) |
| `codeword_fifo` | one-codeword bit buffer |
| `error_corrector` | XORs γ_i into the buffered bit at l_i |
| `soft_bch_decoder` | top: the blocks above plus the input/solve control |

## The error magnitude solver (`bp_ems`)

This block holds most of the design's subtlety. A general 24 × 24 solve by
Gaussian elimination would cost O(n^3) operations and a large array. Here the
matrix is Vandermonde in the β_i, so the solver uses the Björck–Pereyra
algorithm. It needs only the vector of β_i and O(n^2) operations, done in
place on a copy of the syndromes. With n = 2t and 1-based indices:

    1) for k = 1 .. n-1,  i = n downto k+1:   S_i ← S_i + β_k · S_(i-1)
    2) for k = n-1 downto 1:
           for i = k+1 .. n:   S_i ← S_i · (β_i + β_(i-k))^-1
           for i = k .. n-1:   S_i ← S_i + S_(i+1)
    3) for k = 1 .. n:          S_k ← S_k · β_k^-1      and check S_k ∈ {0,1}

Subtraction is XOR in GF(2^m). After step 3, S_k holds γ_k. That is
(2t²−t) + 2(2t²−t) + 2t = **6t² − t operations, 852 for t = 12**. Step 1 turns
the right-hand side into Newton-form differences. Step 2 undoes the
divided-difference factorisation. Step 3 removes the extra factor β_k, because
row j of B holds β^j rather than β^(j−1). The 0/1 check is folded into step 3,
as each final value is written, so it costs no cycle.

**Hardware.** The datapath has these parts:

* a 2t-entry register file for S;
* a mux that feeds the inverter either β_k or β_i + β_(i−k);
* `composite_inv`;
* a register `x_q` at the inverter output;
* one general GF(2^16) multiplier, whose other operand is S_(i−1), S_i or S_k;
* XORs for S_i + product and S_i + S_(i+1).

Division is inversion followed by the shared multiplier.

**Schedule.** `x_q` splits every operation into two cycles:

* **Phase A** forms the multiplier's field operand and registers it. The
  operand is β_k in step 1, and an inverse in steps 2 and 3.
* **Phase B** multiplies, adds and writes one S register.

Splitting the path through the inverter from the path through the multiplier
is what doubles the clock: the published chip went from 166 to 333 MHz for
1704 instead of 852 solver cycles. The cycle that carries `start` is already
phase A of the first operation. `done` therefore pulses exactly
2·(6t²−t) = 1704 cycles after `start`, and `gamma`/`ok` are final then.

Every operation, subtractions included, takes a two-cycle slot of its own. A
cheaper schedule could merge the step-2 subtractions into the division slots.
The uniform slots are kept because they reproduce the chip's published
latency.

With the parameter `INV_REG = 0` the register after the inverter is left
out. Each operation then takes one cycle, and `done` pulses 6t²−t = 852
cycles after `start`. This is the slower-clock configuration of the
published chip (166 MHz), with a codeword period of N + 852 cycles.

## Choosing the least reliable bits (`error_locator_eval`)

The bits arrive one per cycle, highest position first. The block keeps three
rows of 2t registers:

* reliabilities R, sorted ascending;
* locators β;
* locations l.

Each stage has a comparator against the input magnitude, and a 2-bit select
picks one of three actions:

* take the previous stage (the input is smaller than the previous stage's
  value, so everything shifts down);
* take the input (the input is not smaller than the previous stage but
  smaller than this one);
* hold.

The result is a one-cycle insertion sort. The locator of the current bit comes
from a register that starts at α^(N−1) and is multiplied by the constant α^(−1)
each cycle. The location comes from a down-counter that starts at N−1. So no
Chien search is needed: the candidate locations are known as soon as the last
bit is in.

Ties keep the earlier bit in front. The reliability registers are one bit
wider than a magnitude and start above the largest one, so the first 2t bits
always enter.

## Composite-field inversion (`composite_inv`)

Inversion in GF(2^16) by table would be far too large, so it is done in
GF((2^8)^2). A 16 × 16 GF(2) basis change maps an element to b·X + c, with
X² = X + ψ. Then

    1/(b·X + c) = (b²ψ + b·c + c²)^-1 · (b·X + b + c)

which needs a GF(2^8) inverse, three GF(2^8) products, two squarers and a
multiplication by ψ. A second basis change maps the result back. The
parameters are:

* GF(2^16) uses the DVB-S2 field polynomial x^16 + x^5 + x^3 + x^2 + 1.
* GF(2^8) uses x^8 + x^4 + x^3 + x^2 + 1.
* ψ = 0x20.
* The basis change sends α^j to θ^j, where θ is a root of the GF(2^16)
  polynomial in the composite field.

`COMP_T` and `COMP_TI` in `bch_pkg` hold the matrix columns, θ^j and their
inverse. The GF(2^8) inverse is computed as a^254. The testbench checks the
inverter on all 65 536 inputs.

## Interface and timing of the top (`soft_bch_decoder`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready` | in / out | one soft bit is taken when both are high |
| `in_llr[W-1:0]` | in | sign-magnitude soft bit (see below) |
| `out_valid`, `out_bit` | out | decoded bits, position N−1 first, one per cycle, no back-pressure |
| `out_first`, `out_last` | out | codeword framing |
| `out_ok` | out | 1: the codeword was decoded; 0: errors outside the candidates, bits passed through |

**Soft input format.** Bit W−1 of `in_llr` is the sign, and the other W−1 bits
are the reliability. The hard decision is the *inverse* of the sign bit, as in
the original syndrome cell, so a set sign bit means "received 0".

**Timing**, with continuous input:

```
cycle 0 .. N-1            accept bits N-1 .. 0   (syndromes, sorter, FIFO)
cycle N .. N+1703         solver runs, in_ready = 0
cycle N+1704              solver done; first bit of the next codeword accepted;
                          read-out of this codeword starts
cycle N+1705 .. 2N+1704   corrected bits of this codeword on out_bit
```

One codeword therefore takes N + 12t² − 2t = 34 104 cycles. The buffer holds a
single codeword. The read-out of codeword k overlaps the input of codeword k+1,
and a read always comes no later than the write that replaces the same entry.
This is what lets one buffer sustain the full rate. Gaps in `in_valid` are
allowed at any time. Reset is asynchronous and active low.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 32400 | code length (the rate-1/2 normal-frame BCH code) |
| `T` | 12 | correction capability; 2T candidates and syndromes |
| `W` | 7 | soft input width |
| `INV_REG` | 1 | register after the solver's inverter: 2 cycles per solver operation (1 without it) |

The field is fixed at GF(2^16). Any shortened BCH code over it with
N − K = 16·T (all DVB-S2 normal-frame codes) can be decoded by setting `N`
and `T`, but there is no run-time mode switch.

## Relation to the published chip

Taken from the published design:

* the block structure;
* the syndrome cell;
* the three-row sorter with 2-bit selects;
* the α^(−1) locator register and location counter;
* the Björck–Pereyra operation order, with one multiplier and one composite
  inverter;
* the inversion formula;
* the register after the inverter and the resulting 34 104-cycle period.

Choices of this implementation:

* the soft input format and the valid/ready handshake;
* the GF(2^8) polynomial, ψ and the basis-change matrices;
* tie-breaking and the initial values in the sorter;
* the solver working on its own copy of the syndromes. The chip appears to
  work in place in the syndrome registers (8t registers). The copy costs 2t
  registers, and it lets the syndrome cells take the next codeword at once.
* the corrector's 2t location comparators, and passing the bits through
  unchanged on failure;
* read-out overlapping the next codeword's input.

The original text's cycle counts per solver step (4t²−2t, 2t²−t and 2t for
steps 1–3) do not match the operation counts of its own algorithm
(2t²−t, 4t²−2t, 2t). Both total 6t²−t, and that total is what is built.

Not included:

* the 11- and 21-mode DVB-S2 extensions (a GF(2^14) inverter and a
  reconfigurable multiplier for short frames);
* the alternative heuristic solver (H-EMS), which searches all 2^(2t) binary
  patterns and suits only small t;
* the hard iBM/Chien decoder the chip is compared with.

The LDPC decoder that supplies the soft bits is outside the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`. Reference values come from `tb_gf_pkg`, a
field implementation built differently, from exp/log tables.

| testbench | what it checks |
|---|---|
| `syndrome_calc_tb` | all 24 syndromes against direct sums, with back-to-back words and idle cycles |
| `error_locator_eval_tb` | sorter contents against a stable sort, with many ties; locators against α^l |
| `composite_inv_tb` | a · inv(a) = 1 for all 65 536 inputs |
| `bp_ems_tb` | random binary patterns of weight 0..24 recovered; outside-set errors and random syndromes rejected; exactly 1704 cycles, or 852 with `INV_REG = 0` |
| `codeword_fifo_tb` | read-out overlapping the next write, including same-entry read/write |
| `error_corrector_tb` | flips exactly at γ = 1 locations, framing, pass-through on failure |
| `soft_bch_decoder_tb` | end to end with real BCH codewords at N = 400, t = 12: clean words, ≤ t and > t errors, rejected words, ties, stalls, idle input, and a 2104-cycle period |
| `soft_bch_decoder_full_tb` | the same at the default (32400, 32208) size over six codewords, including the 34 104-cycle period |
| `soft_bch_decoder_modes_tb` | all eleven DVB-S2 normal-frame codes (N = 16200 … 58320, t = 8, 10, 12), one decoder instance per code set by `N` and `T`, plus (32400, 32208) with `INV_REG = 0`. Three codewords each, driven by the `bch_code_run` harness. Checks the decoded bits and the period N + 2(6t²−t), e.g. 59 072 cycles for (58320, 58192), and 33 252 cycles without the inverter register. Two short codes (N = 400, t = 1 and t = 2, no inverter register) check the solver's 5- and 22-cycle counts |

The end-to-end testbenches build real codewords. They form the generator
polynomial as the product of (x + α^(i·2^j)) over the conjugates of α, α^3,
…, α^(2t−1), and encode random messages systematically. Then they mark up to
2t positions unreliable and put errors among them, or, for a rejected word,
on a reliable bit.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bch_pkg.sv tb/tb_gf_pkg.sv rtl/syndrome_calc.sv \
    rtl/error_locator_eval.sv rtl/composite_inv.sv rtl/bp_ems.sv \
    rtl/codeword_fifo.sv rtl/error_corrector.sv rtl/soft_bch_decoder.sv \
    tb/soft_bch_decoder_tb.sv \
    --top-module soft_bch_decoder_tb -o sim
./obj_dir/sim
```

For `soft_bch_decoder_modes_tb`, add `tb/bch_code_run.sv` before the
testbench. The full-size run takes a few seconds of simulation after about ten seconds
of compilation.

**Limits of what has been checked.** Everything has been simulated in two-state
logic only. Nothing has been synthesised to gates or timed, so the 333 MHz
figure is the original chip's and not a property shown for this RTL. The other
normal-frame codes, and t = 1 and 2, have been run end to end with three
codewords each.
