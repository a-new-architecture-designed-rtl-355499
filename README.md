# Area-efficient carry-select adder with carry-word selection

A carry-select adder (CSLA) shortens the carry path of an adder by computing
each block of sum bits twice, once for an incoming carry of 0 and once for 1,
and picking the right result when the real carry arrives. The classic form
uses two ripple-carry adders per block and throws one full sum word away; the
common area-saving variant replaces the second adder by a binary-to-excess-1
converter, which is smaller but puts the second result behind the first.

This design removes the waste differently. The two ripple-carry adders of a
conventional CSLA share their half-sum and half-carry bits (`a ^ b`, `a & b`),
and the two sum words differ only in the carries they use. So the adder
computes the two anticipated **carry words** only, selects one of them with the
real input carry, and forms the sum once at the end:

```
 a, b ──► HSG ──► s0 = a ^ b ─────────────────────────────┐
               └─► c0 = a & b ─┬─► CG0 ─► c^0 ─┐           │
                               └─► CG1 ─► c^1 ─┴─► CS ─► c ─► FSG ─► s, cout
                                                   ▲               ▲
                                                  cin ─────────────┘
```

- one XOR row for the sum instead of two,
- an N-bit select stage instead of an (N+1)-bit one,
- the carry out is a bit of the selected carry word, so it is ready before the
  sum bits: this is what makes the block a good stage of a square-root CSLA.

The RTL here implements that adder (`mod_csla`) and the 16-bit square-root
carry-select adder built from it (`sqrt_csla`, the top).

## The logic, bit by bit

For bit positions j = 0 … N-1, with `cin` the adder's input carry:

| Unit | Module | Equation |
|---|---|---|
| Half-sum generator | `hsg` | `s0(j) = a(j) ^ b(j)`, `c0(j) = a(j) & b(j)` |
| Carry generator, cin = 0 | `cg0` | `c^0(0) = c0(0)`; `c^0(j) = c^0(j-1) & s0(j) \| c0(j)` |
| Carry generator, cin = 1 | `cg1` | `c^1(0) = s0(0) \| c0(0)`; `c^1(j) = c^1(j-1) & s0(j) \| c0(j)` |
| Carry select | `cs_unit` | `c(j) = c^0(j) \| cin & c^1(j)` |
| Final-sum generator | `fsg` | `s(0) = s0(0) ^ cin`; `s(j) = s0(j) ^ c(j-1)`; `cout = c(N-1)` |

Bit j of every carry word is the carry *out of* position j. Both carry
generators are the carry recurrence of a ripple-carry adder with the input carry
fixed, which lets bit 0 collapse to a wire (CG0) or one OR gate (CG1). No sum bits
are formed inside them.

### Why the select unit is an AND-OR, not a multiplexer

Adding 1 to the incoming carry can only create carries, never remove them.
So wherever `c^0(j) = 1`, `c^1(j) = 1` as well. Under that ordering, the 2-to-1
multiplexer `cin ? c^1 : c^0` equals `c^0 | (cin & c^1)`: when `cin = 0` the
second term vanishes, and when `cin = 1` the first term is covered by the
second. The select unit is therefore N AND-OR gates. `cs_unit` carries an
immediate assertion of the ordering `(c_0 & ~c_1) == 0`. It can only fire if
the unit is fed carry words that did not come from a matched CG0/CG1 pair.

## Square-root CSLA (`sqrt_csla`)

A square-root CSLA chains carry-select stages of growing width. The 16-bit
adder here uses, from the least significant end:

| Stage | Bits | Block |
|---|---|---|
| 0 | 1:0 | 2-bit ripple-carry adder (`rca`) |
| 1 | 3:2 | 2-bit `mod_csla` |
| 2 | 6:4 | 3-bit `mod_csla` |
| 3 | 10:7 | 4-bit `mod_csla` |
| 4 | 15:11 | 5-bit `mod_csla` |

Every stage forms its two carry words from its own operand bits in parallel.
The carry out of stage k drives the carry in of stage k+1. After that carry
arrives, a stage only has to pass it through one AND-OR gate to produce its
own carry out. Each stage is one bit wider than the one before because it has
one more gate delay of slack before its carry in settles. The first stage is a
plain ripple-carry adder. Its carry in is the adder input, which is available
immediately, so a select stage there would gain nothing.

Stage widths are the parameter `STAGE_W` (type `csla_pkg::stage_widths_t`,
least significant stage first, default `'{2, 2, 3, 4, 5}`). The adder width is
their sum. The package fixes the number of stages at five
(`csla_pkg::SQRT_STAGES`). Stage 0 is always built as an `rca` and the others
as `mod_csla`. The function `csla_pkg::stage_lsb` gives the lowest bit of each
stage.

Ports of `sqrt_csla`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a`, `b` | in | 16 | operands |
| `cin` | in | 1 | input carry (tie to 0 for a plain a + b) |
| `s` | out | 16 | sum |
| `cout` | out | 1 | carry out |

## Timing and interface

Everything is combinational. There is no clock, no reset and no handshake. A
result is valid one propagation delay after the operands change. Register the
inputs and outputs yourself if you want a pipelined adder.

The critical path of `sqrt_csla` is the stage-carry chain: the 2-bit RCA,
then one AND-OR per CSLA stage, then the last stage's XOR row. Each stage's
CG0/CG1 ripple runs in parallel with the stages below it.

## Files

| File | Contents |
|---|---|
| `rtl/csla_pkg.sv` | stage-width type, default 16-bit widths, offset helpers |
| `rtl/hsg.sv`, `rtl/cg0.sv`, `rtl/cg1.sv`, `rtl/cs_unit.sv`, `rtl/fsg.sv` | the five units of the modified CSLA |
| `rtl/mod_csla.sv` | N-bit modified CSLA (default N = 8) |
| `rtl/rca.sv` | N-bit ripple-carry adder (default N = 2) |
| `rtl/sqrt_csla.sv` | 16-bit square-root CSLA, the top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block with results computed by plain integer
arithmetic and ends by printing `TB_RESULT checks=<n> failures=<m>`:

- `tb_hsg`, `tb_cg0`, `tb_cg1`, `tb_fsg`, `tb_mod_csla` are exhaustive at
  8 bits over all operand pairs, and over both input carries where there is
  one. The carry-word checks compare bit j with the carry out of position j of
  `a + b + cin`.
- `tb_rca` is exhaustive at 2 bits.
- `tb_cs_unit` tests ordered random carry-word pairs and corner pairs against a
  plain multiplexer.
- `tb_sqrt_csla` runs the top at its default parameters: directed cases
  (0 + 0, all ones, a carry rippling from `cin` through all 16 bits,
  0x0010 + 0x0010 = 0x0020, 0x8000 + 0x8000) and 200,000 random operand pairs.
  It also counts, for each CSLA stage, how often its carry in was 0 and how
  often it was 1 with a propagating low bit, which is when the cin = 1 carry
  word decides the result. It counts how often a carry went through every
  stage. Each count must be non-zero.

Every testbench has a time-out that fails the run if it hangs. All pass.
A deliberately broken copy of each module makes its testbench report failures.

Running one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_sqrt_csla \
    -y rtl -y tb +libext+.sv rtl/csla_pkg.sv tb/tb_sqrt_csla.sv
./obj_dir/Vtb_sqrt_csla
```

For the other testbenches, replace the top module and the file name. Put
`rtl/csla_pkg.sv` first on the command line for any of them.

## Where this RTL makes its own choices

- **Width of the stand-alone adder.** The architecture is defined for a
  generic N. `mod_csla` and its units default to N = 8, which is a choice, not
  a given. `sqrt_csla` overrides N for each stage.
- **Input carry of the 16-bit adder.** `sqrt_csla` has a `cin` port. With
  `cin = 0` it is an ordinary 16-bit adder with carry out.
- **Initial condition of the carry recurrences.** The carry *into* bit 0 is
  taken as 0 for CG0 and 1 for CG1. With that reading, CG0 bit 0 is `c0(0)` and
  CG1 bit 0 is `s0(0) | c0(0)`.
- **Ripple-carry stage.** `rca` uses the same half-sum / half-carry /
  full-sum / full-carry split as the carry generators.
- **Gate-level form.** The units are written as bit equations, not as netlists
  of specific gates. A synthesis tool is free to restructure them, so area and
  delay figures depend on the tool and target. After generic synthesis, the
  16-bit top comes to 74 word-level cells and no flip-flops.
- **No sequential logic.** The design has no pipeline registers or reset.
