# 128-bit square-root carry-select adder with a carry-first CSLA stage

A carry-select adder (CSLA) avoids waiting for the carry of the lower bits
by computing each block's result twice, once for an incoming carry of 0
and once for 1, and picking one when the real carry arrives. The classic
form uses two ripple-carry adders per block and is large. This design
uses a reorganised CSLA block that computes only the two *carry words*,
selects the carry first and forms the sum last. It then chains these
blocks, growing in width, into a square-root CSLA. The default
configuration is a 128-bit adder with carry-in and carry-out.

Everything is purely combinational. There is no clock, no reset and no
register. `s` and `cout` are valid once `a`, `b` and `cin` have settled.

## The carry-first CSLA block (`prop_csla`)

An n-bit block is split into four units. Each is a module of its own.

| unit | module | function |
|------|--------|----------|
| HSG, half-sum generator | `csla_hsg` | `s0 = a ^ b`, `c0 = a & b` |
| CG0, carry generator for carry-in 0 | `csla_cg0` | `c1_0(i) = c1_0(i-1) & s0(i) \| c0(i)`, with `c1_0(-1) = 0` |
| CG1, carry generator for carry-in 1 | `csla_cg1` | same recurrence, with `c1_1(-1) = 1` |
| CS, carry selection | `csla_cs` | `c = cin ? c1_1 : c1_0`, built as `c1_0 \| (cin & c1_1)` |
| FSG, final-sum generator | `csla_fsg` | `s(0) = s0(0) ^ cin`, `s(i) = s0(i) ^ c(i-1)` |

`cout` is `c(n-1)`.

Three points make this block smaller and faster than a two-RCA CSLA.

**The half sum and half carry are shared.** Both hypotheses (carry-in 0
and 1) use the same `s0` and `c0`. Only the carry recurrence is done twice.

**The fixed carry-in simplifies bit 0.** With a carry-in of 0, the
recurrence gives `c1_0(0) = c0(0)`: a wire, with no gate. With a carry-in
of 1, it gives `c1_1(0) = s0(0) | c0(0)`. Lint reports `s0[0]` as unused
in `csla_cg0`, and the size report shows one output bit of that module
wired straight to an input. Both are expected.

**The multiplexer becomes one AND-OR per bit.** The two carry words are
always ordered bit by bit: if a carry appears at bit i with carry-in 0,
it also appears with carry-in 1. This follows by induction on the
recurrence, because both chains use the same `s0` and `c0`. It starts
from `c0(0) <= s0(0) | c0(0)`. So the selection `cin ? c1_1 : c1_0`
equals `c1_0 | (cin & c1_1)`. An immediate assertion in `csla_cs` states
this ordering. If a module upstream breaks it, simulation stops there.

**The carry leaves before the sum.** The carry-out comes straight out of
the CS unit. The FSG's XOR level comes after it. In the square-root chain
below, a block's incoming carry therefore only has to pass the AND-OR of
the CS unit before it goes on to the next block.

The FSG takes the whole n-bit carry word on its port for a uniform
interface. It uses only bits `n-2..0`, so lint reports `c[n-1]` as unused.

## Square-root arrangement (`sqrt_csla`)

The adder is a chain of stages. Each stage's carry-out is the next stage's
carry-in. Stage 0 is a 2-bit ripple-carry adder (`rca`) that takes the
adder's `cin`. Every later stage is a `prop_csla`. Stage k is k+1 bits wide
(2, 3, 4, ...) while the bits last. A final stage takes whatever bits are
left. Each stage forms its two carry words from its own operand bits, all
stages at the same time. Meanwhile the real carry travels up the chain
through one AND-OR per stage. A wider stage needs longer for its local
ripple, but its carry-in also arrives later, so the widths grow towards the
top. The critical path therefore grows roughly with the square root of the
width, not with the width itself.

The stage layout comes from constant functions in `csla_pkg`:
`stage_width`, `stage_lsb` and `num_stages`.

| N | stage widths (LSB first) |
|---|--------------------------|
| 8 | 2 (RCA), 2, 3, 1 |
| 16 | 2 (RCA), 2, 3, 4, 5: bits 1:0, 3:2, 6:4, 10:7, 15:11 |
| 32 | 2 (RCA), 2, 3, 4, 5, 6, 7, 3 |
| 64 | 2 (RCA), 2, 3, ..., 10, 8 |
| 128 | 2 (RCA), 2, 3, ..., 15, 7: 16 stages |

At 128 bits, the stages start at bits 0, 2, 4, 7, 11, 16, 22, 29, 37, 46,
56, 67, 79, 92, 106 and 121.

The 16-bit layout is the published arrangement. Its widths are 2, 2, 3, 4
and 5. Only the 16-bit grouping was published. The layouts for 8, 32, 64 and
128 bits extend the same rule: add stages one bit wider each time, then a
final stage with what is left. This is a choice made for this design. A
different grouping of the 128 bits, such as splitting the last 7 bits
differently, changes only delay, not function. To use one, change
`csla_pkg::stage_width`. The adder and its testbenches take their layout
from there, except that `tb_sqrt_csla` and `tb_sqrt_csla_widths` also check
it against the table above.

## Interfaces

| module | parameters (default) | ports |
|--------|----------------------|-------|
| `sqrt_csla` (top) | `N` = 128, `FIRST_W` = 2 | `a[N-1:0]`, `b[N-1:0]`, `cin` → `s[N-1:0]`, `cout` |
| `prop_csla` | `N` = 16 | `a`, `b`, `cin` → `s`, `cout` |
| `rca` | `N` = 2 | `a`, `b`, `cin` → `s`, `cout` |
| `csla_hsg` | `N` = 16 | `a`, `b` → `s0`, `c0` |
| `csla_cg0` / `csla_cg1` | `N` = 16 | `s0`, `c0` → `c1_0` / `c1_1` |
| `csla_cs` | `N` = 16 | `c1_0`, `c1_1`, `cin` → `c`, `cout` |
| `csla_fsg` | `N` = 16 | `s0`, `c`, `cin` → `s` |

The 128-bit adder's symbol uses the names A, B, CIN, S and COUT. Here they
are in lower case. Inside `sqrt_csla`, each `prop_csla` and `rca` instance
gets its own stage width, so the standalone default `N = 16` matters only
when a block is used on its own.

## How far it departs from the published design

- The grouping for every width other than 16 bits is this design's own.
  See the section above.
- The CS unit's AND-OR form is derived from the carry equations above. The
  gate-level drawing of that unit was not used.
- The ripple-carry first stage is written as one loop of half-adder,
  half-carry, sum and carry terms per bit. The same four functions are not
  split into separate modules.
- Nothing here models the per-signal unit-gate delays that the published
  16-bit figure annotates. No FPGA area, delay or power figures are
  reproduced.
- The comparison designs are not included. They are the two-RCA
  conventional CSLA and the CSLA built on a binary-to-excess-1 converter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against integer arithmetic worked out in the bench, not against the
design's equations. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_csla_hsg`, `tb_csla_cg0`, `tb_csla_cg1`, `tb_csla_fsg` | N=8, every operand pair. Carry words are checked against the carry out of `a[i:0] + b[i:0] + cin`. |
| `tb_csla_cs` | N=8, every ordered pair of carry words, both `cin`. Compared with a plain 2-to-1 mux. |
| `tb_prop_csla`, `tb_rca` | N=8, exhaustive over `a`, `b` and `cin` |
| `tb_sqrt_csla` | The default 128-bit adder, unmodified. Checks the stage layout, corner cases and about 60,000 random and long-carry-chain vectors. It counts, for every stage, that its carry-in was seen both as 0 and as 1. It also counts full 128-bit carry ripples, overflow and no overflow, and fails if any of these never happened. |
| `tb_sqrt_csla_widths` | 8-, 16-, 32- and 64-bit instances. Checks their layouts, including the published 16-bit boundaries, and about 130,000 vectors. |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/csla_pkg.sv tb/tb_sqrt_csla.sv --top-module tb_sqrt_csla -o sim
./obj_dir/sim
```

Each testbench finishes in a few seconds.

## Changing it

- **Width:** set `N` on `sqrt_csla`. Any `N >= 1` elaborates.
- **First stage:** `FIRST_W` sets the width of the ripple-carry first stage.
- **Grouping:** edit `csla_pkg::stage_width`. The growth rule lives only
  there.
- **Pipelining:** none is provided. Registers would go around `sqrt_csla`,
  or between stages on the carry chain.
