# Gated 8-bit arithmetic unit

An arithmetic unit (AU) usually contains several arithmetic modules. In a
plain design all of them are powered all the time, and all of them see every
change on the operand inputs. Yet only one module's result is used at a time.
This design applies two gating techniques so that only the module doing the
work consumes power:

- **Power gating.** Each module's supply is switched by its own ENABLE.
  A module that is not needed is cut off from VDD and GND.
- **Input gating.** Each module's operand inputs pass through switches driven
  by the same ENABLE. A module that is not needed sees no input transitions,
  so it does not switch.

The AU adds and subtracts 8-bit numbers, and multiplies signed 4-bit numbers
into an 8-bit product. A 1:2 demultiplexer routes one ENABLE input to the
module chosen by SELECT. An 8-bit 2:1 multiplexer, driven by the same SELECT,
passes that module's result to the output.

The gating was designed as a transistor-level technique in a 90 nm process.
This RTL models its logic function: gated inputs are held at 0, and a module
that is switched off produces 0. Power cannot be measured at this level. The
testbench `au_activity_tb` counts switching activity instead.

## Block diagram

```
              ENABLE ─┐
              SELECT ─┼──► ptl_demux2 ──v1──► en ┐           ┌─ s ────► a ┐
                      │                 v2──► en │           │            │
                      │                          ▼           │            │
  A[7:0], B[7:0], M ──┼──► gated_adder_subtractor ───────────┘            ├─ ptl_mux2 ──► Y[7:0]
                      │       (cout ──────────────────────────────────────┼──────────────► COUT)
  A[3:0], B[3:0] ─────┼──► gated_multiplier ─── p[7:0] ──────────────► b ┘
                      └──────────────────────────────────────────────► sel
```

Each `gated_*` block is the arithmetic core with an `enable_gate` bank in
front of every input. A second `enable_gate` bank after the core stands in
for the power switch.

## Pin-level behaviour

`gated_au` is purely combinational. It has no clock and no reset.

| enable | sel | m | y | cout |
|---|---|---|---|---|
| 0 | x | x | 0 | 0 |
| 1 | 0 | 0 | a + b mod 256 | carry of a + b |
| 1 | 0 | 1 | a − b mod 256 | 1 when a ≥ b (no borrow) |
| 1 | 1 | x | signed(a[3:0]) × signed(b[3:0]), 8-bit two's complement | 0 |

The encodings of `sel` and `m` are in `au_pkg` (`au_sel_e`, `au_mode_e`).
An immediate assertion in `gated_au` checks that the demultiplexer never
enables both modules at once.

## The modules

| file | what it is |
|---|---|
| `rtl/au_pkg.sv` | widths (`DATA_W` = 8, `MUL_N` = 4) and the SELECT and M encodings |
| `rtl/gated_au.sv` | the top: demux, both gated modules, output mux |
| `rtl/ptl_demux2.sv` | 1:2 demultiplexer for ENABLE: v1 = vin when sel = 0, v2 = vin when sel = 1 |
| `rtl/ptl_mux2.sv` | WIDTH-bit 2:1 multiplexer: y = sel ? b : a |
| `rtl/enable_gate.sv` | WIDTH gating switches: q = en ? d : 0 |
| `rtl/gated_adder_subtractor.sv` | adder/subtractor gated on a, b and m, with its outputs forced to 0 while off |
| `rtl/gated_multiplier.sv` | multiplier gated on a and b, with its output forced to 0 while off |
| `rtl/adder_subtractor.sv` | XOR row on B controlled by M, then a ripple chain of full adders with carry-in M |
| `rtl/baugh_wooley_mult.sv` | N×N signed Baugh-Wooley array multiplier |
| `rtl/full_adder.sv` | one-bit full adder, used by both arithmetic cores |
| `rtl/half_adder.sv` | one-bit half adder, used in the multiplier array |

The multiplexer and demultiplexer are named after their circuit form. Each is
a pair of pass transistors: a PMOS on the branch used when SEL is low, and an
NMOS on the branch used when SEL is high. The RTL keeps only their logic
function.

### Baugh-Wooley multiplier

This is the least obvious block. Two's-complement multiplication normally
needs sign extension of the partial products. Baugh-Wooley avoids that with
three rules:

- Partial-product bit `a[j]·b[i]` sits at weight `2^(i+j)`.
- The bits where exactly one of `i`, `j` is the sign position `N−1` are
  complemented (NAND instead of AND). The sign-times-sign bit keeps its plain
  form.
- Two constant ones are added, at weights `2^N` and `2^(2N−1)`.

The sum of all these, modulo `2^(2N)`, is the signed product. Here, row `i`
of the array is a 2N-bit ripple: a half adder in the lowest column, where no
carry comes in, then full adders. It adds the shifted
partial-product row of `b[i]` to the running sum. The first row starts from
the two constants. The carry out of the top column is dropped.

The array is built from AND (and NAND) gates, half adders and full adders,
as the original circuit is. Its layout, one ripple row per multiplier bit, is
this design's own.

## What follows the original design, and what was chosen here

These parts follow the original design:
- the set of operations;
- the 8-bit adder/subtractor, including M low for add and M high for subtract;
- the 4-bit Baugh-Wooley multiplier;
- the 8-bit 2:1 output multiplexer;
- ENABLE reaching the modules through a 1:2 demultiplexer under the select
  line;
- gating of each module's supply and of its A and B inputs.

These choices are this design's own, because the original does not fix them:
- SELECT = 0 picks the adder/subtractor and SELECT = 1 the multiplier.
- The multiplier takes the low nibbles, `a[3:0]` and `b[3:0]`.
- The multiplier is signed, as the Baugh-Wooley method implies.
- The adder/subtractor works modulo 256. `cout` is its raw carry, and there is
  no overflow flag.
- M is gated as well as A and B.
- A blocked input, an unselected demux output and a powered-down module all
  read as 0. In the circuit these nodes float. A two-state model needs a
  value, and 0 is the value that keeps an idle module idle.
- With ENABLE low, Y reads 0.

One consequence of these choices: an idle core sees all-zero inputs (with
M = 0), so it computes 0 anyway. The output clamp therefore never changes a
visible value. It is kept so that each gated module has the same shape as its
circuit counterpart.

These were not built:
- **The supply switches.** They are NMOS transistors on VDD and GND, with no
  logic function of their own. The output clamp models their effect.
- **The output buffer.** An analog stage that restores the logic levels lost
  through the pass transistors.
- **The control unit.** It drives M; here, M is a port.
- **The ungated AU.** It is the same circuit without the demultiplexer and the
  gates. It serves only as a comparison point.

The power figures of the original work cannot be checked here. They are
average power per operation in a 90 nm process. The gated unit draws about
42 % of the ungated unit's power for addition and subtraction, and about 31 %
for multiplication. Overall, that is about 61 % less.

## Verification

Each module has a self-checking testbench in `tb/`, named `<module>_tb`.
Expected values come from integer arithmetic, not from the RTL. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `adder_subtractor_tb`: all 2 × 256 × 256 operand and mode combinations.
- `baugh_wooley_mult_tb`: all 16 × 16 signed operand pairs.
- `gated_au_tb`: the whole AU at its default sizes, with every combination
  of a, b, m, sel and enable (524 288 vectors). It also looks inside to check
  the gating. The idle module must see all-zero inputs and give 0, and the
  working module must see the operands. It counts how often each mechanism
  happened: add, subtract, multiply, carry, borrow, negative product, AU
  disabled, and each module gated off. A mechanism that never happened
  counts as a failure.
- `au_one_bit_tb`: only bit 0 of each operand changes, with every combination
  in each mode and with ENABLE low. It checks the whole result and the carry
  against hand-derived values.
- `au_activity_tb`: runs streams of 2000 random operand pairs for each
  operation, checks every result, and counts bit toggles at the operand pins
  and at each core's inputs. The idle core must see 0 toggles. The working
  core must see every toggle of the operand bits it uses. In one run, an
  addition stream gave about 16 000 pin toggles, and the idle multiplier saw
  none of them.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/au_pkg.sv tb/gated_au_tb.sv --top-module gated_au_tb -o sim
./obj_dir/sim
```

## Changing it

`adder_subtractor`, `ptl_mux2` and `enable_gate` take a `WIDTH` parameter,
and `baugh_wooley_mult` takes `N`. The top reads its sizes from `au_pkg`.
The multiplier's `2*MUL_N`-bit product goes straight into the `DATA_W`-bit
multiplexer, so keep `2*MUL_N == DATA_W` when you change them.
