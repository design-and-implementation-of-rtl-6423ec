# Multiply-accumulate units with Vedic multipliers

A multiply-accumulate (MAC) unit adds the product of two numbers to a running
sum, one product per clock. Its speed is set by the multiplier, so this design
builds the multiplier from the rules of Vedic arithmetic, which turn
multiplication into few, short additions:

* **Urdhva Tiryagbhyam** ("vertically and crosswise"): a general multiplier
  that forms all the cross products of one output column at once.
* **Nikhilam** ("all from 9, the last from 10"): multiplication through each
  operand's deviation from a base.
* **Yavadunam** ("lessen by the deficiency"): squaring through the deficiency
  from a base.

Four MAC units are provided. They are alternative versions of the same unit
and share only clock and reset in the top level `vedic_mac_top`:

| unit | operands | multiplier | accumulator |
|------|----------|------------|-------------|
| `u4` | 4-bit a, b | Urdhva | 8 bits |
| `n4` | 4-bit a, b | Nikhilam | 8 bits |
| `y4` | 4-bit a | Yavadunam squarer (sums a²) | 8 bits |
| `u8` | 8-bit a, b | Urdhva | 16 bits |

All arithmetic is unsigned. The unit is meant for equations made only of
products and squares, such as B² + P² = H², x² + y² = r², or an ellipse
cleared of division: x²b² + y²a² = a²b².

## The MAC loop

```
 a ─┐   ┌────────────┐ product  ┌─────┐ sum  ┌───────────────┐
    ├──►│ Vedic mult │─────────►│  +  │─────►│ PIPO register │──┬──► acc
 b ─┘   └────────────┘          └─────┘      └───────────────┘  │
                                   ▲  └─ carry ─► sticky ovf     │
                                   └─────────────────────────────┘
```

`vedic_mac` joins a combinational multiplier (picked by the `SUTRA`
parameter) to `pipo_adder`. `pipo_adder` is a 2N-bit adder whose sum goes
into a parallel-in parallel-out register (`pipo_register`). The register
output feeds back into the adder, so

    acc(t+1) = acc(t) + a(t)·b(t)   (mod 2^(2N))

Timing: one multiply-accumulate per clock. Operands present before a rising
edge appear in `acc` right after that edge, so the latency is one clock.
There is no enable. A cycle that should add nothing needs a zero operand.

Reset (`rst`) is synchronous and active high. It clears the accumulator and
the overflow flag.

Overflow: the adder's carry out shows that the running sum no longer fits in
2N bits. It sets `ovf`, which stays set until reset. The accumulator keeps the
wrapped low 2N bits. At most one wrap can therefore be undone
(true sum = 2^(2N) + acc). If the sum can exceed 2^(2N+1), keep runs short or
reset between terms.

## The three multipliers in binary

These rules are usually taught in decimal. In hardware the base is
B = 2^N, where N is the operand width.

### Urdhva Tiryagbhyam (`urdhva_mult`)

Product column k (k = 0 … 2N-2) gathers every cross product a[i]·b[j]
with i + j = k. For N = 4 the columns are:

```
k=0: a0b0
k=1: a1b0 + a0b1
k=2: a2b0 + a1b1 + a0b2
k=3: a3b0 + a2b1 + a1b2 + a0b3
k=4: a3b1 + a2b2 + a1b3
k=5: a3b2 + a2b3
k=6: a3b3
```

Each column count is added to the carry from the column below it:
- the low bit of that sum is product bit k;
- the remaining bits carry into column k+1;
- the carry left after column 2N-2 is the top product bit.

The column counts do not depend on each other. Only the carries ripple.
`N` is a parameter (default 4); the 8-bit MAC uses N = 8.

### Nikhilam (`nikhilam_mult`)

With dev_a = B − a and dev_b = B − b:

    a·b = B·(a − dev_b) + dev_a·dev_b

B − a is the two's complement of a (invert, add one), so each deviation costs
one incrementer. The deviations are multiplied by an N×N Urdhva multiplier.
The cross term a − dev_b (= a + b − B) is negative when a + b < B. It is
shifted up by N bits and the result is needed only modulo 2^(2N), so its value
modulo 2^N is all that is kept. The 2N-bit sum is then always the true
product.

A zero operand is a special case. Its deviation would be B, which does not
fit in N bits, so the output is forced to 0 when either operand is 0.

### Yavadunam (`yavadunam_square`)

With the deficiency d = B − a:

    a² = B·(a − d) + d²

Again d is the two's complement of a. d² comes from an Urdhva multiplier with
both inputs tied to d. For a = 0 the deficiency wraps to 0 and the formula
still gives 0. The Yavadunam MAC therefore sums squares. It has a `b` port
only to share `vedic_mac`'s interface, and ignores it. This is why the linter
reports `b` as unused in that configuration.

## Files

`rtl/`:
- `vedic_pkg.sv`: the `sutra_e` enum (`URDHVA`, `NIKHILAM`, `YAVADUNAM`).
- `urdhva_mult.sv`, `nikhilam_mult.sv`, `yavadunam_square.sv`: the combinational multipliers, parameter `N`.
- `pipo_register.sv`: the W-bit parallel-in parallel-out register.
- `pipo_adder.sv`: the accumulate adder, the register and the sticky overflow flag, parameter `W`.
- `vedic_mac.sv`: one MAC unit, parameters `N` (default 4) and `SUTRA` (default `URDHVA`).
- `vedic_mac_top.sv`: the four units side by side, with no parameters.

`tb/`: one self-checking testbench per module, named `<module>_tb.sv`. Each
prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
- The three multiplier benches check every input combination at N = 4 and
  N = 8 against the simulator's own `*`.
- `vedic_mac_tb` runs all four configurations against a wide reference sum. It
  checks the one-clock latency and overflow in both directions.
- `vedic_mac_top_tb` runs the top at its real sizes:
  - Pythagorean triples on the 4-bit units, and up to 119-120-169 on the
    8-bit unit;
  - points inside, on and outside a circle;
  - points on and off an ellipse: squares from the Yavadunam unit, their
    products summed on the 8-bit unit;
  - random dot products long enough to overflow.

  It also counts each mechanism: multi-cycle accumulation, reset of a
  non-zero sum, overflow in every unit, both signs of the Nikhilam cross term,
  and the zero-operand path. It fails if any of them never happened.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vedic_pkg.sv tb/vedic_mac_top_tb.sv --top-module vedic_mac_top_tb
./obj_dir/Vvedic_mac_top_tb
```

Swap in any other testbench name the same way. Each run takes well under a
second. For lint, use `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/vedic_pkg.sv rtl/<module>.sv`.

To build a MAC of another width, instantiate
`vedic_mac #(.N(n), .SUTRA(vedic_pkg::NIKHILAM))`, for example. The
accumulator is always 2N bits wide.

## Fidelity to the original design, and choices made here

Taken from the original design:
- the MAC structure (combinational Vedic multiplier, adder, accumulator
  register fed back to the adder, one accumulation per clock);
- the Urdhva column scheme;
- the steps of the Nikhilam and Yavadunam rules;
- the parallel-in parallel-out accumulator register;
- the set of units: 4-bit MACs with each of the three rules, and an 8-bit
  Urdhva MAC;
- the need to detect overflow.

The accumulator widths (8 and 16 bits) follow the I/O counts reported for the
original units: 18 pins for the 4-bit MACs and 34 for the 8-bit MAC, that is
two N-bit operands, a 2N-bit result, clock and reset. One description of the
8-bit MAC mentions a 64-bit product. That is not possible for 8×8 operands,
and it is not followed.

Choices of this design, where the original is silent:
- unsigned operands;
- base 2^N for Nikhilam and Yavadunam;
- an Urdhva multiplier for the deviation product and the deficiency square;
- the zero-operand rule in Nikhilam;
- rippled carries between Urdhva columns. The original speaks of grouping the
  cross products into log2(N)+1 partial products but does not say how.
- synchronous active-high reset;
- no enable;
- overflow as the unsigned carry out, held until reset. The original states
  the signed-overflow rule (two operands of one sign giving a sum of the
  other). With unsigned products that rule does not apply, so the carry out
  is used instead.
- the extra `ovf` output on every unit;
- a Yavadunam MAC that sums squares of a single operand.

Not included:
- The earlier MAC the design is compared against: a 16×16 Vedic squarer, a
  Kogge-Stone / carry-save 32-bit accumulator and a 32-bit register. It is a
  baseline, not part of this design.
- A "sparse accumulator", which the original names in one figure title but
  never describes. The accumulator here is the plain adder and register loop.
- The FPGA area and delay results of the original cannot be reproduced by
  simulation. The synthesized structure here is small: about 20 cells per
  4-bit multiplier and 44 flip-flops in the whole top level.
