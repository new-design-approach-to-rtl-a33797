# Majority-gate binary adder with a two-bit carry step

This is an N-bit binary adder (128 bits by default) built from only two kinds of
gate: the three-input majority gate `M(a,b,c) = ab + ac + bc` and the inverter.
Those are the native logic primitives of quantum-dot cellular automata (QCA),
a nanoscale technology in which every majority gate on a path costs a clock
phase. That is why the aim is a short majority-gate carry chain.

The main idea is this. In a plain majority-gate ripple adder each bit position
computes `c_{i+1} = M(a_i, b_i, c_i)`, so a carry crosses two bit positions
through two gates in series. Here the bits are grouped in pairs. Each pair
precomputes two signals that depend only on the operands. The incoming carry
`c_i` then meets a single majority gate that gives `c_{i+2}`. The carry chain
therefore has one gate per two bits, about half the depth of the plain ripple
adder. Its area stays close to a ripple adder's, because there is no lookahead
tree.

The RTL is a gate-level, combinational model of that logic. Each majority gate
is one module instance, so the netlist shows the gate count and structure. It
simulates and synthesizes as an ordinary adder. It does not model QCA cells or
QCA clocking (see "What is not modelled").

## Carry algebra of the two-bit module (`qca_carry2`)

For bit `i`, with `p_i = a_i | b_i` (propagate) and `g_i = a_i & b_i` (generate):

| signal    | gate                         | equals                                  |
|-----------|------------------------------|-----------------------------------------|
| `p_i`     | `M(a_i, b_i, 1)`             | `a_i + b_i`                             |
| `g_i`     | `M(a_i, b_i, 0)`             | `a_i · b_i`                             |
| `x`       | `M(a_{i+1}, b_{i+1}, g_i)`   | `g_{i+1} + p_{i+1}·g_i`                 |
| `y`       | `M(a_{i+1}, b_{i+1}, p_i)`   | `g_{i+1} + p_{i+1}·p_i`                 |
| `c_{i+2}` | `M(x, y, c_i)`               | `g_{i+1} + p_{i+1}·g_i + p_{i+1}·p_i·c_i` |
| `c_{i+1}` | `M(p_i, g_i, c_i)`           | `g_i + p_i·c_i`                         |

Why `M(x, y, c_i)` is right: `g_i` implies `p_i`, so `x` implies `y`. For
ordered inputs like these, `M(x, y, c) = x + y·c`. That is the two-bit carry
lookahead expression. `x` and `y` are ready two gate levels after the operands
arrive, before the carry gets there. The carry itself passes only through the
gate that makes `c_{i+2}`. The odd carry `c_{i+1}` branches off the chain and
is used only by the sum cells.

One module is six majority gates.

## Sum cell (`qca_sum_bit`)

The sum uses no XOR. It reuses the carry out of its own bit position, inverted:

    s_i = M( ~c_{i+1}, M(x_i, y_i, ~c_{i+1}), c_i )

This is the usual majority-logic full-adder sum. It costs two majority gates and
one inverter per bit. The operand pair `(x_i, y_i)` can be `(a_i, b_i)` or
`(p_i, g_i)`, since `M(p_i, g_i, z) = M(a_i, b_i, z)` for any `z`. The adder
follows the reference gate drawings in this: even bits take `(p_i, g_i)` from
their carry module, and odd bits take `(a_i, b_i)`.

## The N-bit adder (`qca_adder`)

`N/2` two-bit modules are cascaded, with `c_{2k+2}` of one module feeding
`c_{2k}` of the next. `N` sum cells sit below them, and `cout = c_N`.

Carry-in configurations (parameter `HAS_CIN`):

* `HAS_CIN = 1` (default). The adder has a `cin` port. Every pair uses the full
  `qca_carry2`. This is the interface of the 128-bit reference simulation, which
  has `a[127:0]`, `b[127:0]`, `cin`, `sum[127:0]` and `cout`, and runs with
  `cin = 1`.
* `HAS_CIN = 0`. `c_0` is tied to 0 and `cin` is not read. The least significant
  pair then uses `qca_carry2_lsb`, which needs no `p_0`:
  `c_1 = g_0 = M(a_0, b_0, 0)` and `c_2 = M(a_1, b_1, g_0)`. This is the
  architecture as originally described, with the shortest critical path.

Worst-case path: a carry generated at bit 0 rippling to the sum's MSB.

| configuration | gates to `c_N` | gates to `s_{N-1}`       | N = 128 |
|---------------|----------------|--------------------------|---------|
| `HAS_CIN = 0` | `N/2 + 1`      | `N/2 + 3` and 1 inverter | 67      |
| `HAS_CIN = 1` | `N/2 + 2`      | `N/2 + 4` and 1 inverter | 68      |

A carry that enters through `cin` meets only `N/2` gates on its way to `cout`.

Gate count:
* `HAS_CIN = 1`: `6·N/2 + 2·N` majority gates and `N` inverters. For N = 128
  that is 640 majority gates and 128 inverters.
* `HAS_CIN = 0`: four fewer majority gates (636 for N = 128).

On an FPGA or in standard cells, synthesis flattens all of this into ordinary
logic. The majority structure sets the gate depth only in a majority-gate
technology.

### Parameters and ports

| name      | kind      | width / default | meaning                                              |
|-----------|-----------|-----------------|------------------------------------------------------|
| `N`       | parameter | 128             | operand width; must be even and ≥ 2 (else `$error`)   |
| `HAS_CIN` | parameter | 1               | 1: use `cin`; 0: carry-in fixed at 0, simplified LSB pair |
| `a`, `b`  | input     | N               | addends                                              |
| `cin`     | input     | 1               | carry-in (ignored when `HAS_CIN = 0`)                |
| `sum`     | output    | N               | `(a + b + cin) mod 2^N`                              |
| `cout`    | output    | 1               | carry-out `c_N`                                      |

Timing: purely combinational. There is no clock and no reset. Outputs follow the
inputs after the propagation delay.

## Module hierarchy

```
qca_adder            N-bit adder (top)
├── qca_carry2       2-bit carry module, one per bit pair (6 × qca_maj3)
├── qca_carry2_lsb   simplified first module, only when HAS_CIN = 0 (2 × qca_maj3)
├── qca_sum_bit      sum cell, one per bit (2 × qca_maj3 + inverter)
└── qca_maj3         three-input majority gate
```

## Where this departs from, or goes beyond, the reference description

* **Carry-in.** The architecture is described with the carry-in fixed at 0.
  The reference 128-bit simulation has a `cin` input set to 1. The default
  follows the simulation. The carry-in-free version is available as
  `HAS_CIN = 0`.
* **Carry-out.** `cout` is a separate port. In the QCA layout simulation it was
  packed into the top of the sum bus, but that was done to suit the layout tool.
* **The majority function** is never written out in the reference. The
  standard definition is used. It agrees with the way constant inputs 0 and 1
  turn the gate into AND and OR.
* **Sum-cell inputs.** Which operand pair feeds each sum cell was read from the
  gate drawings. Either choice is logically equivalent.

## What is not modelled

* **QCA cells.** These are four-dot, two-electron cells in which a bit is a
  charge configuration. They are physical devices with no gate-level
  description.
* **QCA clocking and latency.** In a QCA layout every majority gate and every
  wire segment belongs to one of four clock zones. The latency in QCA clock
  cycles depends on how the layout assigns those zones. That assignment is not
  available, so no cycle-accurate pipeline is given. Reported layout
  latencies are 5 and 9 QCA clock cycles for the 64-bit and 128-bit adders.
  They cannot be derived from the gate count alone. This RTL is
  combinational.
* **The comparison designs** (plain ripple-carry and other QCA adders) are not
  included.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench              | what it checks                                                         |
|------------------------|------------------------------------------------------------------------|
| `tb_qca_maj3`          | all 8 input combinations; AND/OR use with a constant input              |
| `tb_qca_carry2`        | all 32 input combinations against 2-bit integer addition                |
| `tb_qca_carry2_lsb`    | all 16 input combinations (carry-in 0)                                  |
| `tb_qca_sum_bit`       | all 8 full-adder cases, fed with both `(a,b)` and `(p,g)`               |
| `tb_qca_adder`         | default 128-bit adder; see below                                        |
| `tb_qca_adder_widths`  | N = 4, 8, 16, 32, 64, 128, each with `HAS_CIN` = 0 and 1, 3000 random vectors |

`tb_qca_adder` runs the adder at its default parameters. It applies:
* the 128-bit reference operands
  `a = abcdefabcdef894056789a0b5abcdef1`, `b = 1fedcba5b0a987650498fedcbafedcba`
  and `cin = 1`, which give `sum = cbbbbb517e9910a55b1198e815bbbbac` and
  `cout = 0`;
* a carry generated at each of the 128 bit positions and rippling to `cout`;
* a carry-in that ripples through all bits;
* 4000 random vectors.

It also counts how often each carry mechanism occurred, and counts a failure for
any mechanism that never did. The mechanisms are:
* a carry generated at bit 0 reaching `cout`;
* the carry-in reaching `cout`;
* the carry-in changing a result;
* `cout` set.

Every expected value comes from the simulator's integer addition, so none
depends on the majority-gate structure under test.

The simulations are zero-delay functional simulations. They show that the
logic is correct. They do not measure gate depth. The depths above come from
the structure.

## Simulating

Run from the directory that holds `rtl/` and `tb/`, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_qca_adder tb/tb_qca_adder.sv
./obj_dir/Vtb_qca_adder
```

Replace `tb_qca_adder` with any other testbench name. To use the adder
elsewhere, instantiate `qca_adder`. Set `N` to any even width. Set
`HAS_CIN = 0` if there is no carry-in.
