# Booth multiply-accumulator with a self-timed Manchester carry-bypass adder

This is a 16-bit × 16-bit + 40-bit multiply-accumulate unit (MAC) for DSP work. It does one
operation per clock: `macpp <= X*Y + macpp`. It was designed for 150 MHz in a 0.25 µm process.
The datapath between the input and output registers is not pipelined. It has three parts:

* **Modified Booth (radix-4) partial products.** Eight partial-product rows are made from
  the 16-bit multiplier.
* **A Wallace tree of full adders.** It reduces those rows and the 40-bit accumulator to
  two rows.
* **A fast carry-propagate adder.** It adds the two rows.

In a non-pipelined MAC, the fast adder sits on the critical path. The idea here is a cheaper
way to run a *dynamic* Manchester carry chain without a completion detector:

* A precharged Manchester chain's carry outputs only ever stay at 0 or rise from 0 to 1
  while it evaluates. That is the one kind of input change a dynamic NMOS stage tolerates.
* So one stage's carry-out can drive the next dynamic stage directly, before it has
  settled.
* That removes the usual dual-rail carry chain (true and complement) whose only job is to
  detect completion.
* Each stage's evaluation clock is then made by delaying the previous stage's clock
  through a delay element built from a *full adder*. Its delay tracks the full-adder
  array feeding the adder, across process variation.

The full-adder array, not the adder, sets the critical path.

## Operation and interface (`booth_mac`)

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock |
| `rst_n`      | in  | 1     | asynchronous active-low reset, clears all registers |
| `x`, `y`     | in  | 16    | multiplicand, multiplier |
| `tc`         | in  | 1     | 1: signed (two's complement) operands, 0: unsigned |
| `acc_clr`    | in  | 1     | 1: this operation starts a new sum (`macpp <= X*Y`) |
| `macpp`      | out | 40    | result register, also the accumulator |
| `adder_done` | out | 1     | evaluation clock leaving the last adder stage |

The result is `macpp <= X*Y + (acc_clr ? 0 : macpp)`, modulo 2^40. The adder's carry-out is
dropped, so the accumulator wraps around.

Timing:

* At rising edge *t*, `x`, `y`, `tc` and `acc_clr` are captured in the input register.
* The result is in `macpp` after rising edge *t+1*.
* A new operation can start every cycle. Back-to-back accumulation works at full rate,
  because the addend is the output register itself.

One parameter, `FA_DELAY` (default 0.2 ns), sets the simulated delay of one full-adder delay
element.

## Datapath

```
 x,y,tc,acc_clr ─► pipe_reg ─► booth_pp_gen ──10 rows──┐
                                                      ├─► wallace_tree ─sum,carry─► st_mcba_adder ─► pipe_reg ─► macpp
                   macpp (or 0 if acc_clr) ──1 row─────┘                            (5 × mcba8)         │
                   ▲──────────────────────────────────────────────────────────────────────────────────┘
```

### Partial products (`booth_pp_gen`, `mbe_encoder`, `mbe_decoder`)

* The multiplicand is widened to 17 bits: sign-extended when `tc = 1`, zero-extended
  when `tc = 0`.
* The multiplier is cut into eight overlapping triplets `{y[2i+1], y[2i], y[2i-1]}`, with
  `y[-1] = 0`.
* Each triplet is recoded by `mbe_encoder` into a digit in −2…+2, sent as the select lines
  `one`, `two` and `neg`. A zero digit never raises `neg`.
* `mbe_decoder` turns each digit into an 18-bit row: `((one & X[j]) | (two & X[j-1])) ^ neg`.
  A negative row is only one's-complemented. Its missing +1 (the "add term") is placed at
  bit 2i of a separate row. The eight add terms never overlap, so they share one row.
* Unsigned operands need a ninth Booth digit. With the upper multiplier bits zero-extended
  it equals `y[15]`. It adds X·2^16, and a multiplexer enables it only in unsigned mode.
  This is the *unsigned-mode shift term*.
* Every row is aligned (row i is shifted left by 2i) but not sign-extended. A row whose
  sign bit s is bit 17 is worth `{~s, r[16:0]} − 2^17`. So each row keeps its 18 bits with
  the sign bit inverted, and the cells above it stay empty. The eight `−2^(17+2i)`
  corrections add up to one constant, `K = 0xFF_5556_0000` (mod 2^40). K shares the
  add-term row: the add terms use bits 0–14 and K uses bits 17–39.

### Summation (`wallace_tree`, `csa_row`, `full_adder`)

Eleven rows enter the tree: 8 Booth rows, the add-term row, the shift-term row and the
accumulator. Layers of 3:2 compressors reduce them to two rows in five full-adder levels:
11 → 8 → 6 → 4 → 3 → 2.

Where a row is empty, a full adder has a constant-0 input and synthesis reduces it to a half
adder.

`full_adder` is written in mirror-adder form: the inverted carry is formed first and the sum
is derived from it.

### Self-timed carry-bypass adder (`st_mcba_adder`, `mcba8`, `fa_delay`)

This is the part that needs the most care.

**One stage (`mcba8`).** Each 8-bit stage works like this:

* It forms `G = A & B` and `P = A ^ B`.
* It runs a precharged Manchester chain `C[i] = G[i] | P[i] & C[i-1]`.
* Carry 4 has three extra bypass pull-downs:
  * `H = G2·P3·P4`
  * `I = G1·P2·P3·P4`
  * `J = G0·P1·P2·P3·P4`

  They shorten the worst path through the chain. Logically they are redundant, so the RTL
  includes them and the result is unchanged.
* The sums are `S[i] = P[i] ^ C[i-1]`.

The stage behaves differently in its two clock phases:

| `clkb` | phase      | carry outputs `c`                 | sum `s`      |
|--------|------------|-----------------------------------|--------------|
| 0      | precharge  | all 0                             | equals `P`   |
| 1      | evaluation | settled carries (only rise 0 → 1) | correct sum  |

**Chaining stages (`st_mcba_adder`).** The 40-bit adder is five stages:

* Stage k's carry-out `C7` is wired straight into stage k+1's carry input. This is safe
  because it can only rise during evaluation.
* The clocks are chained, again by monotonicity: each stage receives a clock, delays it by
  one `fa_delay` to get its own evaluation clock, and delays that by one more `fa_delay` for
  the next stage. So stage k starts evaluating (2k+1) full-adder delays after the first
  stage's input clock.

**Fitting it into the MAC clock (`booth_mac`).** The first stage's clock is `CLKB = ~clk`:

* While `clk` is high, the adder precharges and the Booth logic and Wallace tree work on
  the newly registered operands.
* While `clk` is low, the stages evaluate in turn.
* At the next rising edge, all stages are still evaluating, because their clocks fall
  only (2k+1) delays after that edge. The output register therefore captures a valid sum.
* An assertion in `booth_mac` checks that every stage is evaluating at each capture edge.

With the default 0.2 ns delay, the ten delays of the chain take 2 ns of the 3.33 ns
half-period at 150 MHz.

`fa_delay` is a behavioural model: a real `full_adder` cell with two inputs tied low, plus a
`#DELAY` on its output. Synthesis ignores the delay and keeps the cell. The precharge/evaluate
behaviour of `mcba8` is modelled at logic level. The RTL does not model node capacitance,
charge sharing or the keeper. Timing closure of the self-timed chain has to be done at
circuit level.

## Where this RTL is its own design

The following points are choices made for this RTL. They are not taken from a published
circuit.

* **Ports and controls.** The `acc_clr` and `tc` ports, the reset, and the
  load-every-cycle registers.
* **Sign-extension constant.** The original array avoids sign extension with constant
  "add 1" cells, but their bit positions are not reproduced. The constant here is derived
  from the row layout.
* **Booth encoder.** The radix-4 encoder is the standard truth table. The glitch-free
  encoder circuit the design refers to is not reproduced.
* **Tree arrangement.** The exact Wallace-tree grouping, and writing every cell as a full
  adder (half adders appear only where synthesis simplifies a constant-0 input).
* **Adder structure.** One 40-bit final adder of five 8-bit stages. The original
  architecture also places MCBA segments inside the summation array. That arrangement is
  not given in enough detail to reproduce.
* **Stage carry input.** A carry input on `mcba8`. The original 8-bit stage has none
  (`S0 = P0`); with `cin = 0` the two are the same.
* **Delay value and clock phase.** The 0.2 ns full-adder delay, and reading `CLKB` as the
  inverted system clock.

Not built: the comparison designs (dual-rail completion-detecting Manchester adder, the
delayed-clock self-timed adders, the carry-lookahead adder). The circuit-level figures
(transistor counts, power, delay) are not modelled either.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `full_adder_tb`, `mbe_encoder_tb` | exhaustive truth tables |
| `mbe_decoder_tb` | row + add term = digit·X for all digits, random X |
| `booth_pp_gen_tb` | the sum of all rows equals X·Y, signed and unsigned, with corner operands; no Booth row extends past its 18 bits |
| `wallace_tree_tb` | sum + carry equals the sum of 11 random rows |
| `mcba8_tb` | all carries and sums, zero carries during precharge, no carry falls from precharge to evaluation, bypass terms used |
| `fa_delay_tb` | edge delay at two settings |
| `st_mcba_adder_tb` | stage clocks rise at (2k+1) delays, precharge output, 40-bit sum after evaluation, carries crossing stages |
| `pipe_reg_tb` | load and asynchronous reset |
| `booth_mac_tb` | end to end, default parameters (see below) |
| `booth_mac_activity_tb` | 5000 cycles of signed accumulation with operands toggling each bit with 25.78 % probability (the power-measurement pattern), every result checked |

`booth_mac_tb` runs about 4600 operations against a cycle-accurate model. It checks the
one-cycle latency and counts these mechanisms, each of which must occur:

* signed and unsigned mode
* accumulate and clear
* negated Booth rows
* the unsigned shift term
* bypass terms
* carries between adder stages
* a 40-bit wrap-around
* `adder_done` high at every capture edge

To simulate, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module booth_mac_tb \
    rtl/mac_pkg.sv tb/booth_mac_tb.sv
./obj_dir/Vbooth_mac_tb
```

`--timing` is required because the delay elements and testbenches use `#` delays. All sources
are SystemVerilog-2017, one module or package per file. Shared widths and the Booth select
type live in `rtl/mac_pkg.sv`. The widths `XW`, `YW` and `AW` are set there. The tree
structure in `wallace_tree` assumes the 11 rows that 16-bit operands produce.
