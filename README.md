# Radix-8 Booth multiplication with the 3X multiple taken out of the multiplier

Radix-8 Booth recoding cuts the partial-product matrix of an n-bit multiplier to
ceil((n+1)/3) rows, against ceil((n+1)/2) for the usual radix-4 recoding. That saves
area and power in the reduction tree. The catch is the digit ±3: 3X is a "hard"
multiple, not a shift of X. A conventional radix-8 multiplier therefore has to run a
full carry-propagate addition 2X + X before it can select any partial product, and
that addition sits on its critical path.

This design moves that addition out of the multiplier. The multiplier gets 3X as a
third operand. A separate **Tripler** unit computes 3X as one more operation of the
application's dataflow graph. The scheduler places it in a control step where the
graph has slack, so in most cases it costs no extra latency. The multiplier keeps the
short radix-8 partial-product array without the 2X + X adder in front of it.

The repository contains:

* the multiplier itself, `booth8_mult`, and its parts;
* the Tripler;
* two scheduled datapaths built from them for a Discrete Wavelet Transform (DWT)
  dataflow graph. Both use the same resources:
  * `dwt_list_unit` runs one pass per start on a 19-step list schedule;
  * `dwt_modulo_unit` accepts a stream of input sets and starts a new iteration
    every 15 steps, hiding the 3X work of each iteration in the slack of the one
    before.

  The top module, `booth8_dwt_top`, holds the two units side by side, each with its
  own ports.

## The multiplier with external 3X (`booth8_mult`)

```
      Y ──► booth8_recoder ──► digits[P] ──┐
                                           ▼
 X, 3X ─────────────────────────► booth8_selector ──► P rows + 1 correction row
                                                               │
                                          csa_tree (3:2 Wallace) ▼
                                                        sum, carry
                                                               │
                                               ks_adder (Kogge-Stone CPA)
                                                               ▼
                                                    prod (2N bits, signed)
```

**Recoding.** Y is read in overlapping 4-bit tuples
`t_p = {y[3p+2], y[3p+1], y[3p], y[3p-1]}`, with `y[-1] = 0`. Y is sign-extended to
3P bits, with P = ceil((N+1)/3): 11 digits for N = 32. Each tuple stands for the digit
`d_p = -4·y[3p+2] + 2·y[3p+1] + y[3p] + y[3p-1]`, and `Y = Σ d_p·8^p`. The hardware
carries a digit as a 3-bit magnitude code plus a sign bit:

| tuple | digit | code | sign | tuple | digit | code | sign |
|-------|-------|------|------|-------|-------|------|------|
| 0000 | +0 | 000 | 0 | 1000 | −4 | 100 | 1 |
| 0001 | +1 | 001 | 0 | 1001 | −3 | 011 | 1 |
| 0010 | +1 | 001 | 0 | 1010 | −3 | 011 | 1 |
| 0011 | +2 | 010 | 0 | 1011 | −2 | 010 | 1 |
| 0100 | +2 | 010 | 0 | 1100 | −2 | 010 | 1 |
| 0101 | +3 | 011 | 0 | 1101 | −1 | 001 | 1 |
| 0110 | +3 | 011 | 0 | 1110 | −1 | 001 | 1 |
| 0111 | +4 | 100 | 0 | 1111 | −0 | 000 | 1 |

The table lives in `booth8_pkg::recode_tuple`.

**Selection.** Row p is one of 0, X, 2X, 3X and 4X, shifted left by 3p. 2X and 4X are
wires, and 3X is the `x3` input. For a negative digit the row is inverted. The "+1"
that completes the two's-complement negation goes into a separate correction row as
bit 3p. For −0 the inverted zero row and its +1 cancel modulo 2^2N, so −0 needs no
special case. Rows are full 2N-bit sign-extended words. No sign-extension reduction
is used, so the array is correct but not area-optimal.

**Reduction and final add.** The P + 1 rows go through a word-level Wallace tree of
3:2 carry-save adders. At each level the row count falls as c → 2⌊c/3⌋ + c mod 3, so
12 rows for N = 32 take 5 levels. A Kogge-Stone adder then adds the two words that
remain.

**Contract.** `x3` must equal 3·x as an (N+2)-bit signed value. The multiplier does
not check this, and any other value gives a wrong product. The module is purely
combinational.

## The Tripler (`tripler`)

The Tripler computes `x3 = (x << 1) + x` on a Kogge-Stone adder. It is N+2 bits wide
so that the signed result never overflows: 3·(−2^(N−1)) needs N+2 bits. Its output is
written to a register and fed to a multiplier in a later control step.

## The DWT datapaths

### Dataflow graph

There are 17 operations: products 1, 3, 5, 6, 9, 10, 13 and 14, and sums for the rest.
An operand that does not come from another operation is a primary input, `in_data[0..17]`:

```
V1 = in0*in1     V3 = in2*in3     V2 = V1+in4     V4 = V2+V3
V5 = in5*V4      V6 = in6*in7     V7 = V5+in8     V8 = V6+in9
V9 = V8*V7       V10 = in10*in11  V11 = V9+in12   V12 = V10+in13
V13 = V12*V11    V14 = in14*in15  V15 = V13+in16  V16 = V14+in17
result = V17 = V15+V16
```

In each product the first factor is the multiplicand X, the one whose 3X is
precomputed. The second factor is Booth-recoded. The tripled operand of a product is
the predecessor that leaves the most slack. For the products fed by two sums (9 and 13)
that is the sum which finishes earlier: V8 and V12. For the others it is a primary
input, which can be tripled at any time.

### Resources and schedule

The datapath has:

* 2 multipliers, with latency 3;
* 1 adder, with latency 1;
* 1 tripler, with latency 1.

The list-schedule controller (`dwt_controller`) runs this fixed schedule of 19
control steps. `Tn` is the 3X register read by product n:

| step | multiplier 0 | multiplier 1 | adder | tripler |
|------|--------------|--------------|-------|---------|
| 1 | | | T1 = 3·in0 | T3 = 3·in2 |
| 2–4 | V1 = in0·in1 | V3 = in2·in3 | | T6 = 3·in6 (step 4) |
| 5 | | V6 = in6·in7 (5–7) | V2 | |
| 6 | | | V4 | T5 = 3·in5 |
| 7–9 | V5 = in5·V4 | | V8 (step 8) | T10 = 3·in10 (step 8) |
| 9–11 | | V10 = in10·in11 | V7 (step 10) | T9 = 3·V8 (step 10) |
| 11–13 | V9 = V8·V7 | | V12 (step 12) | T14 = 3·in14 (step 12) |
| 13–15 | | V14 = in14·in15 | V11 (step 14) | T13 = 3·V12 (step 14) |
| 15–17 | V13 = V12·V11 | | V16 (step 16) | |
| 18 | | | V15 | |
| 19 | | | V17 (result) | |

Apart from step 1, every 3X lands in slack: the tripler works alongside the adder while
the multipliers are busy. Only the first two products have no earlier step to hide
their 3X in. That costs one step: without 3X nodes the same graph takes 18 steps.
Step 1 needs two 3X values at once. The adder is idle in that step, so it computes the
second one in its **triple mode**, 2a + a. For this reason the adder is built W+2 bits
wide.

### Overlapped schedule (`dwt_modulo_unit`, `dwt_modulo_controller`)

The extra step of the list schedule disappears once iterations overlap. The streaming
unit does part of the next iteration's work in steps 9–15 of the current one, in
slots the current iteration leaves free:

* 3X of products 1, 3 and 6;
* products 1 and 3;
* sum 2.

The rest of each iteration then fits in steps 1–14, so a new iteration starts every
15 steps on the same 2 multipliers, 1 adder and 1 tripler.

| step | multiplier 0 | multiplier 1 | adder | tripler |
|------|--------------|--------------|-------|---------|
| 1 | | V6 = in6·in7 (1–3) | V4 = V2+V3 | T5 = 3·in5 |
| 2–4 | V5 = in5·V4 | | V8 (step 4) | T10 = 3·in10 (step 3) |
| 4–6 | | V10 = in10·in11 | V7 (step 5) | T9 = 3·V8 (5), T14 = 3·in14 (6) |
| 6–8 | V9 = V8·V7 | V14 = in14·in15 (7–9) | V12 (step 7) | T13 = 3·V12 (step 8) |
| 9 | | | V11 | **next** T1 = 3·in0 |
| 10–12 | V13 = V12·V11 | **next** V1 = in0·in1 | V16 (step 11) | **next** T3 = 3·in2 (12) |
| 13–15 | **next** V3 = in2·in3 | | V15 (13), V17 (14), **next** V2 = V1+in4 (15) | **next** T6 = 3·in6 (14) |

Because two iterations are in flight, the inputs are held in two banks. An accepted
input set goes to the *next* bank, which the next-iteration operations read. At the
end of step 15 that set moves to the *current* bank (the swap). Every value register
is free again before the next iteration writes it, so one register per value is
still enough.

**Handshake** (valid/ready):

* `in_ready` is high while idle and in step 8 of each period.
* A set accepted while idle starts a 7-step prologue that runs only steps 9–15.
* If no set is offered at step 8, the current iteration finishes and the unit goes
  idle.
* `out_valid` pulses 21 cycles after the set was accepted.
* Under a continuous stream, results come every 15 cycles, in input order.

### Registers, routing and timing

* **Registers.** Each primary input, each operation result and each 3X value has its
  own register, with a load enable and an asynchronous active-low reset. Registers
  are not shared between values. 3X registers are W+2 bits wide.
* **Routing.** Each functional-unit input is a multiplexer over the input and value
  registers, selected by the controller's control word (`dwt_pkg::dwt_ctrl_t`).
* **Multipliers are multicycle.** A product's operand selects stay fixed for its 3
  steps, and the destination register loads at the end of the third step. Timing
  closure needs a 3-cycle multicycle constraint from the operand registers through
  `booth8_mult` to the value registers.
* **Arithmetic.** Arithmetic is W-bit two's complement and wraps around. A product
  keeps the low W bits of the 2W-bit result.
* **Handshake of the one-pass unit.** While `busy` is low, a one-cycle `start`
  captures `in_data`. Steps 1–19 follow in the next 19 cycles, and `cstep` shows the
  current step. `done` pulses 19 cycles after the clock edge that sampled `start`,
  and `result` then holds V17 until the next run. A `start` seen while busy is
  ignored. A new run may start in the cycle `done` is high.

The functional units, registers and routing live in `dwt_datapath`, which both units
share; only the controller and the input banks differ. Assertions in `dwt_datapath`
check that two units never write the same register in one step, and that a
multiplier's operands are unchanged over the three steps before its result loads.

## Where this departs from, or goes beyond, the published approach

* **Resource set.** The DWT resource set (2 multipliers, 1 adder, 1 tripler) and the
  schedule are those of the worked DWT example. The published benchmark datapaths use
  2 multipliers, 2 adders and 2 triplers, but their graphs and schedules are not
  available, so only the DWT datapath is built.
* **Modulo schedule.** The slot of every operation in the overlapped schedule follows
  the published one. The valid/ready handshake, the prologue, the stop when no input
  is waiting and the two input banks are this design's choices. A target of 13 steps
  is also reported for the DWT with a larger resource set (2 multipliers, 2 adders);
  that schedule is not available and is not built.
* **DWT inputs.** The DWT coefficients and samples are not specified. Every
  unconnected operand is a primary input.
* **Tripler width.** The published Tripler is an (n+1)-bit adder. Here it is N+2 bits,
  so that a signed 3X never overflows.
* **Step-1 binding.** Binding the second 3X of step 1 to the adder is this design's
  reading of a schedule that shows two 3X nodes with one tripler.
* **Adder choices.** The final adder of the multiplier is also Kogge-Stone, and the
  reduction tree is a Wallace tree of 3:2 adders. The source only names these stages.
* **Not built.** The radix-4 and conventional radix-8 (internal 3X) multipliers that
  serve as comparison points are not part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/booth8_pkg.sv` | digit types, recoding table, digit count |
| `rtl/booth8_recoder.sv` | Y → P Booth digits |
| `rtl/booth8_selector.sv` | digit → selected, shifted, conditionally inverted rows |
| `rtl/csa_tree.sv` | K rows → 2 (3:2 Wallace tree), parameters K, W |
| `rtl/ks_adder.sv` | Kogge-Stone adder, parameter W |
| `rtl/booth8_mult.sv` | the multiplier with external 3X, parameter N (default 32) |
| `rtl/tripler.sv` | 3X = 2X + X, parameter N (default 32) |
| `rtl/dwt_pkg.sv` | DWT datapath constants and control-word types |
| `rtl/dwt_datapath.sv` | FUs, value/3X registers, operand routing, parameter W |
| `rtl/dwt_controller.sv` | step-counter FSM holding the 19-step list schedule |
| `rtl/dwt_list_unit.sv` | one-pass unit: input bank + `dwt_controller` + `dwt_datapath` |
| `rtl/dwt_modulo_controller.sv` | FSM of the 15-step overlapped schedule with valid/ready |
| `rtl/dwt_modulo_unit.sv` | streaming unit: two input banks + modulo controller + `dwt_datapath` |
| `rtl/booth8_dwt_top.sv` | both units side by side, parameter W (default 32) |

Each file in `tb/` tests the block in its name. `tb_booth8_mult_sizes` runs the
multiplier at 8, 16, 32, 64 and 128 bits. The datapath testbenches check results
against a reference evaluation of the graph in 32-bit wrap-around arithmetic:

* `tb_dwt_list_unit` runs 65 passes and checks the 19-cycle latency.
* `tb_dwt_modulo_unit` streams 41 input sets, with and without gaps. It checks the
  21-cycle latency and the 15-cycle result spacing.
* `tb_booth8_dwt_top` drives both units at once at the default width.

Each also counts how often each mechanism occurs and fails if one never does:
tripling a primary input, tripling an intermediate value, the adder's triple mode, a
−3 digit selecting the external 3X, overlapped iterations, a stream stall,
back-to-back runs and an ignored start.

The two controller testbenches keep their own copy of the graph. They check every
control word for the right operands, data readiness, the 3-step hold of products and
3X readiness. The modulo one also tags every register write with its iteration, so
that no operation reads a value from the wrong iteration.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/booth8_pkg.sv rtl/dwt_pkg.sv tb/tb_booth8_dwt_top.sv \
    --top-module tb_booth8_dwt_top --Mdir obj -o sim && ./obj/sim
```

Replace the testbench name to run another one. The packages must come first on the
command line; `-y rtl` finds the modules.

## Changing it

* **Multiplier width.** Change `N` of `booth8_mult` and `tripler`. The digit count,
  row count and tree depth follow from it.
* **Datapath width.** Change `W` of `booth8_dwt_top` or of either unit.
* **Another schedule or graph.** Edit the four `case` blocks, one per functional unit,
  in `dwt_controller` or `dwt_modulo_controller`. If needed, change the counts in
  `dwt_pkg` too. Update the copy of the graph in the matching controller testbench
  along with the schedule.
* **Only one schedule.** Instantiate `dwt_list_unit` or `dwt_modulo_unit` directly.
