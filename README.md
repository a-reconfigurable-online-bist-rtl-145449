# Neural-network online tester for combinational circuits

A combinational circuit can fail while it is in use: wear-out, crosstalk or a particle
strike turn a correct gate into a stuck one, and nobody notices until the wrong result has
done damage. This design watches such circuits **on line**, while they do their normal
work. It never stops a circuit or drives test patterns into it. Now and then it samples the
circuit's inputs and outputs, recomputes what the outputs should be, and raises an error
when they differ.

The recomputation is done by a small feed-forward neural network that models the truth
table of the circuit. The network's coefficients sit in a ROM, so one piece of hardware
can model many different circuits: a second, small ROM holds, for each circuit, where its
coefficients start and how many input, hidden and output neurons its network has.
Switching circuits means changing a pointer. To keep the area small the network is not
built as parallel hardware. One neuron's worth of arithmetic (a sequential multiplier, a
saturating adder and a piecewise-linear sigmoid) is reused for every neuron in turn. The
cost is latency: a test takes hundreds to thousands of cycles, and the input patterns the
circuit sees meanwhile are not checked. A permanent fault is still caught by a later
sample that exposes it.

The RTL in `rtl/` is the tester, `nn_bist`, together with five benchmark circuits it
watches (`bist_top`):

| circuit | module | in / out | hidden neurons | one test (cycles) |
|---|---|---|---|---|
| ISCAS-85 C17 | `c17` | 5 / 2 | 3 | 222 |
| 4-bit look-ahead carry generator (74182) | `ttl74182` | 9 / 5 | 5 | 722 |
| 4-bit binary adder (74283) | `ttl74283` | 9 / 5 | 8 | 1148 |
| 4-bit magnitude comparator (7485) | `ttl7485` | 11 / 3 | 3 | 434 |
| 4-bit divider, quotient and remainder | `div4` | 8 / 8 | 43 | 6984 |

## One test, step by step

Each network has three layers. There is one input neuron per circuit input bit, a
hidden layer, and one output neuron per circuit output bit. A neuron computes
`F(bias + sum(w_i * x_i))`. A test of the selected circuit runs as follows
(`nn_controller`):

1. **SAMPLE** (1 cycle). The circuit's input vector goes into a circular shift register
   (`in_shift_reg`) and its output vector into the output shift register of
   `out_checker`. The circuit's entry of the controller ROM (`cfg_rom`) is latched, and
   the coefficient address is set to the circuit's first word.
2. **Hidden layer.** For each hidden neuron:
   - BIAS (1 cycle): the bias is loaded into the accumulator (`sat_acc`).
   - Then, for each input bit (10 cycles each): the bit leaves the circular
     register as 0 or 1.0. The sequential multiplier (`seq_mult`, one operand bit per
     clock) multiplies it by the next weight. The product is truncated and added with
     saturation. The register rotates, so after the last input it holds the vector again,
     ready for the next neuron.
   - ACT (1 cycle): the sum passes through the activation (`plan_logsig`). The result
     goes into the hidden RAM (`hidden_ram`) at the neuron's index.
3. **Output layer.** The same steps run for each output neuron, with the stored hidden
   values as multiplier operands. In ACT the activation is rounded to a bit (1 when
   `F >= 0.5`, i.e. when either of its two top bits is set). That bit is compared with
   the next bit shifted out of the output register. A difference pulses `err`, together
   with `err_cut` and `err_bit`, and sets the circuit's sticky bit in `fault_flags`.
4. **DONE** (1 cycle): `test_done` pulses. If `enable` is still high, the next SAMPLE
   follows directly.

A test therefore takes `2 + n_hid*(2 + n_in*10) + n_out*(2 + n_hid*10)` cycles, as listed
in the table above. The tester looks at a circuit's vectors only in the SAMPLE cycle.

The coefficients are stored in exactly the order they are used, so both the ROM and the
RAM are only ever addressed by a counter that increments. There is no address arithmetic
anywhere. Per circuit the coefficient region is laid out as:

```
hidden 0: bias, w(in0), w(in1), ... w(in n_in-1)
hidden 1: bias, w(in0), ...
...
output 0: bias, w(hid0), w(hid1), ... w(hid n_hid-1)
output 1: ...
```

A network therefore takes `n_hid*(n_in+1) + n_out*(n_hid+1)` words. The regions lie back
to back in CUT-table order. The start pointers are 0, 26, 106, 231 and 279, and the last
region ends at word 1018 of the 1024-word ROM. `cfg_rom` computes these pointers at
elaboration time from the neuron counts in `nn_bist_pkg`.

## Number formats and the activation

All arithmetic is fixed point. `uX.Y` means unsigned with X integer and Y fraction bits;
`sX.Y` means two's complement with X integer bits (sign included) and Y fraction bits.

| quantity | format | bits |
|---|---|---|
| hidden neuron value (RAM), multiplier operand | u1.7 | 8 |
| weight / bias (coefficient ROM) | s6.7 | 13, range -32 .. +31.99 |
| truncated product, accumulator | s6.7 | 13 |

These widths are the largest any of the five networks needs, so one data path serves
them all. Smaller networks would get by with fewer bits, e.g. C17 with u1.2 / s5.0.
Arithmetic details:

- The full 21-bit product of a u1.7 operand and an s6.7 weight is shifted right
  arithmetically by 7 bits and saturated to s6.7. Biases go into the accumulator
  unchanged.
- The accumulator clamps at +31.99 / -32 instead of wrapping, so a strongly driven neuron
  keeps the sign of its sum. `acc_saturated` reports a clamped addition.
- The activation is the logistic sigmoid `F(S) = 1/(1+e^-S)`, approximated by the
  PLAN piecewise-linear scheme. All slopes are powers of two, so the unit needs no
  multiplier and no table:

  | \|S\| | F |
  |---|---|
  | ≥ 5 | 1 |
  | 2.375 … 5 | \|S\|/32 + 0.84375 |
  | 1 … 2.375 | \|S\|/8 + 0.625 |
  | 0 … 1 | \|S\|/4 + 0.5 |

  For negative S, F(S) = 1 - F(-S). The segment value is computed exactly with 12
  fraction bits and then truncated to u1.7. Over the whole s6.7 input range the result
  stays within 0.03 of the exact sigmoid.

Because every rounding step is specified, the network is **bit-true**. For a given
coefficient image and input vector the hardware produces exactly one answer. The
testbenches reproduce it with an independent integer model (`tb/tb_nn_ref_pkg.sv`). A
network is only usable in this tester if that fixed-point evaluation matches the circuit
on *every* input vector. Otherwise the tester raises false alarms.

## Reconfiguration and round-robin

`cut_scheduler` selects which circuit is under test. Its multiplexers route the selected
circuit's vectors to the tester. The circuits' vectors are zero-extended to 11 input bits
and 8 output bits. After `tests_per_cut` completed tests the scheduler moves to the next
circuit, wraps after the last one, and pulses `cut_switched`. `tests_per_cut` is a
run-time input, so the dwell time can be changed while the tester runs. A value of 0
acts as 1. A test that has started finishes with the configuration latched at its
SAMPLE.

## Coefficient image

The RTL takes the coefficients from a hex file, set by the `COEF_FILE` parameter of
`bist_top` and `nn_bist` and by `INIT_FILE` of `coef_rom`. The file has one 13-bit word
per line, in the layout above, and is read with `$readmemh`. The path is relative to the
simulator's working directory. The default is `rtl/nn_coef.hex`, so run from the
repository root. Words beyond the end of the file read as zero. The ROM's contents exist
only in this file. A synthesis front end that ignores `$readmemh` (the slang front end
of yosys is one) therefore sees an all-zero ROM. It then removes the ROM and most of
the data path as constant logic, and its area figures are meaningless. Use a flow that
honours `$readmemh`, or map the ROM to a macro loaded from the same file.

The shipped image holds trained networks for all five circuits, using the hidden-layer
sizes of the table above. Each network was trained offline on its circuit's full truth
table in two stages:

1. Ordinary gradient training with a smooth sigmoid.
2. Quantisation-aware fine-tuning through the exact fixed-point arithmetic of the
   hardware, with products truncated, sums saturated and the activation piecewise and
   truncated.

The 74283 network starts from a hand-made structure instead of random weights:

- Four hidden neurons keep a weighted input sum, one per bit position, in the linear part
  of the sigmoid.
- Four hidden neurons act as carry detectors.
- Each sum bit is then a threshold of a linear combination of those neurons.

In the bit-true model each network is **exact**: it predicts every output bit correctly
for every input combination. A fault-free circuit therefore never raises an alarm, and
any wrong output that gets sampled is reported. If you regenerate the image, keep it
exact for every circuit. Otherwise the tester reports false errors on the input patterns
that the network gets wrong.

## Files

| file | contents |
|---|---|
| `rtl/nn_bist_pkg.sv` | formats, limits, CUT table, `nn_cfg_t`, pointer arithmetic |
| `rtl/bist_top.sv` | five circuits + tester |
| `rtl/nn_bist.sv` | the tester: data path wiring, product truncation, sticky flags |
| `rtl/nn_controller.sv` | test sequencer FSM |
| `rtl/cut_scheduler.sv` | round-robin choice and CUT multiplexers |
| `rtl/cfg_rom.sv`, `rtl/coef_rom.sv` | controller ROM, coefficient ROM |
| `rtl/hidden_ram.sv` | hidden-value RAM (43 x 8) |
| `rtl/in_shift_reg.sv`, `rtl/out_checker.sv` | input rotator; output register and comparator |
| `rtl/seq_mult.sv`, `rtl/sat_acc.sv`, `rtl/plan_logsig.sv` | multiplier, saturating accumulator, activation |
| `rtl/c17.sv`, `rtl/ttl74182.sv`, `rtl/ttl74283.sv`, `rtl/ttl7485.sv`, `rtl/div4.sv` | the monitored circuits |
| `rtl/nn_coef.hex` | trained coefficient image, 1018 words |
| `tb/tb_*.sv` | one self-checking testbench per unit; `tb_nn_bist`, `tb_bist_top` and `tb_mfdl` for the whole tester |
| `tb/coef_test.hex` | four-word image used by `tb_coef_rom` |
| `tb/tb_nn_ref_pkg.sv` | integer reference model of the network, test-length formula, circuit models |

Bit order of the circuit vectors (bit 0 first):

- C17: `in = {N7,N6,N3,N2,N1}`, `out = {N23,N22}`.
- 74182: `in = {G3_n..G0_n, P3_n..P0_n, Cn}`, `out = {P_n, G_n, Cn+z, Cn+y, Cn+x}`.
- 74283: `in = {C0, B, A}`, `out = {C4, S}`.
- 7485: `in = {I_gt, I_eq, I_lt, B, A}`, `out = {O_gt, O_eq, O_lt}`.
- Div4: `in = {divisor, dividend}`, `out = {remainder, quotient}`. Division by zero gives
  quotient 15 and remainder = dividend.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. From the
repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nn_bist_pkg.sv tb/tb_nn_ref_pkg.sv \
    tb/tb_bist_top.sv --top-module tb_bist_top -Mdir obj -o sim && obj/sim
```

The other testbenches are built the same way (`-Irtl` lets verilator find the modules by
file name). Plain unit testbenches need only their own file and the unit's file. The
full-system run (`tb_bist_top`, default parameters, 41 tests, about 53 000 cycles) takes
well under a second.

What the testbenches establish:

- `tb_plan_logsig` evaluates all 8192 accumulator values against the real-arithmetic PLAN.
- `tb_seq_mult` checks random and corner products and the 9-cycle latency.
- `tb_sat_acc` checks the accumulator against a clamped integer model, including the
  `sat` flag.
- `tb_in_shift_reg`, `tb_out_checker`, `tb_hidden_ram`, `tb_coef_rom`, `tb_cfg_rom` and
  `tb_cut_scheduler` cover the storage and control units. `tb_cut_scheduler` includes
  dwell changes on the fly.
- `tb_cuts` checks every input combination of the five circuits.
- `tb_nn_bist` runs the tester on stimulus vectors. Its ROM is filled with a hand-built
  exact C17 network and random words for the other circuits, so that saturation and
  mismatches occur often. Every output check is compared with the reference model,
  every test length with the formula, the circuit order with the round-robin rule, and
  the fault flags with the errors seen. It also requires that saturation, errors and
  switches all occur.
- `tb_bist_top` runs the real circuits with the shipped image and changing inputs. It
  first checks that every network is exact. Midway it forces a stuck-at-1 on C17's net
  N16. It requires zero alarms on fault-free circuits and at least one C17 alarm while
  the fault is present. It also checks dwell changes while running, saturation, and that
  all five circuits were tested.
- `tb_mfdl` measures the mean fault-detection latency (below).

## Detection latency

`tb_mfdl` injects single stuck-at faults one at a time, at a random moment, while the
circuit inputs change randomly every cycle. For C17 the faults are on its nine internal
and input nets and its two outputs. For the other circuits they are on the output bits.
The testbench counts the cycles from injection until the tester flags the circuit. Every
fault is detected. Mean latencies in clock cycles:

| case | mean latency | figure published for the method |
|---|---|---|
| C17 only, tester dwelling on it (22 faults) | 815 | 221 (stand-alone C17 tester) |
| C17, round-robin over all five | 21 625 | |
| 74182, round-robin | 12 343 | 1 417 (stand-alone) |
| 74283, round-robin | 14 850 | 3 121 (stand-alone) |
| 7485, round-robin | 92 908 | 1 955 (stand-alone) |
| Div4, round-robin | 37 662 | 20 633 (stand-alone) |
| all 64 faults, round-robin | 29 808 | 31 432 (combined tester) |

The combined tester's overall figure is close to the published one. The stand-alone
figures are not directly comparable. They come from smaller per-circuit testers, and the
exact fault list is not stated.

A test is only useful if the sampled input excites the fault. A test of C17 takes 222
cycles, so the 815-cycle dedicated latency means a C17 fault takes about three to four
tests to be exposed. Under round-robin, a circuit waits for the other four between its
own tests. One full round takes about 9 500 cycles.

## Design choices beyond the specification

The architecture follows the specification: the single time-multiplexed neuron, the
units it names, the formats, the coefficient order, the controller ROM contents and the
round-robin switching. The following details are this implementation's own:

- The sx.y notation is read as "x integer bits including the sign".
- Biases go into the accumulator without a multiplication.
- Products are truncated by arithmetic shift and then saturated.
- The output bit is `F >= 0.5`.
- The segment constants are those of the published PLAN scheme. The truncation of the
  activation to 7 bits is this implementation's choice.
- The ROM and RAM have asynchronous read ports, and the multiplier is radix 2 with a
  one-cycle `ready` pulse.
- There is an active-low asynchronous reset.
- Error reporting uses a pulse with circuit and bit index, plus sticky flags.
- The bit order of every circuit vector, and the divider's divide-by-zero result, are
  this implementation's choices.
- The RAM holds 43 words, the largest single hidden layer, not the 62 hidden neurons of
  all five networks together. Only one network is evaluated at a time.
- The coefficient ROM has 1024 words; 1018 are used.
