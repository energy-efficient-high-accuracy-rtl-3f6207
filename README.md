# Approximate multiplier with adaptive truncation, in a small character-classifying network

Multipliers dominate the energy and area of many signal-processing and
neural-network datapaths, yet these workloads tolerate small arithmetic
errors. This design replaces the full 16 x 16 array multiplier with an
*approximate* one. The multiplier normalises each operand around its leading
one. It keeps only a few bits of what lies below that one, and then needs
just a 4 x 4 bit product. Small operands keep all their bits. Large ones are
truncated, so the precision adapts to the magnitude of the operands.

To show the multiplier at work, the design also builds a small fixed-point
neural network around it. The network classifies a character code (the
letters a-z) into one of four classes and shows the result on two LEDs. All
32 products of the network go through the approximate multiplier.

Everything is plain synthesizable SystemVerilog (IEEE 1800-2017). The multiplier
is combinational. The network takes one clock per layer.

## The approximate multiplier

### Idea

Write the magnitude of an operand as

    |A| = 2^kA * (1 + YA),     0 <= YA < 1

where `kA` is the position of the leading one and `YA` is the fraction formed
by the bits below it. The exact product is then

    |A|*|B| = 2^(kA+kB) * (1 + YA + YB + YA*YB).

The multiplier makes two cuts:

* `(Y)t`: the fraction truncated to its **T** most significant bits. It is
  used for the two linear terms.
* `(Y)APX`: the first **H** bits of `(Y)t` followed by a 1. This rounds the
  fraction to the nearest odd value on H+1 bits, so the truncation error is
  centred on zero instead of always pointing down. It is used only in the
  cross term.

The approximate product is

    |A*B|app = 2^(kA+kB) * (1 + (YA)t + (YB)t + (YA)APX * (YB)APX)

The only multiplication left is (H+1) x (H+1) bits (4 x 4 with the defaults).
Everything else is leading-one detection, selection, addition and one barrel
shift.

Defaults: operands `N = 16` bits (two's complement), product `2N = 32` bits,
`H = 3`, `T = 7`.

### Worked example (A = 1000, B = 3000)

| step | A = 1000 | B = 3000 |
|---|---|---|
| binary | `11 1110 1000` | `1011 1011 1000` |
| leading one k | 9 | 11 |
| fraction below it | `111101000` | `01110111000` |
| (Y)t, 7 bits | `1111010` = 122/128 | `0111011` = 59/128 |
| (Y)APX, 3 bits + `1` | `1111` = 15/16 | `0111` = 7/16 |

The arithmetic unit works with F = max(T, 2H+2) = 8 fraction bits:
256 + 2*122 + 2*59 + 15*7 = 723, i.e. 2.824.
The shift by k = 9 + 11 = 20 gives 723 * 2^20 / 2^8 = 2 961 408.
The exact product is 3 000 000, so the error is -1.3 %.

### Datapath (`rtl/approx_multiplier.sv`)

    a,b ─► approx_abs_unit ─► |A|,|B| (15 b) ─► leading_one_detector (x2) ─► one-hot K, binary k
                 │  zero, sign                  │                                  │
                 │                              └──► truncation_unit (x2) ─► (YA)t, (YB)t (T b)
                 │                                        arithmetic_unit ─► p (2+F b, F fraction)
                 │                                        shift_unit (<< kA+kB, drop F) ─► |prod| (32 b)
                 └──────────────────────────────────────► sign_zero_detector ─► prod (32 b, signed)

| unit | what it does |
|---|---|
| `approx_abs_unit` | Takes the magnitude of a negative operand as its one's complement: the bits XORed with the sign, with no +1. Gives `sign = sA ^ sB` and `zero` when either magnitude is 0. |
| `leading_one_detector` | Gives the leading-one position as a one-hot vector (for the truncation unit) and as a 4-bit index (for the shifter). |
| `truncation_unit` | AND-OR selection of the T bits right below the one-hot position. Bits below bit 0 read as 0, so an operand with at most T bits under its leading one passes exactly. |
| `arithmetic_unit` | Computes `1 + (YA)t + (YB)t + (YA)APX*(YB)APX` on `2 + max(T, 2H+2)` bits. |
| `shift_unit` | Shifts left by `kA+kB` and drops the F fraction bits (truncation, not rounding). |
| `sign_zero_detector` | Forces the result to 0 on `zero`. Otherwise it XORs the magnitude with `sign`, a one's-complement negation. |

### Accuracy and its quirks

`tb_multiplier_accuracy` measures the error against the exact product over
100 000 random pairs per operand set. MRED is the mean relative error
distance, |approx - exact| / |exact|, averaged over all pairs.

| operand set | MRED | largest relative error | mean signed error |
|---|---|---|---|
| uniform signed 16-bit | 1.06 % | 49 % | -0.34 % |
| signed, random magnitude (log-scale) | 7.6 % | 75 % | -6.7 % |
| positive, 1..255 (nothing truncated) | 1.12 % | 3.2 % | +0.53 % |

* With positive operands the error stays small for every magnitude: under
  about 15 %, and about 1 % on average. The bound comes from the cross
  term, since each `(Y)APX` is within 2^-(H+1) of the true fraction.
* **Small negative operands are the weak spot.** The magnitude of a negative
  operand is taken as its one's complement, which is one less than the true
  magnitude. That costs a relative error of 1/|x|: -3 behaves like 2 and -2
  like 1. This causes the large worst cases above and the higher error of the
  log-scale set, where small negative values are common. For such data, a
  two's-complement magnitude (an incrementer per operand) would remove the
  effect.
* Negative products are negated by one's complement too, so they come out
  one LSB low.
* The magnitude of -1 is taken as 0, so **-1 times anything is 0**.
  Likewise -32768 has magnitude 32767.
* Products of short operands are still approximate: the cross term always
  uses the H-bit rounded fractions.

## The character classifier (`rtl/top_ann_with_proposed_mul.sv`)

### Dataflow

    data_in ─► char_rec register ─► char_encoder ─► layer 1 (4 neurons x 4 inputs)
            ─► layer 2 (2 neurons x 4 inputs) ─► layer 3 (4 neurons x 2 inputs) ─► y[0..3]
            ─► output_classifier ─► led_out2, led_out1

* **Number format.** Activations, weights and biases are signed Q8.8: 16 bits,
  8 of them fraction. This is exactly the multiplier's operand width.
* **Encoder** (`char_encoder`). A letter 'a'..'z' (ASCII, 9-bit input) becomes
  its index c = 0..25. The four inputs are `c[1:0]`, `c[3:2]`, `c[4]` and a
  constant 1 meaning "a letter is present", each as an integer in Q8.8. Any
  other code gives four zeros.
* **Neuron** (`ann_neuron`). Each input is multiplied by its weight in its own
  approximate multiplier. The Q16.16 products and the bias (shifted into
  Q16.16) are added in a 38-bit accumulator. The sum is scaled back to Q8.8 by
  an arithmetic shift (rounding toward minus infinity) and goes to the
  activation unit.
* **Activation** (`activation_unit`). The parameter `ACT` selects one of two:
  * `ACT_RELU` (default): negative values become 0, and values above 0x7FFF
    saturate there.
  * `ACT_SIGMOID`: a piecewise-linear sigmoid built from shifts and adds.
    For |s| < 1 it is |s|/4 + 0.5. For |s| < 2.375 it is |s|/8 + 0.625. For
    |s| < 5 it is |s|/32 + 0.84375. Beyond that it is 1. A negative s gives
    1 - f(|s|).
* **Layer** (`ann_layer`). All neurons of a layer work in parallel. Their
  outputs are registered on a clock edge where the layer's enable is high.
* **Classifier** (`output_classifier`). The index of the largest output (the
  lower index on a tie) drives `led_out2:led_out1`.

### Parameter memory (`ann_param_mem`)

The memory holds 42 words of 16 bits. A synchronous reset loads built-in
values, and the write port can change any word at run time. Every word is
wired out at once, because all 32 multipliers need their weights in the same
cycle.

| address | contents |
|---|---|
| 0-15 | `w1[i][j]` at `4*i + j` (layer-1 neuron i, input j) |
| 16-23 | `w2[i][j]` at `16 + 4*i + j` |
| 24-31 | `w3[i][j]` at `24 + 2*i + j` |
| 32-35, 36-37, 38-41 | biases `b1`, `b2`, `b3` |

The built-in values, listed in `ann_pkg::param_default`, are multiples of 0.25.
They are a **placeholder set, not trained weights**. They give varied outputs
over the alphabet, but the classes carry no meaning. For a real classifier,
load trained weights through the write port, or change the function.

### Control and timing (`ann_controller`)

The controller is a four-state machine: IDLE, then layer 1, layer 2 and
layer 3.

| clock edge | event |
|---|---|
| 0 | `data_valid && data_ready`: the character is captured in `char_rec` |
| 1 | layer 1 written |
| 2 | layer 2 written |
| 3 | layer 3 written: `y`, the LEDs and `counter` are updated |
| after 3 | `done` is high for one cycle, and `data_ready` is high again |

The throughput is one character per 4 cycles. If `data_valid` is held high,
a new character is accepted in every cycle where `done` is high. A character
offered during a pass waits, because `data_ready` is low. `counter` counts the
classified characters modulo 32. `rst` is synchronous and active-high. It
clears the layer registers, `char_rec`, `counter` and `done`, and reloads the
parameter memory.

The controller carries assertions for this sequence: exactly one phase at a
time, layer 1 then 2 then 3 then `done`, and loads only while idle. No
state carries over from one character to the next, because every pass
rewrites all three layer registers.

A parameter written during a pass takes effect in whichever layer is
evaluated next. Write parameters only while the network is idle.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `data_in` | in | 9 | character code (ASCII) |
| `data_valid` / `data_ready` | in / out | 1 | accept when both are high |
| `param_we`, `param_addr`, `param_wdata` | in | 1, 6, 16 | parameter write (Q8.8) |
| `char_rec` | out | 9 | character of the current or last pass |
| `y[0:3]` | out | 4 x 16 | output-layer activations, Q8.8 |
| `led_out1`, `led_out2` | out | 1 | winning class, bit 0 and bit 1 |
| `done` | out | 1 | one-cycle pulse, results valid |
| `counter` | out | 5 | characters classified, mod 32 |

The top has one parameter, `ACT`, with default `ACT_RELU`.

## Where the design follows its source and where it chooses

Taken from the original description:

* the multiplier's six units and how they connect;
* the arithmetic expression `1 + (YA)t + (YB)t + (YA)APX*(YB)APX` and its width
  `2 + max(t, 2h+2)`;
* truncation to two lengths with rounding to the nearest odd value;
* the 16-bit operands and 32-bit result;
* the network sizes: 4 inputs, weights `w1` 4x4 and `w2` 2x4, 4 outputs;
* ReLU or sigmoid activation, and reset logic;
* the port names `clk`, `rst`, `data_in[8:0]`, `char_rec[8:0]`, `led_out1`,
  `led_out2`, `counter[4:0]`, and the top's name.

This design's own choices:

* `H = 3` (so the rounded operand is 4 bits wide) and `T = 7`;
* the one's-complement magnitude and negation, and the zero rule;
* the Q8.8 format, floor rounding and saturation;
* the character encoding, because 26 letters do not fit the 4-bit code the
  description mentions;
* the built-in weights;
* the register-file parameter memory and its write port;
* the valid/ready handshake and the one-layer-per-clock schedule;
* ReLU as the default activation and the sigmoid's segments;
* the arg-max rule and the LED coding.

Not built:

* 54-bit signals `y1..y5` and `y1_g2..y5_g2`, a second character register
  `char_rec2`, and an on-chip logic analyser. These appeared in the original
  design's debug setup, but their function is not known.
* The FPGA board-level flow: bitstream, programming and power measurement.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`.
`tb/approx_ref_pkg.sv` holds the reference models. They compute the
approximate product from its formula with integer arithmetic, not from the
RTL's bit selections, and they evaluate the whole network.

Main tests:

* `tb_approx_multiplier`: compares against the reference bit for bit, checks
  accuracy against the exact product, and covers zero, negative, truncated and
  short operands.
* `tb_top_ann_with_proposed_mul`: runs the whole design at its default size.
  It sends all 26 letters and checks the 3-cycle latency and the 4-cycle
  throughput. It then loads random parameter sets and saturating weights
  through the write port, and resets. It requires each mechanism to occur at
  least once: a stall, a parameter write, a ReLU clip, a saturation, a
  truncated operand, a zero operand, a negative product, and two different
  winning classes.
* `tb_top_ann_sigmoid`: the same traffic with `ACT = ACT_SIGMOID`.
* `tb_multiplier_accuracy`: the error statistics in the table above.

Build and run one test with plain Verilator (5.x). Packages go first:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/*_pkg.sv tb/approx_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
        tb/tb_top_ann_with_proposed_mul.sv --top-module tb_top_ann_with_proposed_mul
    ./obj_dir/Vtb_top_ann_with_proposed_mul

Each test takes well under a second.

## Changing it

* **Truncation lengths.** Set `MUL_H` and `MUL_T` in `rtl/approx_mul_pkg.sv`,
  or override `H` and `T` on `approx_multiplier`, `ann_neuron` or
  `ann_layer`. They must satisfy `1 <= H <= T <= N-2`. Larger values buy
  accuracy with a bigger (H+1)-bit multiplier and wider adders. The
  multiplier testbenches pass T = 7 and H = 3 to the reference functions
  explicitly, and the network reference uses `RT`/`RH` in
  `tb/approx_ref_pkg.sv`. All of these must be changed to match.
* **Operand width.** Set `N` on the multiplier. The network assumes 16-bit
  Q8.8 throughout, so it is tied to `N = 16`.
* **Weights.** Edit `param_default` in `rtl/ann_pkg.sv`, or write them at run
  time. The end-to-end testbenches keep their own copy of the built-in values
  (`quarters`), which must be updated too.
