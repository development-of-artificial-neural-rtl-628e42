# A floating-point neural network on one reused neuron datapath

This RTL computes a small feed-forward neural network, a soft sensor: two
process measurements go in and one estimated process variable comes out. The
network has two inputs, two hidden neurons and one output neuron, all using a
sigmoid activation:

    h1  = sig(W0*in0 + W1*in1)
    h2  = sig(W2*in0 + W3*in1)
    out = sig(W4*h1  + W5*h2)

The main idea is to build **one** neuron datapath, with a floating-point
multiplier, a floating-point adder and an activation unit, and to reuse it for every
neuron. A fully parallel version would need six multipliers and three adders.
Here a control unit walks one multiplier and one adder through the six products
and three sums. It keeps the intermediate values in two banks of six registers.
The same structure grows to larger networks by adding weights, registers and
program steps.

All arithmetic is done in a 17-bit floating-point format.

## The 17-bit number format

| bits   | field    | meaning                                   |
|--------|----------|-------------------------------------------|
| 16     | sign     | 1 = negative                              |
| 15..10 | exponent | biased by 31                              |
| 9..0   | fraction | fraction bits after a hidden leading 1    |

value = (-1)^sign × 2^(exponent-31) × 1.fraction

The format spans about 2^-30 to 2^33 with three significant decimal digits.
An exponent field of 0 means zero, and the fraction is then ignored. There are no
subnormals, infinities or NaNs. Every unit truncates its results (round
toward zero). A result too large for the format becomes 0 and raises the
unit's exception flag. A result too small becomes 0 silently. Examples:
`17'h07C00` = 1.0, `17'h07800` = 0.5, `17'h18000` = -2.0.

The 1/6/10 split is part of the original design. The bias, the zero encoding,
truncation and the overflow behaviour are this implementation's choices.
`rtl/fp17_pkg.sv` holds the format as a packed struct `fp17_t`.

## Datapath

```
           +-------+  DATA
 rom_addr->|  ROM  |---------------------------+---------------------+
           | W0..W5|                           |                     |
           +-------+                           v                     v
 in0 ---->+-------+  data   +---------+   +--------+  A,B,F,G,H,I  +-------+   +--------+
 in1 ---->| MUX_0 |-------->| FP_MULT |-->| REG_0  |-------------->| MUX_1 |-->| FP_ADD |--+
 F..I --->|       |-------->| 3 stage |   | 6 x 17 |               |       |-->| 4 stage|  |
 J,K ---->+-------+  weight +---------+   +--------+  C,D,E,J,K -->+-------+   +--------+  |
                                                                      | op A               |
                                                                      v                    |
                                                                +-----------+              |
                                                                | sigmoid   |              |
                                                                | (Taylor)  |              |
                                                                +-----------+              |
                                                                      |  act   add         |
                                                                      v   v    v<----------+
                                                                     [ select ]
                                                                         |
                                                                      +--------+
                                                       out = L <------| REG_1  |-- C,D,E,J,K
                                                                      | 6 x 17 |
                                                                      +--------+
```

The register outputs carry the letter names used throughout the RTL:

| bank  | entry 0 | entry 1 | entry 2 | entry 3 | entry 4 | entry 5 |
|-------|---------|---------|---------|---------|---------|---------|
| REG_0 | A       | B       | F       | G       | H       | I       |
| REG_1 | C       | D       | E       | J       | K       | L (OUT) |

- **MUX_0** (`mux_0`) gives the multiplier its data operand. Its select
  codes are the input numbers: 0 is `in0`, 1 is `in1`, 4 to 7 are F, G, H, I,
  and 8, 9 are J, K. The second operand is always the word the ROM is
  reading.
- **MUX_1** (`mux_1`) has two independent selectors for the adder's two
  operands. Each can pick the ROM word or any of A to K. Its first output also feeds the
  activation unit, which is how the sums C, D and E reach the sigmoid.
- **REG_0 / REG_1** (`reg_bank`) each hold six copies of `reg17`, a 17-bit D
  register with a load enable. All six outputs are visible at once.
- REG_1 is written either by the adder or by the activation unit, through a
  two-way selector in `ann_top`.

## The program

`control_unit` runs a fixed twelve-step program. Each step uses one unit and
writes one register:

| step | operation        | unit    | meaning                          |
|------|------------------|---------|----------------------------------|
| 0    | A = in0 × W0     | FP_MULT | hidden neuron 1, first product   |
| 1    | B = in1 × W1     | FP_MULT | hidden neuron 1, second product  |
| 2    | F = in0 × W2     | FP_MULT | hidden neuron 2                  |
| 3    | G = in1 × W3     | FP_MULT | hidden neuron 2                  |
| 4    | C = A + B        | FP_ADD  | hidden neuron 1 sum              |
| 5    | D = F + G        | FP_ADD  | hidden neuron 2 sum              |
| 6    | J = sig(C)       | sigmoid | h1                               |
| 7    | K = sig(D)       | sigmoid | h2                               |
| 8    | H = J × W4       | FP_MULT | output neuron                    |
| 9    | I = K × W5       | FP_MULT | output neuron                    |
| 10   | E = H + I        | FP_ADD  | output neuron sum                |
| 11   | L = sig(E)       | sigmoid | network output                   |

Each step takes one cycle in ISSUE, where the unit's READY or START is high,
followed by WAIT cycles until the unit's DONE. In the DONE cycle the control
unit raises the enable of the destination register, so the result is stored at
the edge that ends the step and the next step can read it at once. The select
lines stay stable for the whole step. Steps do not overlap, although both
arithmetic units are pipelined and could accept an operation every cycle.

Step costs: a multiplication takes 4 cycles, an addition 5, and an activation
1 + its latency (32 through the series, 1 when short-cut). A whole run takes

    cycles from START to DONE = 43 + L6 + L7 + L11

that is, between 46 and 139 cycles.

## Floating-point multiplier (`fp_mul`)

The multiplier is a three-stage pipeline. The sign, exponent and fraction are
handled side by side:

1. sign = s1 XOR s2. The exponents are added in a 7-bit adder. The 11-bit
   significands (hidden 1 plus fraction) are multiplied into 22 bits. A zero
   operand is detected.
2. The bias is removed. The significand product lies in [1, 4). When its top
   bit is set, the fraction is taken one place higher and the exponent is
   increased by one. Overflow and underflow are detected on the widened
   exponent.
3. The result register is fed by a multiplexer that forces 0 for a zero
   operand, an underflow or an overflow.

READY moves down the pipeline with the data and comes out as DONE three
cycles later. EXCEPTION_IN moves with it and is ORed with the overflow flag
into EXCEPTION_OUT.

## Floating-point adder (`fp_add`)

The adder is a four-stage pipeline:

1. **Compare and swap.** The magnitudes are compared. The larger operand goes
   to the "large" path. `eq` flags equal magnitudes.
2. **Shift adjust.** The smaller significand is shifted right by the exponent
   difference. Three extra bits are kept, guard, round and sticky, so that
   truncating the result gives exactly the truncated exact sum.
3. **Add/sub.** The aligned significands are added when the signs agree.
   When they differ, the smaller is subtracted from the larger.
4. **Correction.** The sum is normalised: one place right after a carry, or
   left past the leading zeros after a cancellation. Then the fraction is
   truncated and the exponent adjusted. Equal magnitudes with opposite signs
   are cleared to an exact zero.

DONE follows READY by four cycles, and the exception flags work as in the
multiplier. The result takes the sign of the larger operand.

## Sigmoid activation (`sigmoid_act`)

The activation is the Taylor series of 1/(1+e^-x) about 0, cut after the x^5
term and evaluated in Horner form:

    y = 1/2 + x·(1/4 + x²·(−1/48 + x²·1/480))

The unit owns one `fp_mul` and one `fp_add`, and a small sequencer runs the
seven operations in turn: x², then four steps inside the bracket, then ×x and
+1/2.

Two properties keep this well behaved:

- **Clamping.** The polynomial rises monotonically everywhere, because its
  derivative 1/4 − x²/16 + x⁴/96 has no real zeros. It crosses 1 near
  x = 2.49 and 0 near x = −2.49. The result is clamped into [0, 1], which
  gives a monotonic sigmoid.
- **Short-cut.** For |x| ≥ 4 the series is skipped and 0 or 1 is returned in
  one cycle. This also keeps x⁵ within the exponent range.

For |x| ≤ 2 the result is within 0.02 of the true sigmoid. Between 2 and 2.5
the error grows to about 0.08, where the series reaches 1 early.

The series form is part of the original design. The number of terms, the clamp
and the short-cut are this implementation's own choices.

## Top level (`ann_top`)

| port        | dir | width | meaning                                                   |
|-------------|-----|-------|-----------------------------------------------------------|
| `clk`       | in  | 1     | clock; all state changes on the rising edge              |
| `rst`       | in  | 1     | synchronous reset, active high                           |
| `start`     | in  | 1     | start a run; ignored while `busy`                        |
| `in0`,`in1` | in  | 17    | inputs; hold them stable until `done`                    |
| `busy`      | out | 1     | run in progress                                          |
| `done`      | out | 1     | one-cycle pulse; `out` valid from then on                |
| `exception` | out | 1     | some operation of this run overflowed; cleared by `start` |
| `out`       | out | 17    | network output (REG_1 entry L)                            |

Parameter `WEIGHTS` holds the six weights W0..W5 as `fp17_t` words. The
trained weights of the original sensor are not published. The default is an
example set: 0.5, −0.25, 0.75, 1.5, 1.25, −2.0.

## How faithful this is

These parts follow the original design closely:

- the 17-bit 1/6/10 format;
- the blocks and their connections: ROM with six weights, MUX_0 with its
  numbered inputs, FP_MULT, REG_0 and REG_1 of six 17-bit registers built from
  one register module, MUX_1 with the ROM word as input 0, FP_ADD, OUT taken
  from REG_1;
- the internal stages of the multiplier and the adder, and their
  READY/DONE/EXCEPTION ports;
- the order of the first operations: in0 × first weight into REG_0 entry 0,
  in1 × second weight into entry 1, then their sum into REG_1;
- a sigmoid in Taylor-series form.

These are this implementation's own choices:

- the exponent bias and zero encoding, truncation, and the overflow and
  underflow results;
- the pipeline depths (3 and 4), read from the unit diagrams' register rows;
- the control program beyond the first neuron, and which weight pairs with
  which input;
- the select codes of MUX_1 and MUX_0's unused codes;
- where the activation sits: fed from MUX_1 output A, writing REG_1 entries
  J, K and L through a selector;
- the activation's order, clamp and short-cut;
- reset values and the START/BUSY/DONE handshake;
- the example weights.

Known departures:

- Steps are not overlapped, so a run costs up to 139 cycles where a
  pipelined schedule could be shorter.
- MUX_1's ROM input is wired but no program step uses it: no bias values are
  defined.
- The original description mentions IEEE 754. The 17-bit format follows its
  sign/biased-exponent/hidden-one layout but not its special values.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
computed in double precision, independently of the RTL, by
`tb/fp17_ref_pkg.sv`, which truncates to the 17-bit format exactly where the
hardware does.

| testbench          | what it checks                                                                 |
|--------------------|--------------------------------------------------------------------------------|
| `tb_fp_mul`        | 2000 back-to-back products, bit-exact; latency 3; overflow and exception pass-through |
| `tb_fp_add`        | 2000 sums, bit-exact, including cancellation and very different exponents; latency 4 |
| `tb_sigmoid_act`   | 305 arguments, bit-exact against a step-truncated model; within 0.02 of the true sigmoid for \|x\| ≤ 2; latencies 32 and 1 |
| `tb_control_unit`  | the twelve-step program, one-hot write enables timed to DONE, run length, against stand-in units |
| `tb_reg17`, `tb_reg_bank`, `tb_weight_rom`, `tb_mux_0`, `tb_mux_1` | the storage and selection blocks |
| `tb_single_neuron` | one neuron followed through the datapath, register by register, at the cycle each is written |
| `tb_ann_top`       | 205 full network runs at default size, bit-exact outputs, exception flag and cycle counts; it fails unless each mechanism occurs at least once: series, clamped and short-cut activation, adder cancellation, overflow exception, START ignored while busy |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_ann_top rtl/fp17_pkg.sv tb/fp17_ref_pkg.sv tb/tb_ann_top.sv
    ./obj_dir/Vtb_ann_top

Each takes well under a second.

## Changing the design

- **Weights:** override `WEIGHTS` on `ann_top`. `tb_ann_top` uses the default
  set in its model, so update its `W` array to match.
- **Network shape:** a larger network needs more ROM words, a larger
  `NREG`, more MUX sources and a longer program in `control_unit`'s
  `program_step` table.
- **Number format:** `EXP_W` and `MAN_W` in `fp17_pkg`. The hex constants in
  `weight_rom`, `sigmoid_act` and the testbenches are written for 6/10 and
  would need re-encoding.
