# Reversible bidirectional barrel shifter

A barrel shifter moves an N-bit word by any number of places, from 0 to N-1,
in a single pass through log2(N) stages, instead of one place per clock. This
one is built only from *reversible* gates: every gate maps its inputs to its
outputs one-to-one, so no information is thrown away inside the datapath. The
cost of that is extra outputs ("garbage") that hold whatever a gate did not
select, and extra constant inputs ("ancillas") that a gate needs to make a copy
or an inversion. The shifter covers both directions and three kinds of shift:

| MODE  | kind       | left shift by k           | right shift by k                  |
|-------|------------|---------------------------|-----------------------------------|
| `00`  | logical    | zeros enter at bit 0      | zeros enter at bit N-1            |
| `01`  | arithmetic | same as logical           | copies of the sign bit enter      |
| `10`  | rotate     | bits leaving the top re-enter at bit 0 | bits leaving bit 0 re-enter at the top |
| `11`  | rotate     | (same as `10`)            | (same as `10`)                    |

`dir = 1` shifts left (towards the MSB), `dir = 0` shifts right.

## Block structure

```
 data_in, k, dir, mode
        |
  input_unit        register: data word, shift amount, DIR, MODE, valid
        |
  control_unit      DIR/MODE -> rev, rot, fill       (Feynman, Toffoli, Peres)
        |
  shift_network     mirror (if left) + log2(N) shift stages   (Feynman, Fredkin)
        |
  output_generator  mirror back (if left); gather garbage bits
        |
  output_unit       register: data_out, garbage, out_valid
```

The top module is `rev_barrel_shifter` (`rtl/rev_barrel_shifter.sv`). Every
block above is a netlist of four gate modules:

| gate    | outputs (inputs A, B, C)              | used here as                                    |
|---------|---------------------------------------|-------------------------------------------------|
| Feynman | P=A, Q=A^B                            | fan-out (B=0 gives a copy) and NOT (B=1)        |
| Toffoli | P=A, Q=B, R=C^(A&B)                   | AND (C=0)                                       |
| Peres   | P=A, Q=A^B, R=C^(A&B)                 | AND and XOR at once (C=0)                        |
| Fredkin | P=A, Q=A?C:B, R=A?B:C                 | 2:1 multiplexer (Q), or a swap of two data bits |

## How a shift is done with controlled swaps

**One set of stages for both directions.** The stages only ever shift towards
bit 0. A left shift by k is done as *mirror, right shift by k, mirror back*.
A mirror is a layer of N/2 Fredkin gates, each swapping bit i with bit N-1-i
when its control is 1. A swap of two data bits loses nothing, so the two mirror
layers add no garbage and need no constants. For a left shift the fill bit is
always 0, so logical and arithmetic left shifts coincide. Rotate wraps around
correctly in the mirrored frame as well.

**A shift stage.** Stage j (j = 0 .. log2(N)-1) is controlled by `k[j]` and
moves the word S = 2^j places, so the stages together shift by k. Inside
`shift_stage`, for every bit i:

1. A Feynman gate with B = 0 makes two copies of `x[i]`. One stays at
   position i. The other is the source for position i-S, or, for i < S, the
   wrap-around source for position i-S+N.
2. Each of the S top positions has no `x[i+S]`. For each of them, a Feynman
   gate copies the fill bit, and a Fredkin gate controlled by `rot` picks
   either the wrapped bit or that fill copy.
3. A Fredkin gate controlled by `k[j]` picks, for each position, either the
   bit already there or its source. Q is the result. R, the value *not*
   chosen, is that gate's garbage.

Each control signal (`k[j]`, `rot`, the fill bit, the mirror control) is
passed from gate to gate through the P outputs. A reversible gate cannot fan
out a signal for free, and this chaining is how the control reaches every gate.
In hardware terms the chain is only wires, so the critical path is still two
or three gates per stage.

**Control decode.** `control_unit` computes:

```
nm1     = Feynman(MODE[1], 1)            = ~MODE[1]
arith   = Toffoli(MODE[0], nm1, 0)       = MODE[0] & ~MODE[1]
right   = Feynman(DIR, 1)                = ~DIR
sign_en = Peres(arith, right, 0).R       = arith & ~DIR
fill    = Toffoli(sign_en, data[N-1], 0) = sign bit on arithmetic right shifts, else 0
rot     = MODE[1]
rev     = DIR
```

## Garbage outputs and gate budget

The garbage bits are brought out on the `garbage` port. They are registered
together with `data_out`, so a word and its garbage appear in the same cycle.
The width is `rbs_pkg::total_garbage(N) = 4 + N*log2(N) + N - 1`, which is 35
for N = 8. The layout, from the top bit down:

* `[GW-1 -: 4]`: control unit: `{~MODE[1], arith, arith ^ ~DIR, arith & ~DIR}`.
* Below that, one field per shift stage, stage 0 at bit 0. Stage j starts at
  bit `N*j + 2^j - 1` and is `N + 2^j` wide:
  * its low N bits are the unselected value of each bit's multiplexer;
  * its top 2^j bits are the unselected value of each wrap/fill multiplexer.

Gates and constants, counted from the structure (L = log2 N):

| item                 | formula            | N = 8 |
|----------------------|--------------------|-------|
| Feynman gates        | 2 + N*L + (N-1)    | 33    |
| Toffoli gates        | 2                  | 2     |
| Peres gates          | 1                  | 1     |
| Fredkin gates        | N + N*L + (N-1)    | 39    |
| constant inputs      | N*L + (N-1) + 5    | 36    |
| garbage outputs      | 4 + N*L + (N-1)    | 35    |
| quantum cost         | 1, 5, 4, 5 per gate as usually quoted | 242 |

The quantum cost uses the unit costs commonly quoted for these gates
(Feynman 1, Toffoli 5, Peres 4, Fredkin 5). It is given for comparison only.

This bus holds more than is needed to recover the input. The bits a shift
drops are all kept by the wrap/fill multiplexers' garbage, so those bits
together with `data_out` and the controls already determine `data_in`. The
per-bit garbage is redundant in that sense. It is kept because it comes from
using each Fredkin gate as a complete, self-contained multiplexer.

The shift-amount bits, `rot`, the fill bit, `MODE[0]`, the sign bit and the
mirror control also come back out of their last gates unchanged. They are
copies of inputs, so they are not brought out.

## Interface and timing

| port        | dir | width                 | meaning                                    |
|-------------|-----|-----------------------|--------------------------------------------|
| `clk`       | in  | 1                     | clock                                      |
| `rst_n`     | in  | 1                     | asynchronous reset, active low             |
| `in_valid`  | in  | 1                     | capture `data_in`, `k`, `dir`, `mode`      |
| `data_in`   | in  | N                     | word to shift                              |
| `k`         | in  | log2(N)               | shift amount, 0 .. N-1                     |
| `dir`       | in  | 1                     | 1 = left, 0 = right                        |
| `mode`      | in  | 2                     | see the table at the top (`rbs_pkg::mode_e`) |
| `out_valid` | out | 1                     | `data_out` and `garbage` hold a new result |
| `data_out`  | out | N                     | shifted word                               |
| `garbage`   | out | 4 + N*log2(N) + N - 1 | garbage bits of that result                |

An operand presented with `in_valid` high is captured on the next rising edge.
The whole shift is combinational during the following cycle, and the result
is registered on the edge after that. So `out_valid` rises two edges after
the operand was presented and stays high for one cycle. The shifter accepts
one operation every clock.
When `in_valid` is low, both registers hold their contents.

Parameters: `N` (default 8) must be a power of two, at least 2, and
elaboration stops with an error otherwise. `KW` and `GW` follow from `N` and
should not be overridden.

## Where this RTL makes its own choices

The original architecture defines the units, the log2(n) stages of Fredkin
controlled swaps driven by the shift amount, the gate families, the three
shift kinds and the input and output registers. The following are choices made here:

* **Word width.** N = 8 by default. The original architecture leaves n
  symbolic.
* **Encodings.** The MODE codes, `dir = 1` for left, and the rule that a left
  arithmetic shift equals a left logical shift.
* **Direction handling.** A left shift is done by mirroring the word before
  and after the stages. The original architecture only says that control logic
  provides both directions.
* **Garbage is brought out, not restored.** The original architecture asks
  two things that do not fit together. Its output stage is meant to return
  every temporary bit to its starting value, but its block diagram shows
  garbage outputs leaving the output generator. This RTL follows the block
  diagram. It has garbage outputs and no uncomputation stage, so the garbage
  bits are not returned to their initial values. An uncomputation stage would
  run the shift network backwards after the result has been copied out.
* **Handshake and reset.** The `in_valid`/`out_valid` flags, the asynchronous
  reset, and registering the garbage bus together with the result.
* **Not in the RTL.** The optional LED and seven-segment display of the
  result, and the 5 V power supply. `data_out` is a port for any display
  logic to use.
* **Gate-level style.** The RTL instantiates the gates explicitly so that the
  reversible structure stays visible. A synthesis tool will flatten it into
  ordinary multiplexers; it does not make the silicon reversible.

## Verification

Each testbench in `tb/` checks its results against values worked out
independently. At the end it prints `TB_RESULT checks=<n> failures=<m>`, and
a watchdog ends the run if it hangs.

| testbench                     | what it checks                                                                 |
|-------------------------------|---------------------------------------------------------------------------------|
| `tb_feynman_gate`, `tb_toffoli_gate`, `tb_fredkin_gate`, `tb_peres_gate` | full truth table against written-out values; every output pattern appears exactly once (reversibility) |
| `tb_control_unit`             | all 16 combinations of DIR, MODE and sign bit: rev, rot, fill and garbage      |
| `tb_input_unit`, `tb_output_unit` | reset values; load and hold under random valid patterns                    |
| `tb_shift_network`            | all 256 words x 8 shift amounts x rev/rot/fill at N = 8; also that `{y, garbage}` never maps two words to the same value |
| `tb_output_generator`         | mirror-back and garbage bus order, random                                      |
| `tb_rev_barrel_shifter`       | default N = 8, no overrides: all 16384 combinations of word, k, direction and MODE, back to back with random idle cycles; exact two-edge latency; counts left/right, zero shift, zero fill, sign fill, wrap-around and idle hold, and fails if any never occurs |
| `tb_rev_barrel_shifter_wide`  | N = 4, 16, 32, 64: 4000 random operations each, one per clock                  |

The reference model is in `tb/rbs_ref_pkg.sv`. It computes each output bit
straight from the definition of the shift kind and shares no code with the RTL.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rbs_pkg.sv tb/rbs_ref_pkg.sv tb/tb_rev_barrel_shifter.sv \
    --top-module tb_rev_barrel_shifter
./obj_dir/Vtb_rev_barrel_shifter
```

Replace the testbench name to run any other testbench. `-Irtl -Itb` lets
Verilator find each module by its file name. Every module has its own file.
To lint the RTL alone:

```
verilator --lint-only -Wall -Irtl rtl/rbs_pkg.sv rtl/rev_barrel_shifter.sv
```

To build a wider shifter, instantiate `rev_barrel_shifter #(.N(32))`. The
garbage width follows from `rbs_pkg::total_garbage(N)`.
