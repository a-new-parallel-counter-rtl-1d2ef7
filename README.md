# Pipelined parallel counter built from 2-bit modules

A binary counter whose clock rate does not depend on its width. In a plain
synchronous counter, bit *i* toggles when all lower bits are one. That AND
grows with the width and becomes the critical path. This design splits the
count into 2-bit slices. It works out a slice's enable **one clock early**,
from a state the lower bits pass through just before they all become one,
and holds that enable in a flip-flop. Each slice therefore sees a registered
enable, and no logic path crosses more than a couple of gates.

The default configuration is an 8-bit counter:

| part | count | role |
|---|---|---|
| module-1 (`module1`) | 1 | free-running 2-bit counter, bits [1:0] |
| module-3 (`module3`) | 3 | 2-bit counters with enable, bits [3:2], [5:4], [7:6] |
| module-2 (`cdmff`) | 6 | pipeline flip-flops: 3 enables, 3 look-ahead signals |
| state decoder (`state_decoder`) | 2 | look-ahead decode |
| 3-input AND (`and3`) | 1 | look-ahead decode |

The storage cell throughout is a *conditional data mapping flip-flop*
(CDMFF). It is a low-power D flip-flop whose internal nodes switch only when
the input differs from the stored bit. It was designed as a 14-transistor
cell. In RTL it is a D flip-flop with a write enable `d != q`, which behaves
the same as a plain D flip-flop.

## Timing of the count

After reset, `count` is 0. It rises by exactly one at every rising clock edge
and wraps from all ones to 0. Each slice steps 00 → 01 → 10 → 11 → 00:

- Module-1 takes one step on every clock.
- Module-3 number *k* takes a step only on clocks where its enable `ins[k]`
  is high.

Reset is active high and asynchronous, and clears every flip-flop.

## The enable pipeline and the look-ahead (the tricky part)

Number the module-3 slices k = 0, 1, 2. Slice *k* holds bits [2k+3:2k+2],
and the bits below it are `count[2k+1:0]`. For the counter to be a binary
counter, slice *k* must advance exactly when all the bits below it are one.
The design keeps two registered signals per slice:

| signal | high in a cycle iff | produced from |
|---|---|---|
| `ins[k]` (enable) | `count[2k+1:0]` = 1…11 | reg(QEN1) for k = 0; reg(QEN3 of slice k−1) otherwise |
| `qc[k]` (look-ahead) | `count[2k+1:0]` = 1…10 | reg(`pre[k]`) |

The two outputs of the counting modules are combinational decodes:

- **QEN1** = Q1 · ¬Q0 (module-1 is in 10). One clock later module-1 is in 11,
  so reg(QEN1) is the enable of slice 0.
- **QEN3** = Q1 · Q0 · QC (this slice is 11 and every lower bit is one except
  bit 0). One clock later bit 0 has become one and nothing else has moved, so
  reg(QEN3 of slice k) is the enable of slice k+1.

`qc[k]` needs its own look-ahead, one clock earlier again. The key fact:
going from …01 to …10 produces no carry out of bit 1. So `count[2k+1:0]` is
1…10 in a cycle exactly when it was 1…101 in the cycle before. The
un-registered term `pre[k]` detects 1…101:

```
pre[0] = module-1 is in 01                         state_decoder, STATE=01, qual=1
pre[1] = slice 0 is in 11  AND pre[0]              and3
pre[k] = slice k-1 is in 11 AND pre[k-1], k >= 2   state_decoder, STATE=11, qual=pre[k-1]
qc[k]  = reg(pre[k])
```

This uses exactly six pipeline flip-flops, one 3-input AND and two decoders
for 8 bits. Upper slices change rarely, so `pre[k]` is stable for long
stretches. The AND chain feeds only flip-flops, never a slice's next-state
logic directly.

Everything starts consistent after reset: the count is 0 and every `ins` and
`qc` is 0, which is the correct value for count 0. Two concurrent assertions
in `parallel_counter` check these invariants for every slice on every clock:

- `ins[k]` equals the AND of `count[2k+1:0]`.
- `qc[k]` equals (`count[2k+1:0]` == 1…10).

## Modules

| file | module | what it is |
|---|---|---|
| `rtl/cdmff.sv` | `cdmff` | D flip-flop with conditional write, async reset, `q`/`qbar` |
| `rtl/module1.sv` | `module1` | free-running 2-bit counter, `qen1` |
| `rtl/module3.sv` | `module3` | 2-bit counter with enable `ins`, look-ahead input `qc`, `qen3` |
| `rtl/state_decoder.sv` | `state_decoder` | `match = qual & ({q1,q0} == STATE)` |
| `rtl/and3.sv` | `and3` | 3-input AND |
| `rtl/parallel_counter.sv` | `parallel_counter` | the counter (top) |

Top-level interface of `parallel_counter #(N_MOD3 = 3)`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | asynchronous reset, active high |
| `count` | out | 2·N_MOD3+2 | counter value |
| `cascade_en` | out | 1 | QEN3 of the last slice: high when `count` is all ones except bit 0 (where a further slice would take its enable from) |

`N_MOD3` sets the number of enabled 2-bit slices. The default, 3, gives the
8-bit counter. Any value ≥ 1 works: 1 gives 4 bits with no AND gate, 2 gives
6 bits, and 4 or more add one decoder per slice.

## What follows the source design and what does not

The source design gives the following, and this RTL follows it:

- the split into module-1, module-2 and module-3
- the state sequences of the two counting modules (module-3 advances only
  when enabled)
- the formulas QEN1 = Q1·¬Q0 and QEN3 = Q1·Q0·QC
- the pipelining of every enable through a CDMFF
- the number of each component in the 8-bit counter

The following are this design's own choices:

- **The look-ahead wiring.** The source design has a state-decoder and
  AND-gate network feeding three of the pipeline flip-flops, but the exact
  connections are not available. The `pre[k]` chain above is the simplest
  wiring that uses the listed parts and gives QC the stated meaning.
- **Reset.** The polarity and the asynchronous timing are chosen here.
- **Next-state logic.** Inside both counting modules it is written as toggle
  equations rather than as a particular gate netlist.
- **Edge and rate.** The counter uses rising-edge clocking and takes one
  count step per clock. One description of the original says it "counts two
  states per cycle", but its state diagrams show one step per clock. Here
  that phrase is read as the two bits each slice holds.
- **Width.** The design is generalised to any number of slices.
- **`cascade_en`.** This output is added here.

The following are not modelled, because they are properties of the
transistor circuit rather than of its logic:

- the transistor-level behaviour of the 14-transistor CDMFF (clocked
  transistor count, floating nodes)
- power, delay and layout area

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_parallel_counter.sv` | default 8-bit counter, no parameter overrides. Three full periods with a reset in mid-count. Checks `count` and `cascade_en` after every clock, and counts how often each mechanism occurred: module-1 overflow, each slice advancing and overflowing, wrap, cascade pulse and reset. Fails if any never occurred. |
| `tb/tb_parallel_counter_widths.sv` | 4-, 6- and 10-bit counters through two periods of the 10-bit one; these widths build each form of the look-ahead chain |
| `tb/tb_module1.sv`, `tb/tb_module3.sv` | state sequences, enable and hold, QEN1/QEN3 |
| `tb/tb_cdmff.sv` | capture, hold and asynchronous reset |
| `tb/tb_state_decoder.sv`, `tb/tb_and3.sv` | exhaustive truth tables |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_parallel_counter \
    tb/tb_parallel_counter.sv -o sim
./obj_dir/sim
```

Use `--assert` so that the look-ahead invariants in `parallel_counter` are
checked. Every testbench finishes in well under a second.
