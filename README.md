# State-redundant storage elements for single-event upsets

A single-event upset (SEU) flips one stored bit. *State redundancy* defends
against it by giving a stored state more than one value. Then an upset either
moves the circuit to another value of the same state, or to a value the circuit
can recognise as an error and undo. This RTL contains five designs built on
this idea:

| module                 | what it stores | redundancy  | repairs a single upset?                          | double upset         |
|------------------------|----------------|-------------|--------------------------------------------------|----------------------|
| `xor_sr_bit`           | 1 bit          | static, XOR | tries to, but over-corrects: Q oscillates        | tolerated            |
| `y1_sr_bit`            | 1 bit          | static, Y1  | yes, while CLK is low                            | not repaired         |
| `dyn_sr_bit`           | 1 bit          | dynamic     | yes; Q is latched and never shows the upset      | silent state change  |
| `static_state_decoder` | 5 states       | static      | only decodes: extra values map to the same state | –                    |
| `dyn_state_reg`        | 5 states       | dynamic     | yes, for the two shared error values             | –                    |

`sr_top` places all five side by side, each with its own pins.

## Static and dynamic redundancy

In **static** redundancy each state owns a fixed set of values, and no two
states share a value. The present state is a plain combinational function of
the stored bits. For example, five states A..E stored in four bits:

| state | values                 |
|-------|------------------------|
| A     | x000                   |
| B     | xx01                   |
| C     | xx10                   |
| D     | xx11                   |
| E     | x100                   |

`static_state_decoder` implements this table. With `VALUE_BITS = 3` it
implements the three-bit version, in which only B, C and D have a second value.

In **dynamic** redundancy some values are shared by two states. A shared value
never holds a state for long. It is an *error value*, and when it appears the
circuit switches back to the value it held before. To know which of the two
sharing states that was, the circuit looks at the edge that led into the error
value. `dyn_state_reg` stores A..E as 000..100 and treats two values as errors:

* **101** is shared by A and B. A rising edge on bit 0 means the register came
  from A (000), so it restores 000. Otherwise it came from B and restores 001.
* **111** is shared by D and E. A rising edge on bit 2 means it came from D
  (011). Otherwise it came from E and restores 100.

The restore takes one clock. While it is pending, `state` already reports the
restored state and `corrected` is high. Upsets that turn one valid value into
another (A→B, for example) cannot be seen with this encoding.

## The three state-redundant bits

Each bit uses two flip-flops, Y1 and Y2, and has the same pins
(`sr_pkg::bit_in_t`):

* `bit_clk` is CLK: a rising edge writes D.
* `d` is D, the data to store.
* `en1`, `en2`, `pr`, `clr` inject upsets. `pr` sets and `clr` clears flip-flop
  Y1 when `en1` is high, or Y2 when `en2` is high. They act like the
  flip-flops' asynchronous preset and clear, gated by the enables.

What makes these circuits hard to follow is that they repair themselves
*asynchronously*. Each flip-flop is clocked by a gate output, not by CLK, and
that gate output changes when the other flip-flop, or the flip-flop itself, is
hit by an upset.

### XOR allocation: `xor_sr_bit`

Q = Y1 ⊕ Y2, so 00 and 11 mean '0', and 01 and 10 mean '1'. A double upset
moves 00↔11 or 01↔10 and leaves Q unchanged. A single upset flips Q. The
circuit reacts to that edge:

* Y1 is clocked by CLK ⊕ Q. With CLK low it loads Y2, which makes the pair
  equal and brings Q back to 0.
* Y2 is clocked by CLK ⊕ QN, where QN = XNOR(Y1, Y2). It always loads NOT Y1,
  which makes the pair differ and brings Q back to 1.

The circuit cannot tell the edge of a repair from the edge of an upset. So
every repair triggers the next one, and after a single upset with CLK low Q
toggles for as long as CLK stays low (00→10→00→01→11→10…). This is the
over-correction problem of this allocation, and the model reproduces it. A
write with CLK high (Y1 loads D ⊕ Y2) sets Q = D. In the gate network as
drawn, every CLK edge also clocks one of the two flip-flops: CLK ⊕ Q and
CLK ⊕ QN are complements, so one of them rises whenever CLK changes. A falling
CLK therefore starts the same oscillation, whether Q is 0 or 1. The circuit is
steady with CLK low only when it has come out of reset with CLK low and has
not been hit by an upset. The reference timing run appears to show Q holding
0 after a falling CLK. This model follows the gate wiring instead, and the
difference is a known departure.

### Y1 allocation: `y1_sr_bit`

Q = Y1, and Y2 is a fallback flag. Y2 = 0 is a normal state. Y2 = 1 is a
fallback state that exists only while an upset is being repaired. Three
positive-edge detectors (`ped`) watch Y1 rising, Y1 falling and Y2 rising. A
multiplexer picks which Y1 edge counts as an upset. With CLK low, the repair
runs like this:

| stored | upset on | sequence (Y2 Y1)             | samples from upset to repaired |
|--------|----------|------------------------------|--------------------------------|
| 0      | Y1       | 00 → **01** → 10 → 00        | 2                              |
| 1      | Y1       | 01 → **00** → 11 → 01        | 2                              |
| 0      | Y2       | 00 → **10** → 00             | 1                              |
| 1      | Y2       | 01 → **11** → 01             | 1                              |

In the first step of a Y1 repair, the Y1 edge clocks both flip-flops. Y1 loads
NOT Y1, which restores it. Y2 loads NOT CLK AND NOT Y2, which sets it. In the
second step, Y2's own rising edge clocks it again and clears it.

The multiplexer select is Y1 ⊕ Y2. With the select high, the multiplexer
passes the rising-edge pulse of Y1. With it low, it passes the falling-edge
pulse. Right after an upset on Y1, the select therefore passes the edge the
upset made. Once Y2 has risen, it passes the other polarity, so the edge Y1
makes while it is being restored is not taken for a new upset.

While CLK is high, OR gates hold both flip-flop clocks high, so no correction
happens. The rising CLK edge writes D into Y1 and clears Y2. An upset during
the high phase stays until the next write. The circuit also cannot repair an
upset on Y1 during a fallback state, or a double upset.

### Dynamic redundancy: `dyn_sr_bit`

00 is '0' and 11 is '1'. The values 01 and 10 are error values that only a
single upset can reach. Q is a latch: it follows Y1 while the pair agrees and
holds its last value while the pair differs. So Q never shows a single upset.

Each flip-flop compares itself with the latched Q. It is clocked by
CLK ⊕ (err ∧ (Yi ⊕ Q)), and with CLK low it loads its own complement. The one
flip-flop that disagrees with Q is therefore flipped back, one sample after the
upset. If the upset happens while CLK is high, the flip-back happens when CLK
falls. A rising CLK with no repair pending writes D into both flip-flops. A
double upset (00↔11) is a legal state change, and the circuit does not notice
it. `err` is brought out for observation.

## Timing model

All three bits are asynchronous gate networks. Here they are written as
synthesizable logic evaluated on one fast **sampling clock** `clk`, with a
synchronous active-low reset `rst_n` to state 00:

* Each derived flip-flop clock is compared with its value one sample earlier.
  A flip-flop loads in a sample where its derived clock has risen. Every
  flip-flop therefore adds exactly one sample of delay, which makes the
  repair latencies above exact cycle counts.
* The `ped` pulses are one sample wide. In `y1_sr_bit`, an OR of pulses is
  treated as an OR of clock events.
* An upset input takes priority over clocking, as a preset or clear would.
  Drive it for **one sample**. Like a real preset held too long, a longer
  pulse swallows the edge that the repair needs.
* CLK (`bit_clk`) and D are ordinary inputs sampled by `clk`. CLK must be much
  slower than `clk`. The testbenches hold each CLK level for at least two
  samples.

`static_state_decoder` is combinational. `dyn_state_reg` is an ordinary
synchronous register on `clk`, with a write port (`we`, `next`), a fault port
(`upset`, a mask of bits to flip) and the priority upset > write > restore.

## How far to trust it, and where it departs

* The gate networks were read off schematics. The gate types, the multiplexer
  pin order (Data1, Data0, Select) and the NAND gating of the upset pins are
  as drawn. Where the wiring could be read more than one way, the reading
  chosen is the one that produces the repair sequences described above. This
  is least certain for the comparison gates of `dyn_sr_bit`.
* These parts are this design's own choices: the sampling-clock timing model,
  the reset, preset winning over clear, and every port of `dyn_state_reg`
  beyond the stored value.
* The edge rule for 101 (a rising bit 0 means A) is the original one. The
  matching rule for 111 (a rising bit 2 means D) was added here by analogy.
* Not built: a dual-edge-triggered version of the dynamic bit that would remove
  the output latch, and bit-wise (one-hot) allocation with duplicated state
  bits, whose combining rule is not defined.
* Behaviour on a real device depends on gate and routing delays that this
  model replaces with one sample per flip-flop. Use it to study the logic of
  the repair, not its analog timing.

## Files and simulation

`rtl/`: `sr_pkg.sv` (shared types), `ped.sv`, `xor_sr_bit.sv`,
`y1_sr_bit.sv`, `dyn_sr_bit.sv`, `static_state_decoder.sv`,
`dyn_state_reg.sv`, `sr_top.sv`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_sr_top` is the
end-to-end test at the default configuration. It runs 200 random write and
upset steps on the Y1 and dynamic bits, upsets during CLK high, double upsets,
the XOR bit's over-correction, random decoder values and random hits on the
five-state register's error values. It counts each mechanism and fails if one
never happened.

`tb_timing_diagrams` replays the three bits' upset experiments in the order
of events of their reference timing runs. It checks that the XOR bit starts
oscillating and that the Y1 bit pulses Y2 exactly once per upset. It also
checks that the dynamic bit's Q changes only on writes.

```
verilator --binary --timing --assert -Irtl rtl/sr_pkg.sv tb/tb_sr_top.sv --top-module tb_sr_top
./obj_dir/Vtb_sr_top
```

Replace `sr_top` with any other module name to run that module's testbench.
Lint with `verilator --lint-only -Wall -Irtl rtl/sr_pkg.sv rtl/<module>.sv`.
The only lint warning is the unused top value bit of the four-bit decoder,
which the encoding ignores on purpose.
