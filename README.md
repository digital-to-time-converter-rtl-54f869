# LUT-based digital-to-time converter for pulse-train generation

A digital-to-time converter (DTC) turns a number into a time. This one turns
a **bit pattern into a pulse train**. The pattern is loaded into a register.
At the trigger edge it leaves the chip one bit at a time, each bit lasting one
element delay of an FPGA delay line. That delay is about 250 ps. With a
128-element line the converter covers about 32 ns at 250 ps resolution and
can produce trains of up to 11 separate pulses.

The design goes back to a published Spartan-6 (xc6slx9) implementation. This
repository holds its RTL, a timed behavioural model of the delay line, and
self-checking testbenches.

## The idea: a multiplexer chain that is loaded in parallel and drained serially

```
 pattern[0]=Init  pattern[1]   pattern[2]        pattern[128]
        |             |A          |A                  |A
        +-----------> B  MUX1 O-> B  MUX2 O-> ... -> B  MUX128 O ---> dtc_out
                      S           S                  S
 trigger -------------+-----------+------------------+
```

Each element is one LUT configured as a 2-input multiplexer, `O = S ? B : A`.

* **Idle (trigger low).** Every multiplexer selects A. Element *i* then
  outputs pattern bit *i*, so the whole pattern sits on the chain at once. The
  converter output shows bit 128.
* **Trigger rises.** All multiplexers switch to B at the same moment. Each
  element now passes on what its left neighbour outputs, so the chain becomes
  a delay line. The levels stored on it slide towards the output, one element
  per delay τ.
* **Afterwards.** The output shows bit 127, then 126, and so on down to bit 1.
  It then stays at bit 0, the *Init* bit, which therefore sets the level the
  output rests at after the train.

So the output after the trigger is simply the pattern read from the top bit
down, one bit per τ:

```
dtc_out(t) = pattern[128 - floor(t/τ)]   for 0 <= t < 128·τ
dtc_out(t) = pattern[0]                  afterwards
```

The boundary between bits *i−1* and *i* reaches the output after
`k = 129 − i` element delays. To place an edge at `k·τ` after the trigger,
make bits `128−k` and `129−k` differ. Two examples:

* **Single delayed pulse.** Setting bits 1..m gives a pulse whose rising edge
  comes `(128−m)·τ` after the trigger. With bits 0 and 128 held low, m = 1..126
  gives 126 delay steps of τ (about 32 ns of range).
* **Pulse train.** `0x0_E1830100_80100100_04000400_00800002` gives eleven
  pulses. The high bits 125–127 come out first and bit 1 comes out last.

When the trigger falls, every multiplexer selects A again and the line is
ready for the next pattern. The trigger is the system clock divided by 10. On
the 50 MHz clock used in the original set-up that is a 200 ns period, so one
train starts every 200 ns and has 100 ns to leave the line.

## Rise and fall delays: stretched and vanishing pulses

A LUT and its routing do not pass rising and falling edges equally fast. The
timed model uses the following delays per element:

| | delay | where it comes from |
|---|---|---|
| rising (t_PLH) | 253 ps | the measured mean step |
| falling (t_PHL) | 294 ps | fitted so that a one-bit pulse grows from about 0.3 ns to about 5.5 ns over the line, as measured |

A falling edge loses 41 ps per element on the rising edge before it, so:

* A **high pulse widens** by 41 ps for every element it crosses. A one-bit
  pulse from bit 1 leaves the line 128·294 − 127·253 = 5.5 ns wide, not 0.25 ns.
  A one-bit pulse from bit 127 is 0.34 ns wide.
* A **low gap narrows** by the same amount. A one-bit gap near the input closes
  after about six elements, and the two high pulses around it merge.

These effects are the main practical limit of a LUT-based line. A pattern is
not a literal picture of the output: the time of every falling edge has to be
corrected by `k·(t_PHL − t_PLH)`. Gaps that start far from the output must be
made wide enough to survive. Rising-edge times follow the simple `k·τ` rule
with τ = t_PLH.

In the model, the edge that leaves element *i* after `k` elements arrives at
`k·t_PLH` (rising) or `k·t_PHL` (falling) after the trigger. Edges are taken
in arrival order. An edge that would arrive no later than the one before it
means the pulse between them has closed, and both are dropped.

## Blocks

| module | kind | what it is |
|---|---|---|
| `dtc_top` | RTL | pattern register + trigger divider + delay line |
| `dtc_pattern_register` | RTL | 129 D flip-flops with a load enable and a synchronous reset |
| `dtc_trigger_divider` | RTL | ÷10 counter with a registered output, 50 % duty |
| `dtc_delay_line` | RTL | 128 × `dtc_lut_mux`, Init on the first B input |
| `dtc_lut_mux` | RTL | one element, `O = S ? B : A` |
| `dtc_delay_line_model` | behavioural | the same line with t_PLH/t_PHL per element, for simulation |
| `dtc_pkg` | package | default sizes and delays |

### `dtc_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock (50 MHz for a 5 MHz trigger) |
| `rst_n` | in | 1 | synchronous, active low: pattern cleared, trigger low |
| `pattern_load` | in | 1 | write `pattern_in` on the next rising `clk` |
| `pattern_in` | in | 129 | bit 0 = Init, bit *i* = A input of element *i* |
| `pattern` | out | 129 | register contents |
| `trigger_out` | out | 1 | the trigger; high for 5 clocks, low for 5 |
| `taps` | out | 128 | every element output (0 when the timed model is selected) |
| `dtc_out` | out | 1 | the pulse train |

Parameters:

* `N_STAGES` (128) sets the number of elements. The pattern is `N_STAGES+1` bits.
* `TRIG_DIV` (10) sets the clock-to-trigger ratio.
* `TIMING_MODEL` (0) selects the delay line. 0 gives the synthesizable chain.
  1 gives `dtc_delay_line_model`, which is for simulation only.

Write new patterns while `trigger_out` is low. A pattern is visible to the
line one clock after `pattern_load`. Once the trigger is high, changing the A
inputs has no effect on the train already running. Bit 0 is the exception: it
still feeds the first element.

## Building it on an FPGA

The RTL gives the logic: 128 two-input multiplexers in a chain. What makes it
a good DTC is the placement and routing, and that is not in the RTL. On the
original Spartan-6 implementation this meant the following:

* **Hand placement.** Each multiplexer is one LUT instance, placed by hand,
  four per slice. The slice side (A/B/C/D) of each LUT was chosen so that
  consecutive elements connect through the nearest switch matrix. The LUT
  input used for each multiplexer port was chosen the same way. Doing this
  shortened the mean step from 347 ps to 253 ps. The layout repeated every
  8 elements, and the step sizes show the same 8-element pattern.
* **Trigger on a global clock buffer.** The trigger is distributed on a global
  clock net, so all 128 selectors switch with low skew. In the RTL the trigger
  is a plain net from a flip-flop. Put a clock buffer on it and constrain the
  placement in your tool flow.
* **No optimisation.** Keep synthesis from merging or retiming the chain. Use
  `keep`/`dont_touch` attributes or instantiate the LUT primitive directly.
  Otherwise a synthesizer may collapse the chain into a single multiplexer,
  because in logic terms the triggered line just outputs Init.

Jitter grows with the number of elements crossed, to about 10 ps after about
110 elements. The element delay also varies with voltage and temperature.
Neither effect is modelled.

## Two views of the delay line

The synthesizable `dtc_delay_line` has no delay in simulation. While the
trigger is low each tap equals its pattern bit. While it is high every tap
equals Init. This is enough to check the wiring, but it shows no pulse train.

`dtc_delay_line_model` has the same ports and plays the train out in time.
Select it with `dtc_top #(.TIMING_MODEL(1))`. When the trigger falls, the
output shows `pattern[N]` one element delay later. A train still in flight is
abandoned. The model assumes:

* every element has the same delay;
* the selector-to-output delay equals the data-path delay;
* there is no jitter and no 8-element pattern in the steps.

## Simulation

All files are SystemVerilog-2017 and use a 1 ps time unit. Testbenches print
`TB_RESULT checks=N failures=M` and stop through a watchdog if they hang.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/dtc_pkg.sv tb/dtc_tb_pkg.sv tb/tb_dtc_top.sv --top-module tb_dtc_top
./obj_dir/Vtb_dtc_top
```

Use the same command for the other benches:

| testbench | what it checks |
|---|---|
| `tb_dtc_lut_mux` | all 8 input combinations |
| `tb_dtc_delay_line` | idle and triggered levels of all 128 taps, 54 patterns |
| `tb_dtc_pattern_register` | reset, load, hold |
| `tb_dtc_trigger_divider` | 5 high / 5 low, 200 ns period at 50 MHz |
| `tb_dtc_delay_line_model` | the three experiments below, edge by edge (see the note after this table) |
| `tb_dtc_top` | the whole converter with the timed model (see the note after this table) |
| `tb_dtc_top_full` | the whole converter at default parameters, zero-delay line (see the note after this table) |

Notes on the longer benches:

* **`tb_dtc_delay_line_model`** runs three experiments, edge by edge:
  * all 126 delay steps;
  * the 11-pulse train;
  * all 118 pulse pairs.

  It also checks Init = 1, a closing gap and a train cut short by the trigger.
  Each run is compared with a stage-by-stage reference. A second instance
  with equal delays is compared with the plain `k·τ` rule.
* **`tb_dtc_top`** exercises the whole converter with the timed model. Every
  pattern is loaded through the register between trains. It counts each
  mechanism:
  * load;
  * train;
  * return to idle;
  * stretched pulse;
  * vanished pulse;
  * Init = 1;
  * the 11-pulse train.
* **`tb_dtc_top_full`** runs the whole converter at its default parameters
  with the zero-delay line. It checks idle and triggered taps and the trigger
  period.

`tb/dtc_tb_pkg.sv` holds the stage-by-stage reference used by the timed
benches. It builds the waveform at each element's output from the previous
one and cancels pulses whose edges cross.

The three experiments reproduce the measured behaviour:

| experiment | model | measured on the original hardware |
|---|---|---|
| absolute delay, 126 steps | 253 ps steps, 31.9 ns range | 253 ps mean, almost 32 ns |
| 11-pulse train | last edge at 37.6 ns | 11 pulses within 38 ns |
| pulse pair (bits 124–127 + bits 1..m, m = 1..118) | interval 31.9 ns … 2.28 ns, first pulse 1.22 ns | 32.7 ns … 2.5 ns, first pulse 1.287 ns |

## Departures and own choices

The following are choices of this implementation:

* The load port (`pattern_in`, `pattern_load`) of the pattern register. The
  original is written by a host application over an interface that is not
  part of this design.
* The synchronous reset.
* The 50 % trigger duty cycle.
* The `taps` output.
* The timed model and its switch.
* The fall delay, 294 ps. It is derived from the measured pulse stretching,
  not measured directly.

The host interface and the global clock buffer are not included.
