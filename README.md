# LUT-based time-to-digital converter with staggered gated counters

A time-to-digital converter (TDC) turns the arrival time of a pulse into a
number. In time-of-flight PET, two detectors see the two gamma photons of one
annihilation, and the difference of their arrival times locates the event
along the line between them. FPGA TDCs usually put the hit into a long
tapped delay line built from carry chains. That gives about 5 to 10 ps bins,
but it costs many carry primitives and registers per channel, and the bins
shift with temperature and placement.

This design avoids the carry chain. A hit opens a pulse that lasts until the
next clock edge. A short chain of LUT delay elements turns that pulse into
N enables. The enables start one delay element apart, but all of them end at
the same clock edge. Each enable gates its own small LUT ring oscillator, and
a small counter counts that oscillator's edges. The fine time code is the sum
of all N counts. Each counter start and each oscillator edge adds one to the
sum, so the sum rises in many small, irregular steps as the hit moves earlier
in the clock period. The oscillators run independently of the system clock.
As a result, the step pattern is spread pseudo-randomly over the period and
needs no temperature or placement correction logic. The reference
implementation on a Xilinx UltraScale device reports 212 active bins over a
2000 ps period: an average bin of 9.4 ps (standard deviation 10 ps), some
bins above 40 ps, and 2 CARRY8, 404 LUTs and 807 registers against 102, 837
and 1110 for a CARRY8 delay-line TDC.

The SystemVerilog here is a complete multi-channel TDC: the channel logic, a
shared event memory, and behavioural models of the two parts whose function
*is* a physical delay (the delay elements and the ring oscillators).

## How one channel measures

```
time_in ──►[IN logic]── logic_out ──┬──[d]──┬──[d]──┬── ... ──[d]──┐
             ▲ clk                  │       │       │              │
                                    AND     AND     AND            AND
                                    │en1    │en2    │en3           │enN
                                  [RO]    [RO]    [RO]           [RO]
                                  [CNT1]  [CNT2]  [CNT3]   ...   [CNTN]
                                    └───────┴───┬───┴──────────────┘
                                                Σ  ──► fine code
```

* **IN logic** (`tdc_in_logic`): `logic_out` rises at the hit and falls at
  the next rising clock edge. Call the edge that ends it *E*, and let
  *W* = t(E) − t(hit). W lies between 0 and one clock period.
* **Delay chain** (`tdc_delay_line`): tap *k* is `logic_out` delayed by
  *k·d*. Tap 0 is `logic_out` itself.
* **AND row** (`tdc_enable_gen`): `en[k] = logic_out & tap[k]`. Enable *k*
  is high for *W − k·d*, or never if that is not positive. The enables get
  shorter from the first to the last.
* **Gated ring oscillator** (`tdc_gated_ro`) and **LUT-based counter**
  (`tdc_lut_counter`): the oscillator gives a rising edge as soon as it is
  enabled, then one every period *T*. The counter counts those edges, so
  counter *k* reads ⌈(W − k·d)/T⌉ for W > k·d. Counters saturate at their
  top value.
* **Σ** (`tdc_sum`): fine code = Σₖ ⌈(W − k·d)/T⌉.

The code grows monotonically with W. Code boundaries fall at every
*k·d + j·T* inside the period, so the number of codes is the number of such
points. Their spacing is the resolution. The spacing is not uniform, so the
code must be turned into time through a calibration table. The usual method
is a code-density test: hits uncorrelated with the clock land in each code
in proportion to its width. That calibration is done in software and is not
part of the RTL.

With the model delays used here (d = 100 ps, T = 830 ps, 21 counters,
2000 ps clock), a channel produces 36 codes per clock period: an average bin
of 55.6 ps with the smallest bins 10 ps wide. The 9.4 ps of the reference
implementation comes from the spread of real LUT and routing delays, which
places the boundaries much more densely. A simulation with ideal, equal
delays cannot reproduce it. See *Limits*.

## A hit from start to memory

All readout logic runs on the system clock (`tdc_readout_ctrl`):

| clock edge | what happens |
|---|---|
| hit | `logic_out` rises, enables open one by one, oscillators start |
| E | `logic_out` falls, all enables close, oscillators stop; `hit` goes high for one cycle |
| E+1 | counters have settled; the Σ register loads their sum and the channel latches the coarse stamp; the controller enters CLEAR |
| CLEAR (E+1..E+2) | `cnt_clr` clears the counters; `ev_valid` offers the event to the memory |
| E+2 | if the memory took the event, the channel is armed again; otherwise it waits in SEND |

The dead time after a hit is therefore two clock cycles when the memory
accepts at once. While a channel is not armed, its IN logic ignores hits. A
second hit inside the same clock period is also ignored; it does not cut the
pulse short.

After reset the controller spends one cycle in INIT and one in FLUSH, where
`cnt_clr` pulses. The counters have no clock of their own while idle, so
their asynchronous clear needs a real rising edge. This pulse provides one
whatever state the counters powered up in.

## Multi-channel system and the event memory

`tdc_top` holds `NUM_CH` channels on one clock, a 16-bit coarse counter that
numbers the clock edges, and `tdc_memory`. Each channel offers
`{coarse, fine}` on a valid/ready port. The memory serves one channel per
clock in round-robin order and stores the event, tagged with the channel
number, in a FIFO of `MEM_DEPTH` words:

```
tdc_event_t = { ch[3:0], coarse[15:0], fine[8:0] }     (tdc_pkg)
```

`coarse` is the number of edge E, the edge that ended the measurement. The
hit time is therefore

```
t_hit = coarse · T_clk − t_cal(fine)
```

where `t_cal` is the calibrated time from hit to edge for that code. For two
channels, the time difference is the difference of these values. This is the
coincidence measurement the design was built for.

When the FIFO is full, no channel is served. Channels keep their pending
event and stay disarmed, so further hits on them are dropped at the input and
nothing is lost inside the memory path. Reading: raise `rd_en` while `empty`
is low; `rd_data` and `rd_valid` follow one clock later.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_CNT` (counters and taps per channel) | 21 | the design's counter table (21 LUT-based counters) |
| `NUM_CH` | 2 | the design's two-channel test |
| `TAP_PS` (delay element, model) | 100 ps | chosen: with a 2000 ps clock the last enable never opens, as in the enable timing of the design |
| `RO_HALF_PS` (oscillator half period, model) | 415 ps | chosen: a period of about 8.3 delay elements, near the 8 to 9 steps between increments in the counter table |
| `CNT_W` (counter width) | 4 | chosen: 212 bins over 21 counters is about 10 counts per counter |
| fine code width | 9 | chosen: 21 × 15 < 512 |
| coarse width | 16 | chosen |
| `MEM_DEPTH` | 1024 | chosen |
| clock period (testbenches) | 2000 ps | from the 2000 ps measurement range of the reference results |

## What follows the reference design and what is this design's own

Taken from the reference design: the IN logic behaviour (pulse from hit to
the next clock edge); the delay chain feeding one AND gate per counter;
enables shrinking from the first to the last; N LUT-based counters summed by
one Σ; several channels writing into one memory; 21 counters; two channels on
one clock.

This design's own:
* How the IN logic is built: a toggle flop on `time_in`, its copy on `clk`,
  and an XOR of the two.
* The arm/ignore rules.
* The whole readout sequence, including the post-reset flush.
* The counter width, saturation and clear.
* The coarse counter and event format.
* The FIFO with round-robin arbitration and backpressure.
* All delays in the models.

The reference design also draws one extra delay element after the last tap,
with nothing connected to its output. It has no logic function and is left
out. The reference implementation's resource count includes 2 CARRY8
primitives whose role is not described. Here, synthesis maps the adders as it
sees fit.

## Synthesis notes

`tdc_delay_line` and `tdc_gated_ro` are behavioural models with `#` delays.
They let the channel be simulated with real timing, but they do not
synthesize. For an FPGA build, replace them:
* **Delay element:** a LUT1 buffer primitive.
* **Gated ring oscillator:** a LUT loop, for example a LUT2 computing
  `en & ~loop` with the loop closed through placed LUT buffers.

Keep both with `DONT_TOUCH` and fixed placement. Their delays set the bins.
Everything else is ordinary synthesizable logic.

Clock-domain notes:
* The flop in `tdc_in_logic` is clocked by `time_in` and uses the clock-domain
  `arm` as its enable.
* The counters are clocked by their oscillators and cleared from the clock
  domain.

Both crossings are safe by construction as long as a hit does not fall within
a flop setup window of a clock edge. A hit that does can be resolved late by
one cycle, like in any TDC. The oscillators are always stopped when the
counters are read or cleared.

## Files

| file | contents |
|---|---|
| `rtl/tdc_pkg.sv` | widths, `tdc_event_t` |
| `rtl/tdc_top.sv` | channels, coarse counter, memory |
| `rtl/tdc_channel.sv` | one channel |
| `rtl/tdc_in_logic.sv` | IN logic |
| `rtl/tdc_delay_line.sv` | delay chain (behavioural) |
| `rtl/tdc_enable_gen.sv` | AND row |
| `rtl/tdc_gated_ro.sv` | gated ring oscillator (behavioural) |
| `rtl/tdc_lut_counter.sv` | LUT-based counter |
| `rtl/tdc_sum.sv` | Σ adder and register |
| `rtl/tdc_readout_ctrl.sv` | per-channel readout sequencer |
| `rtl/tdc_memory.sv` | shared event FIFO with round-robin write arbiter |

## Testbenches

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_tdc_top`: the whole design at its defaults:
  * single hits on each channel;
  * coincident hit pairs with path delays of 40 to 2300 ps, in the same clock
    period and across a clock edge;
  * a hit inside the dead time;
  * the memory filled to full with reading stopped, then drained.

  Every event is compared with the channel, edge number and code predicted
  from its hit time. Pair delays are recovered from the codes and must match
  within one bin. Each of the mechanisms above is counted and must occur.
* `tb_tdc_code_density`: the code-density test at the defaults. Thousands of
  hits are spread uniformly over the clock period on both channels. It checks
  every code, and that the number of active codes equals the number
  predicted. It also prints the average bin size, its spread and the largest
  DNL and INL.
* `tb_tdc_counter_table`: reads all 21 counters of a channel once per delay
  step during a nearly full-period pulse and prints them as a table, with
  one row per counter. The result is the staircase the design is explained
  with: each counter starts one step after the previous one, reads 1
  immediately, and steps up every 8 to 9 steps. Every entry is checked
  against ⌈(t − k·d)/T⌉, and the captured code against the total at the end
  of the pulse.
* `tb_tdc_channel`: one channel. It tests random hit times and a 4 ps sweep
  over the period: exact codes, coarse stamp, event one clock after E,
  handshake hold, and a code that never decreases.
* One testbench per block: `tb_tdc_in_logic` (pulse edges, arm, double hit),
  `tb_tdc_delay_line`, `tb_tdc_enable_gen`, `tb_tdc_gated_ro` (edge count
  against ⌈W/T⌉), `tb_tdc_lut_counter` (counts, saturation, clear),
  `tb_tdc_sum`, `tb_tdc_readout_ctrl` (cycle by cycle, with delayed ready),
  `tb_tdc_memory` (reference model of arbitration and contents, full, three
  channels).

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/tdc_pkg.sv tb/tb_tdc_top.sv --top-module tb_tdc_top
./obj_dir/Vtb_tdc_top
```

Change `tb_tdc_top` to any other testbench name. All of them finish in well
under a minute. The testbenches that predict codes use the same `TAP_PS` and
`RO_HALF_PS` as the design. If you change those parameters, change the
constants at the top of the testbench too.

## Limits

* **Resolution.** The models use one delay for every element and one period
  for every oscillator. The simulated bin pattern is therefore regular and
  coarse: 36 codes per period. It is not the 212-code pattern of a placed
  design. The RTL and the readout do not depend on the bin count: the 9-bit
  code holds up to 315.
* **Counter table.** The counter table of the reference design is an
  idealised illustration. Its counters step first after about half a period,
  then every 8 to 9 delay steps. The oscillator model here steps after a full
  period. This changes where the code boundaries fall, not how the design
  works.
* **Temperature and placement.** The reference design's stability over
  temperature (10 to 60 °C) and placement is a property of the silicon and
  layout. Simulation cannot show it.
* **Calibration.** The code-to-time table and the DNL/INL correction are left
  to software.
