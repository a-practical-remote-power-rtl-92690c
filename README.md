# Compressed TDC voltage-trace kernel

When several tenants share one FPGA, they also share its power distribution
network. A circuit that draws current in one region lowers the supply voltage
seen by every other region. Logic that can measure that voltage finely enough
can watch a co-tenant's activity. It can see when the shell starts moving data
to an accelerator, and when that accelerator starts computing.

This RTL is such a sensor, packaged as an ordinary accelerator kernel with an
AXI4-Lite control port. It is called the Compressed TDC RTL Kernel (CTRK). It
has three parts:

* **A time-to-digital converter (TDC).** It turns the supply voltage into an
  8-bit number every 5 clock cycles.
* **A compressor.** It keeps only the readings that fall below a threshold,
  each with a 32-bit timestamp. This lets a trace of a few thousand block-RAM
  entries cover a victim run of hundreds of millions of cycles.
* **An auto trigger.** It recognises the two characteristic voltage drops of a
  victim run and opens a full-rate capture window after the second. No wire
  from the victim is needed.

A port monitor is included as a development aid. It timestamps the first read
and write on the shell's PCIS, DDR and OCL ports, so that drops in a trace can
be matched to bus activity.

## How the TDC measures voltage

The sensor is a chain of 32 CARRY8 carry elements, 256 taps in all, with a
flip-flop on every tap. The kernel clock is fed into the start of the chain.
During one clock period the edge ripples some distance up the chain. At the
next rising edge the 256 flip-flops record how far it got, as a thermometer
code (ones up to the point reached, zeros beyond).

Carry delay gets shorter as the voltage rises. A higher voltage therefore
gives more ones, and the number of ones (the Hamming weight) is the voltage
reading. A deep drop caused by heavy switching elsewhere on the die shows up as
a sharp fall in the weight.

The delay of a carry chain is an analog property, and RTL cannot reproduce it.
`tdc_delay_line` is therefore a **behavioural model**. Besides the clock it has
an input `vccint_mv`, the supply voltage in millivolts, and it reaches a tap
count given by a linear law:

    taps = 160 + 2 * (vccint_mv - 850), clamped to 0..256

The structure is the real one: 32 × 8 taps, with the clock as the signal under
measurement. The constants of the law were picked only to make simulations
readable. On a device, this module is replaced by CARRY8 primitives and
flip-flops placed by hand, and `vccint_mv` disappears. Every other module is
synthesizable.

## The data path

```
 vccint_mv ─► tdc_delay_line ─256─► ctrk_sample_reg ─256─► ctrk_hamming_weight ─8─┐
                                          ▲ every 5 cycles                       ▼
 ctrk_global_time (÷10) ─────────32────────────────────────────► ctrk_compare_store ─40─► ctrk_trace_ram ─► host
                                                       THRESHOLD ─32─┘    (hw < threshold)
```

* **`ctrk_sample_reg`** copies the 256 TDC flip-flops when the control strobes
  it, once every 5 cycles (`SAMPLE_PER`).
* **`ctrk_hamming_weight`** counts the ones in two pipeline stages. Stage 1
  counts each 16-bit group; stage 2 adds the group counts. The stored value is
  8 bits wide. The one count that does not fit, 256, saturates to 255.
* **`ctrk_global_time`** is a 32-bit counter that advances once every 10
  cycles (`TIME_PER`), which is 80 ns at 125 MHz. It wraps after about 5.7
  minutes of run time. It is cleared when a run starts and counts only while
  the run lasts.
* **`ctrk_compare_store`** writes `{timestamp, weight}` to the next RAM entry
  when the weight is strictly below `THRESHOLD` and storing is enabled. It
  stops when the RAM is full.
* **`ctrk_trace_ram`** is a simple dual-port memory of 16384 entries × 40
  bits, `{timestamp[31:0], hw[7:0]}`. The host reads it back through the
  registers.

Latency: a sample strobe in cycle *t* loads the sample register at the end of
*t*. The weight is valid in cycle *t*+3, and it is written to RAM at the end of
that cycle. The timestamp stored is the Global Time in cycle *t*+3. It is one
tick later than the sample instant at most. Because a tick is 10 cycles and a
sample is taken every 5, two consecutive samples usually share a timestamp.

## Choosing the threshold

The threshold is a 32-bit register, so it can be set to 256. No 8-bit weight
reaches that value, so a threshold of 256 keeps every sample. A measurement
has two steps:

1. **Calibration.** Run with threshold 256 while the victim is idle. The host
   averages the stored weights.
2. **Long-term trace.** Set the threshold to that average and run while the
   victim works. Only below-average readings are stored: about half of the
   noise, plus every real drop.

If the RAM fills too early, lower the threshold. If the RAM is left mostly
empty, raise it. A threshold closer to the noise floor keeps more samples and
therefore covers less time. The goal is a RAM that is nearly full when the
victim's run ends.

The testbench does exactly this. It computes the average from the calibration
readout and writes it back as the threshold.

## Capture modes and the auto trigger

`ctrk_control` runs one state machine: `IDLE → ARMED → CAPTURE → DONE`. A
`start` command clears the Global Time, the RAM pointer, the auto trigger and
the port monitor. Sampling then runs in both `ARMED` and `CAPTURE`; samples are
stored only in `CAPTURE`.

| mode | how storing starts | how the run ends |
|---|---|---|
| 0 free run | at once, `start` goes straight to `CAPTURE` | `stop` or RAM full |
| 1 hard trigger | rising edge of `ext_trig`, after a 2-flip-flop synchroniser | `CAPTURE_LEN` cycles later, or `stop`, or RAM full |
| 2 auto trigger | `ctrk_auto_trigger` fires | `CAPTURE_LEN` cycles later, or `stop`, or RAM full |

If `CAPTURE_LEN` is 0, the window has no time limit.

**The auto trigger** is built on one observation: a victim run produces two
isolated, very deep drops. The first comes when the shell starts moving input
data into the custom logic. The second comes when the accelerator starts
computing. The time from start to the first drop is unknown (T0), and so is
the gap between the drops (T1). A capture of fixed length T2 after the second
drop records the computation itself.

One drop spans many samples, and its weights bounce around the level. For that
reason the trigger does not count samples. It counts drops:

* A drop **begins** at the first weight below `TRIG_LEVEL` while no drop is
  open. At that moment `drop_start` pulses, the drop counter increments, and
  the timestamp is saved. The first drop's timestamp goes to `DROP1_TIME`;
  every later one goes to `DROP2_TIME`.
* A drop **ends** after `TRIG_REARM` consecutive weights at or above the level.
  A shorter recovery belongs to the same drop.
* When the drop that begins is the `drops`-th one (set in the CTRL register,
  default 2), the trigger fires, and the control moves to `CAPTURE` in the next
  cycle. After firing, the trigger ignores its input until the next `start`.

Settings that work:

* **`TRIG_LEVEL`**: a value well below the noise and reached only by the big
  drops. Measured on a real device, this is about four standard deviations
  below the mean weight.
* **`TRIG_REARM`**: longer than the bounces inside one drop, and shorter than
  the gap between the two drops.

With a threshold of 256, a 30000-cycle window is 6000 entries, so it fits in
the RAM with room to spare.

The level test uses the raw weight. Converting a level expressed in standard
deviations into a raw weight is left to the host.

## Port monitor

`ctrk_port_monitor` watches the AW and AR handshakes (`valid && ready`) of
three shell ports: index 0 PCIS, 1 DDR, 2 OCL. For each port it records the
Global Time of the first write and the first read after `start`.

Event *e* = 2·port + (0 write, 1 read). The times are readable at
`0x40 + 4e`, and their valid bits are in `MON_VALID`.

This is a measurement aid for understanding a trace. A real co-tenant would
have no access to these ports. In the top level they are plain inputs
(`mon_*`), to be tapped from the custom-logic wrapper.

## Register map (AXI4-Lite, 32-bit registers)

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | W/RW | bit0 start (pulse), bit1 stop (pulse), bits3:2 mode, bits7:4 drops that fire the auto trigger (reset 2) |
| 0x04 | STATUS | R | bits1:0 state (0 idle, 1 armed, 2 capture, 3 done), bit2 RAM full, bits6:3 drops seen |
| 0x08 | THRESHOLD | RW | store weights below this (reset 256 = keep all) |
| 0x0C | TRIG_LEVEL | RW | bits7:0 auto trigger drop level (reset 0 = never) |
| 0x10 | TRIG_REARM | RW | samples above the level that end a drop (reset 64) |
| 0x14 | CAPTURE_LEN | RW | trigger window in cycles, 0 = unlimited |
| 0x18 | COUNT | R | entries written in this run |
| 0x1C | RD_ADDR | RW | entry to read |
| 0x20 | RD_HW | R | weight of entry RD_ADDR |
| 0x24 | RD_TIME | R | timestamp of entry RD_ADDR |
| 0x28 | DROP1_TIME | R | time the first drop began |
| 0x2C | DROP2_TIME | R | time the latest drop began |
| 0x30 | MON_VALID | R | bits5:0 port events seen |
| 0x40–0x54 | MON_TIME[0..5] | R | first-transaction times |

The slave handles one transaction at a time. It accepts a write when the
address and the data are both valid. It returns read data one cycle after
accepting the address. Responses are always OKAY.

After `RD_ADDR` is written, `RD_HW` and `RD_TIME` are valid two cycles later.
A host's next AXI read always comes later than that. Assertions in
`ctrk_axil_regs` check that a response, once offered, stays until it is taken.

## Parameters of `ctrk_top`

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 16384 | trace RAM entries (this design's choice: about 18 BRAM36 tiles) |
| `SAMPLE_PER` | 5 | cycles per TDC sample |
| `TIME_PER` | 10 | cycles per timestamp tick |

The package `ctrk_pkg` holds the fixed sizes: 32 CARRY8 / 256 taps, an 8-bit
weight, 32-bit time and threshold. It also holds the mode and state enums, the
`trace_entry_t` struct and the register offsets.

## What comes from the published kernel and what is chosen here

**Taken from the published kernel:**

* the 32-CARRY8, 256-tap TDC clocked by the kernel clock
* one sample every 5 cycles
* 8-bit Hamming weights
* a 32-bit Global Time ticking every 10 cycles
* a 32-bit threshold with "store if below"
* 256 as the keep-everything threshold
* the calibrate-then-threshold procedure
* the two-drop auto trigger with a capture window after the second drop
* a hard-wired trigger alternative
* monitoring the first read and write on PCIS, DDR and OCL
* a 125 MHz clock

**Chosen here:**

* the RAM depth
* the saturation of a weight of 256 to 255 (the published widths leave that
  one value unrepresentable)
* the two-stage popcount
* the control state machine, the modes and their encoding
* the drop re-arm rule and the programmable drop count
* the trigger synchroniser
* AW/AR handshakes as "first transaction"
* the whole register map and the readout through registers (instead of an
  AXI4 master writing the trace to DRAM)
* the synchronous active-high reset
* the TDC model's voltage law

**Known departures:**

* At 125 MHz a 32-bit counter that ticks every 10 cycles spans about 5.7
  minutes, not the roughly 2.5 minutes sometimes quoted for this kernel. The
  RTL follows the widths and the rate.
* The tool-flow kernel normally also has an AXI4 memory-mapped data port. It
  is not built here: the trace is read through AXI4-Lite, which is slow (about
  three register accesses per entry) but simple.
* No hardware computes the calibration average. The host does.

**Not included:** the FPGA shell, the custom-logic wrapper generated by the
tool flow, the victim accelerators, DRAM, and the host. The "active fence"
countermeasure (random power draw that hides the two drops) is not included
either.

## Capacity against real victim runs

The numbers below come from published measurements at 125 MHz.

**Long-term traces.** A full victim run can last up to about 2.5·10⁹ cycles
before computation starts. That is far inside the 4.3·10¹⁰-cycle timestamp
range. Such a run is about 10⁸ samples, while the RAM holds 16384 entries. The
long-term trace therefore works only through compression: a threshold that
keeps roughly one sample in 10⁴ still catches the deep drops, which are what
matters.

**Triggered captures.** A capture of 30000 cycles fits uncompressed.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ctrk_pkg.sv tb/tb_ctrk_top.sv --top-module tb_ctrk_top -o sim
./obj_dir/sim
```

**What the end-to-end test covers.** `tb_ctrk_top` uses the default sizes. It
plays a victim: supply noise, a shell-transfer drop with PCIS/DDR writes, then
a train of computation drops with DDR/OCL traffic. It runs all four steps:

1. calibration
2. a compressed trace until the RAM is full
3. a hard-trigger window
4. an auto-trigger window

It reads back every stored entry through AXI4-Lite and compares it with
weights and times computed independently from the applied voltage. It also
counts each mechanism (stored, skipped, full, stop, hard trigger, auto
trigger, drop detection, saturation, port events) and fails if any of them
never happened. It runs in a few seconds.

**Victim runs at real length.** `tb_ctrk_workloads` plays two victims with
their measured preparation times (the gap between the two drops):

* a systolic array: 1.3·10⁶ cycles, deep drops;
* a vector addition: 1.5·10⁶ cycles, only shallow drops.

For each, it records a 3.5·10⁶-cycle compressed trace, with the threshold just
below the quietest idle reading. It checks that the preparation time reads the
same three ways: from the trace, from the port monitor, and from the auto
trigger's drop times. For the vector addition, the auto trigger must stay
silent. The test simulates about 11 million cycles in roughly 15 s.

A VTA-sized run (preparation of 1.9·10⁸ cycles and more) was not simulated.
At about 10⁶ cycles per second, it would take several minutes per run.

**Checks against the specified rates.** The unit testbenches check:

* the 5-cycle sample period
* the 10-cycle timestamp period
* the two-cycle latency of the Hamming weight
* the exact capture-window lengths

**Changing the design.**

* To test against a different voltage law, change the parameters of
  `tdc_delay_line`.
* To make the trace longer or shorter, change `DEPTH`. The RAM address and
  count widths follow it.
