# Testarossa: a 16-channel VLSI tester on one chip

A conventional functional tester keeps a large vector memory, a few precise
timing generators shared across pins through a switching matrix, and racks of
pin electronics. This design puts all of that for 16 DUT pins on one CMOS
chip. Two ideas make that possible:

* **Compressed vectors.** Each vector is cut down to 20 bits: 16 force/expect
  bits plus a 4-bit index into a 16-entry *control map*. The map supplies
  the per-pin inhibit (do not drive) and mask (do not compare) bits. The
  vector stream is then Fiala-Greene (LZ77-style) compressed into a 1K x 40
  on-chip RAM. A hardware decompressor expands it at one vector per tester
  cycle, including a loop branch.
* **Cheap, calibrated timing.** Every pin has its own delay lines. Each line
  is a shift register, then an inverter chain, then edge adjusters. These
  delays are inaccurate but stable. A per-pin phase detector compares the pad
  against one shared reference clock, and software sweeps the settings until
  each edge lines up with the reference.

The top module is `testarossa_top`. It wires a host bus, the vector RAM, the
decompressor, the control map, the error buffer and 16 pin-electronics
channels.

## Vector path

```
vector RAM ──> prefetch ──> command decode ──> vec (20b) ──> control map ──> channels ──> compare ──> error buffer
 1K x 40        byte queue    + history 64x20     stage A       stage B        B..B+2       B+3
```

### Compressed stream format

The stream is a sequence of 10-bit "bytes". Each 40-bit RAM word holds four
of them, and byte 0 (bits 9:0) is consumed first.

| command | bits 9:6 | bits 5:0 | followed by |
|---------|----------|----------|-------------|
| Literal | `0000`   | n (0 means 64) | n vectors, 2 bytes each, bits 19:10 first |
| Copy    | length 1..15 | absolute history position | nothing |

Every vector the decompressor delivers is also written into the 64-entry
history buffer, at a write pointer that keeps advancing. A Copy re-delivers
`length` vectors starting at `position`. The read position wraps from 63 to
0, and it may read entries that the same Copy has just written.

Rules a compressor must obey:

* **Word alignment.** The Loop (target) word and the word after End must
  begin with a command.
* **No Copy across a block start.** No Copy may refer to history written
  before the start of its block. The blocks are: before the target, from the
  target to End, and after End. The history write pointer is reset to 0 at
  the first command of a run and at the first command of the target word.
  This makes absolute Copy positions mean the same thing on every pass of a
  loop.
* **Padding by splitting.** A block is padded to a whole number of words by
  splitting commands into shorter ones, e.g. a Copy of 5 becomes a Copy of 1
  and a Copy of 4. No filler code is used.

`tb/tb_fg_pkg.sv` contains a reference compressor that follows these rules
(greedy longest match). The testbenches use it to build RAM images.

### Decompressor timing (`fg_decompressor`)

* **Start.** A rising edge of `start` begins at word 0.
* **Output rate.** The first vector appears on `vec` 4 CycleClocks later.
  After that there is one vector per clock with no gaps, across the loop
  branch too. This holds unless the host takes the RAM.
* **Fetching.** The fetch logic reads a word whenever the byte queue
  (`prefetch_buffer`, 12 bytes) has room for it. The room check counts the
  word already in flight.
* **Bytes per vector.** A new Literal uses 3 bytes: the command and the first
  vector. A Literal continuation uses 2. A new Copy uses 1, and a Copy
  continuation uses none. So a fetch rate of 4 bytes per clock always keeps
  up.
* **End and Loop.** When the End word is fetched, the `loop` pin is sampled.
  If it is high, fetching continues at the Loop address. If it is low, the
  decompressor drains what it holds and goes idle. The last vector stays on
  the pads.

### Control map, comparison and error capture

* **Control map.** The vector's index (bits 19:16) reads a map entry. Bits
  31:16 of the entry are inhibit and bits 15:0 are mask.
* **Force stage (B).** The force bits and the inhibit bits are registered
  together, and the channels drive the pads during this cycle.
* **Acquire.** Each channel returns the sample of cycle B two CycleClocks
  later. One more register stage follows before the compare, whose inputs
  are acquired data, delayed expect data and delayed mask.
* **Error buffer.** A cycle fails if any unmasked bit differs. The first 16
  failures of a run are stored as `{cycle[23:0], acquired[15:0]}`, where the
  cycle is the vector's position in the run, counted from 0. Later failures
  are ignored. Start clears the buffer.

## Host bus and registers

The bus is 10 bits wide with address and data multiplexed (`IOAdrData`). The
control pins are `IOAdr`, `IORead`, `IOWrite` and `ChipSelect`. The host
latches an address with an `IOAdr` pulse. Writes are flow-through for as long
as `IOWrite` is high. `IORead` enables the output drivers.

The bus is asynchronous. This implementation synchronises it into CycleClock
with two flops, so every bus phase must last at least about three
CycleClocks. The exception is the output enable, which is decoded straight
from `ChipSelect`, `IORead` and `IOAdr`. Read data therefore appears as soon
as the drivers turn on, whatever the cycle rate. The register behind it was
selected earlier, so its contents are stable.

**Pin-electronics registers (addresses 0x000-0x17F).**

* A channel's window starts at `channel*24`.
* Each of its delay generators (Sample = 0, Width = 1, Delay = 2) occupies
  `generator*8 + offset`:

  | offset | register | meaning |
  |--------|----------|---------|
  | 0, 1 | DSR0, DSR1 | shift-register tap, one-hot, in bits 9:0 |
  | 2-4 | IC0-IC2 | inverter-chain tap, one-hot over bits 19:0 |
  | 5 | ECR | rising-edge adjust |
  | 6 | ECF | falling-edge adjust |

* DSR bit 10 selects the half-period falling-edge final stage and bit 11 the
  full-period rising-edge one.
* IC bits 20 and 21 force a constant 0 and a constant 1.
* ECR and ECF each hold a one-hot coarse tap in bits 3:0 and a one-hot fine
  tap in bits 7:4.
* In every field, bit 0 is the shortest delay.
* Offset 7 is IOCtl:
  * bit 0: TTL-level output.
  * bit 1: TTL input threshold, stored only.
  * bit 2: mid-cycle acquire stage.
  * bit 3: RC complement edge at mid-cycle.
  * Reading IOCtl also returns the phase-detector results in bits 9:8.
* Offset 15 is Format: 0 NRZ, 1 RZ, 2 RO, 3 RT, 4 RC.

**Decompressor registers (0x180-0x188).**

| addr | write | read |
|------|-------|------|
| 0x180 | Loop (target word) | Debug `{running, error buffer full, errors[3:0], prefetch bytes[3:0]}` |
| 0x181 | End word | VAdd (fetch address) |
| 0x182 | ExtRAdd (RAM address for host access) | HAdd (history write pointer) |
| 0x183 | ExtRCtl | Cmd (last command) |
| 0x184-0x187 | RWD0-3 (40-bit write data, RWD0 = bits 9:0) | RRD0-3 (read data) |
| 0x188 | DCtl (stored only) | - |

A RAM access works like this:

1. Write the address to ExtRAdd.
2. For a write, put the data in RWD0-3.
3. Set and then clear one ExtRCtl bit:
   * bit 0: write the vector RAM.
   * bit 1: read the vector RAM.
   * bit 2: write the control map.
   * bit 3: read the control map.
   * bit 4: read the history buffer.
   * bit 5: read the error buffer.

Vector-RAM accesses go through `vram_access_fsm`, which takes the RAM from
the decompressor:

* A write goes Init, W0, W1, W2, W3, with the write strobe in W1. W3 waits for
  the bit to drop.
* A read goes Init, R0, R1, R2, with the read strobe in R1. The data is ready
  in R2, which also waits for the bit to drop.

## Pin-electronics channel (`pe_channel`)

Each channel has three identical delay lines (`delay_generator`). All three
take **CycleClock/2**, a square wave at half the tester rate, so each line
produces one edge per cycle, alternately rising and falling. A line has three
stages:

1. **`sr_delay`.** Ten flops clocked by `Clock` (1, 2, 4 or 8 times
   CycleClock) with a one-hot tap select. The final stage is either a
   rising-edge flop or a falling-edge master-only stage, which gives a
   resolution of half a `Clock` period. Tap k with the rising stage delays by
   k+1 periods; with the falling stage, by k+0.5.
2. **`fine_delay`.** An inverter chain with 2 ns per tap, followed by separate
   rising-edge and falling-edge adjusters. Each adjuster has a coarse step of
   2 ns and a fine step of 0.6 ns. Because the two edges are adjusted
   independently, each of the four pulse edges of a cycle can be calibrated
   on its own.
3. **Behavioural model.** `fine_delay` is a behavioural model with delays in
   picoseconds (`timescale 1ps/1ps`). It stands for an analog circuit and is
   not synthesizable. Its intrinsic delay is 1 ns.

How the delay lines are used:

* **Force timing (`force_timing_gen`).** The Delay line is set to the edge
  time and the Width line to edge time + width. The XOR of the two is one
  pulse per cycle. Both lines always carry a 50% duty-cycle wave, so there is
  no minimum or maximum pulse width. Because the wave is periodic, an edge
  near the start of a cycle is obtained by delaying into the next cycle.
* **Formatter.** It combines the force bit, inhibit and the pulse:
  * NRZ: take the level at the pulse's leading edge and keep it.
  * RZ and RO: return to 0 or 1 outside the pulse.
  * RT: drive only during the pulse.
  * RC: drive the complement outside the pulse. The complement's first edge
    is at the cycle start or, as an option, at mid-cycle. There is no fourth
    delay line for calibrating that edge; it lies outside the DUT's capture
    window.
* **`pin_driver_ctl`.** Turns drive-high and drive-low into the gate enables
  of the CMOS-level and TTL-level output pairs. Drive-high and drive-low
  together turn both off.
* **`acquire`.** The Sample line's output has one edge per cycle, so two
  samplers are used, one per edge, and a mux picks the most recent. An
  optional flop on falling CycleClock suits late sample times. The result
  is retimed to rising CycleClock. The channel pads the path so the latency
  is always 2 cycles.
* **`phase_detector`.** Edge-triggered flops clocked by RefClock sample the
  pad on RefClock's rising and falling edges. Each result is held on the
  opposite edge for the host, which reads it in IOCtl bits 9:8. Sweeping a
  delay setting until the bit flips finds the reference edge to within one
  delay step.

## What is modelled and what is not

* **Analog parts are logic levels.**
  * The clocked input comparator with its threshold voltage is not modelled.
    The DUT pin is a logic level, and the TTL input-threshold bit has no
    logical effect.
  * Pad voltages, supply rails and the output transistors are outside the
    RTL. The pad's level is given by which driver enable is on.
* **Vector RAM.** It is a synchronous array with a one-clock read. The
  dynamic cells, their self-timing and refresh are not modelled, so DCtl has
  nothing to control.
* **Run end.** The compression scheme also allows a block after End that
  runs when the branch is not taken. The chip's Loop pin is defined
  differently: with Loop low, execution stops at End. That is what is built,
  so a program ends at End.
* **Register sets.** Every channel has its own complete set of timing,
  IOCtl and Format registers, as the register address map implies. The
  fabricated chip is described as having room for only one set of
  calibration and format registers.
* **Off-chip clocking is outside the RTL.** This covers the reference-clock
  generator and its counter-propagating distribution. The testbench produces
  RefClock itself.
* **Choices made in this design** (where the architecture leaves it open):
  * the byte order in a word;
  * the pointer reset at the loop target;
  * the 12-byte prefetch queue (three words rather than two, because the RAM
    read takes a clock);
  * the ExtRCtl, Debug, IOCtl and Format encodings;
  * the generator order inside a channel window;
  * the ECR/ECF field coding;
  * the 24-bit cycle number;
  * the fixed 2-cycle acquire latency;
  * the bus synchroniser.
* **Capacity.** At the nominal 5:1 compression, 10K vectors need 1000 of the
  1024 words. With random data and only 64-vector Literals, 2032 vectors
  fit. For the reference benchmark set, an estimate scales each benchmark's
  measured compression ratio (64-entry history) to 20-bit vectors. By that
  estimate, every benchmark fits except the largest and least compressible
  one, which needs about 1059 words.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/tr_pkg.sv tb/tb_fg_pkg.sv tb/tb_testarossa_top.sv \
    --top-module tb_testarossa_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

`tb_testarossa_top` runs the whole chip at its full size through its pins
only. It finishes in a few seconds.

1. **Set-up over the host bus.**
   * It programs the delay lines, formats and IOCtl of all 16 channels.
   * Each channel gets one role: NRZ, RZ, RO, RT, RC, RC with the mid-cycle
     edge, TTL, or late sampling.
   * It writes the control map.
   * It writes a compressed program with the reference compressor.
2. **Three runs.**
   * The first stops at End.
   * The second loops, releases Loop, and overflows the error buffer.
   * A third run follows a rewrite of the control map that masks the
     failing pin. It checks that only the remaining failures are recorded.
     This is how a user gets past the 16-entry limit.
3. **Checks.**
   * The pads are looped back, and a reference model gives the expected
     error-buffer contents. These are read back over the bus and compared.
   * It also checks pad levels inside and outside the pulse, the start-up
     latency and the one-vector-per-clock rate.
   * It counts 25 mechanisms, from wrapping Copies to phase-detector
     early/late results, and fails if any never occurs.

`tb_vram_capacity` runs the capacity cases at full size. It loads 2032
distinct random-looking vectors, which fill all 1024 words. It also loads a
10,000-vector program with a clock pin, counters, held bus values and
repeated bursts, which compresses to 850-950 words, depending on the random
seed. Both programs must come back exactly, one vector per clock.

`tb_calibration` calibrates one channel the way host software would, using
only register writes and phase-detector reads. It places RefClock's edge at
a random time. It then searches the Delay line (for the pad's rising edge)
or the Width line (for its falling edge) from the coarsest stage to the
finest. Each calibrated edge must land no later than the reference and less
than one 0.6 ns fine step before it. In a second part, RefClock runs at
half the cycle rate, with its rising edge in one cycle of each pair and its
falling edge in the other. The rising-edge and falling-edge adjusters of the
Delay line are then set to two different targets. This is how the
independent edges of a pulsed format are calibrated one by one.

Block testbenches check the cycle-level timing stated above, for example:

* the 4-clock decompressor start;
* the sequencer states;
* sub-nanosecond edge times of the delay chain.

## Files

* `rtl/tr_pkg.sv`: shared sizes, register addresses and types.
* `rtl/testarossa_top.sv`: the chip.
* Vector path:
  * `vector_ram`
  * `prefetch_buffer`
  * `history_buffer`
  * `fg_decompressor`
  * `control_map`
  * `error_buffer`
* Host side:
  * `host_interface`
  * `ctl_regs`
  * `vram_access_fsm`
  * `pe_regs`
* Channel:
  * `pe_channel`
  * `delay_generator` (`sr_delay` + `fine_delay`)
  * `force_timing_gen`
  * `formatter`
  * `pin_driver_ctl`
  * `acquire`
  * `phase_detector`
* `tb/tb_<block>.sv`: one testbench per block.
* `tb/tb_vram_capacity.sv`: the capacity workloads.
* `tb/tb_calibration.sv`: the edge-calibration procedure.
* `tb/tb_fg_pkg.sv`: the reference compressor and test-data generator.
