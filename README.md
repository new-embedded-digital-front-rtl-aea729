# Digital front-end for a small-animal PET detector module

Each detector module of the scanner is a stack of scintillation crystals on a
position-sensitive photomultiplier (PS-PMT) read out with Anger logic: four
analog signals, x+, x-, y+ and y-, whose differences locate the interaction
and whose sum measures its energy. This RTL is the acquisition core that sits
in the module's FPGA: it samples the four signals with a 10-bit ADC, finds each
scintillation pulse, reduces it to a 15-byte event record (position and energy
integrals, a decay-time measure for depth of interaction, and a timestamp), and
hands the records to an on-chip processor through a shared memory on its
peripheral bus (OPB), raising an interrupt when a batch is ready, so that the
processor can send it over Ethernet without copying it.

The top module is `pet_dsp_core`. Everything else of the system-on-chip (the
32-bit soft processor, memory controllers, UART, I2C, timers, interrupt
controller, Ethernet controller and the clock synthesiser) is vendor or
external logic and is not part of this RTL: the core exposes an OPB slave port,
an interrupt line, the ADC buses and the two signals exchanged with the
scanner's master controller.

## Signal flow

```
 ADC pins ─► adc_ctrl ─► polarity_blr ──(x,y,Ex,Ey)──► delay_line (Z^-d) ─┬─► integrator ─► Ix,Iy,IEx,IEy ─┐
  x+ x- y+ y-   strobe     invert, baseline,     │                         └─► doi_unit   ─► tail energy  ─┤
                            clip, combine        │ E = Ex+Ey                                                ├─► packet_queue ═╗
                                   ▲             ├─► pulse_detect ─ gate, gate_last ─► integrator, doi_unit │   (async FIFO)  ║
                                   └── freeze ───┤        └─ trigger ─► timing_unit ─► timestamp ───────────┘                 ║
                                                 │                                     (single ─► master)                     ║
 62.5 MHz acquisition domain ════════════════════════════════════════════════════════════════════════════════════════════════╬══
 50 MHz bus domain                                                             core_interface: 8 registers, 2 KB buffer, irq ◄╝
```

### Baseline restorer (`polarity_blr`)

A channel whose pulses go negative is inverted (`c' = 1023 - c`), so every
pulse rises above its baseline. The baseline is a first-order recursive average
with 8 fraction bits, `b += (s - b) / 2^k` (k = `ACQ[3:0]`), loaded directly
from the first sample after reset. The corrected value `s - b` is clipped at
zero, and the four corrected channels are combined into

    x = x+ - x-     y = y+ - y-     Ex = x+ + x-     Ey = y+ + y-     E = Ex + Ey

The ordering of the baseline update is what keeps a pulse out of its own
baseline. A sample's update is applied one clock after the sample, in the
cycle where its energy is on the outputs. In that cycle the detector has
already judged the sample, and its `busy` output (high from the triggering
sample to the end of the pulse) freezes the update. As a result the sample
that crosses the threshold is never averaged in. Samples on the rising edge
that are still below the threshold are averaged in, each with weight 2^-k.
While acquisition is disabled, `busy` stays low and the baseline keeps
tracking.

### Detection, gate and the pre-trigger delay (`pulse_detect`, `delay_line`)

The detector has three states. In ARMED, the first sample with
`E >= threshold` asserts `trigger` and opens the gate. The gate is high on
that sample and on the next `window - 1` samples. After the window the
detector waits in REARM until E drops below the threshold, so the tail of a
pulse cannot trigger again, and then returns to ARMED. `trigger`, `gate` and
`gate_last` are combinational on the current sample, so they line up with the
sample stream.

The integrators do not see the current sample. They see the output of
`delay_line`, the sample taken `d` valid samples earlier. If the trigger comes
on sample `t0`, the gate therefore integrates samples `t0-d … t0-d+window-1`.
This captures the `d` samples of the rising edge that came before the
crossing. With `d = 0` the integration starts on the crossing sample itself.
`d` can be 0 to 15.

### Integrals and decay time (`integrator`, `doi_unit`)

`integrator` sums x, y, Ex and Ey over the gate into 18-bit fields. 18 bits
holds full-scale input over 128 samples. Position is then
`X = Ix / (IEx)` and `Y = Iy / (IEy)`; this division, and any energy
calibration, is left to the host.

`doi_unit` measures decay time for depth of interaction. In a phoswich the
crystal layers have different scintillation decay times, so the share of the
energy that arrives late in the window identifies the layer. The unit sums E
over the gate positions `>= doi_start` (counted from 0 at the first gated
sample) and saturates the sum at 16 bits. The host forms the ratio
`DOI / (IEx + IEy)`.

### Timestamp (`timing_unit`)

A 28-bit counter advances on every 62.5 MHz clock, wraps every 4.3 s, and
restarts at 0 on `sync_start`. The master controller sends `sync_start` to every module so that
all their counters agree. Every sample records the counter value and its
energy. On a trigger, the crossing lies between the previous sample, with
energy E0 below the threshold, and the current one, with energy E1. Linear
interpolation gives the fraction of a sample period at which the crossing
happened:

    f = floor(16 * (threshold - E0) / (E1 - E0)),  clamped to 0..15

The fraction is computed by a 4-step unrolled restoring division. The 32-bit
timestamp is `{counter at the previous sample, f}`. The crossing time in
clocks is therefore `t[31:4] + t[3:0]/16 * (adc_div + 1)`. When the ADC runs
at the full clock rate, one step of `f` is 1 ns.

## The event packet

Each event is one 120-bit record (`pet_pkg::event_t`). It is stored as 15
bytes, most significant byte first:

| bits    | field | meaning                                        |
|---------|-------|------------------------------------------------|
| 119:88  | `t`   | timestamp: `[31:4]` coarse clocks, `[3:0]` 1/16 sample |
| 87:72   | `doi` | tail energy integral (saturating)              |
| 71:54   | `iey` | integral of Ey                                 |
| 53:36   | `iex` | integral of Ex                                 |
| 35:18   | `iy`  | integral of y (two's complement)               |
| 17:0    | `ix`  | integral of x (two's complement)               |

Byte 0 of a packet is `t[31:24]`, and byte 14 is `ix[7:0]`.

## Handing events to the processor

### Clock crossing (`packet_queue`)

An event is complete one clock after the last gated sample. It is then pushed
into `packet_queue`, a 16-entry asynchronous FIFO with Gray-coded pointers.
The FIFO carries events from the 62.5 MHz acquisition clock to the 50 MHz bus
clock. Acquisition runs on a clock recovered from the scanner-wide reference,
while the processor and bus keep a local clock, so the bus side still works if
that recovery fails. An event that finds the FIFO full is dropped and counted
in `LOST`.

### The shared buffer (`core_interface`)

`core_interface` pops one event at a time and writes its 15 bytes into a 2 KB
dual-port buffer, one byte per bus clock. The buffer appears in the
processor's address space and is split into two 1 KB halves. Packets in a half
are packed back to back with no padding, at byte offset `15 * n` within the
half, in big-endian word order (byte address `4w` is bits 31:24 of word `w`).

A half is closed when it holds `IRQ_PKTS` packets, or when software writes
`CTRL.flush`. Closing a half marks it full and raises `irq` (if
`CTRL.irq_en` is set). The core then continues in the other half. Software
sends the full half straight from the buffer and then releases it by writing
its bit to `STATUS`. If the core needs a half that is still full, it stops
draining the FIFO. The FIFO then absorbs the burst, and beyond 16 events
further events are lost.

The software loop on an interrupt:

1. Read `STATUS`.
2. For each half `h` with its full bit set, send `15 * count_h` bytes from
   `BASE + 0x800 + h * 0x400`.
3. Write `1 << h` to `STATUS` to release the half.

### Register map (byte offsets from `C_BASEADDR`)

| offset | name     | fields |
|--------|----------|--------|
| 0x00   | CTRL     | [0] enable, [4:1] invert x+, x-, y+, y-, [5] irq enable (reset 1), [8] flush (write 1) |
| 0x04   | THRESH   | [11:0] energy threshold on E (reset 200) |
| 0x08   | WINDOW   | [7:0] gate length in samples (reset 16; 0 means 1), [15:8] doi_start (reset 8), [19:16] delay d (reset 2) |
| 0x0C   | ACQ      | [3:0] baseline shift k (reset 4), [11:8] ADC divider: one sample every n+1 clocks (reset 0) |
| 0x10   | IRQ_PKTS | [7:0] packets that close a half, clamped to 1..68 (reset 68) |
| 0x14   | STATUS   | read: [0] half 0 full, [1] half 1 full, [2] half being filled, [3] FIFO empty, [23:16] packets in half 0, [31:24] packets in half 1. Write: [0], [1] release a half |
| 0x18   | SINGLES  | events detected; any write clears it |
| 0x1C   | LOST     | events dropped at the full FIFO; any write clears it |
| 0x800  | buffer   | 2 KB, read-only from the bus |

The settings cross into the acquisition domain through two-flop synchronisers
without a handshake. Change them only while `CTRL.enable` is 0. `SINGLES` and
`LOST` are counted in the bus domain from toggle-synchronised pulses.

### Bus timing

The OPB slave acknowledges a selected access inside its 4 KB window with a
one-cycle `sl_xferack` on the next clock. Read data appears on `sl_dbus` in
that cycle, and `sl_dbus` is zero at all other times. Byte enables are
ignored. Writes to the buffer are acknowledged and discarded. Assertions in
`core_interface` check that an acknowledge lasts one cycle and answers a
select.

### Other ports

- `single` pulses for one acquisition clock on every detected event. It is
  the report to the master controller's coincidence unit.
- `adc_clk_en` is the ADC conversion strobe.

### Reset

There is one reset, `rst_opb`: active high and synchronous to the bus clock.
It is re-synchronised into the acquisition domain, and both domains must see
it for a few clocks of each.

## Throughput

| load | need | this core |
|------|------|-----------|
| 2 Mcps per module, the maximum a module is meant to handle | 2.0 M events/s | Acquisition: one event per `window + 1` samples, which is 3.7 Mcps with the 16-sample window. Any window up to 30 samples still gives ≥ 2 Mcps. Bus side: 16 clocks per event at 50 MHz, which is 3.1 Mcps |
| 500 kcps per PS-PMT, the sustained target | 500 k × 120 bit = 60 Mbps | Well under both limits. A 68-event half fills in 136 µs |
| ~300 kcps at ~40 Mbps, the streaming rate reached in software | 36 Mbps of packets | The processor and the Ethernet link set this limit, not the core |

Pulses overlap in the pipeline. While one pulse is being integrated, earlier
ones can sit in the FIFO, be copied into the buffer, or wait in a full half
for the processor.

## Where this design is its own

The published design gives the following:

- the block structure: ADC controller, polarity/baseline restorer, Z^-d
  delay, pulse-detection state machine with its gate, integrators, DOI unit,
  timing unit, queue, and core interface on the OPB with shared memory
- the 10-bit samples of the four Anger channels
- the 62.5 MHz and 50 MHz clock domains, with asynchronous exchange between
  them
- a programmable threshold and a programmable number of integrated samples
- the 15-byte event packet
- eight registers
- an interrupt once enough data is stored
- a time counter shared across modules through a synchronised start

It does not give the following, so each is a choice made here:

- every width inside the packet, and the order of its fields
- the register layout and reset values
- the baseline filter and its freeze rule
- the re-arm rule of the detector
- the tail-integral DOI method
- the interpolated timestamp
- the FIFO depth
- the buffer size and its two halves, and the flush
- the OPB timing and byte order
- the ADC pin format and divider

Departures and omissions:

- The design was also described with an alternative interface. In it, events
  leave through a point-to-point FIFO link into the processor's register file
  instead of through the shared memory. Only the shared-memory interface is
  built.
- The master controller answers each single with an acknowledgement
  (`Sing_OK`), but its meaning is not described, so the core has no input
  for it.
- There is no pile-up rejection. A second pulse inside the gate is
  integrated together with the first.
- The packet carries raw integrals. Position ratios, energy calibration and
  the DOI ratio are left to software.
- The processor, its memories and peripherals, the Ethernet controller for
  the external MAC/PHY chip, and the PLL that derives 62.5 MHz from the 25 MHz
  reference are outside this RTL.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `pet_pkg.sv` | shared widths, the sample / Anger / event / settings structs, register indices |
| `pet_dsp_core.sv` | top: the whole core, both clock domains |
| `adc_ctrl.sv` | ADC conversion strobe and channel latch |
| `polarity_blr.sv` | polarity and baseline restoration, Anger combinations |
| `pulse_detect.sv` | threshold trigger and gate state machine |
| `delay_line.sv` | Z^-d pre-trigger delay |
| `integrator.sv` | Ix, Iy, IEx, IEy |
| `doi_unit.sv` | tail energy for depth of interaction |
| `timing_unit.sv` | synchronised time counter and interpolated timestamp |
| `packet_queue.sv` | asynchronous event FIFO |
| `core_interface.sv` | OPB slave: registers, shared buffer, interrupt |
| `cdc_sync.sv`, `pulse_sync.sv` | two-flop and toggle synchronisers |

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`) and two
testbenches for the whole core:

- `tb_pet_dsp_core` runs the core at its default sizes. A pulse generator
  drives the ADC buses, and an OPB processor model takes the data. The test
  runs four phases: streaming, a flush, an overload that forces lost
  events, and a switch to a half-rate ADC with a shorter gate. Every field
  is compared with values computed from the pulse shape, and the test checks
  that the interrupt, both halves, the flush, overflow, the mode switch, DOI
  and fine time all occur.
- `tb_rate_2mcps` runs 680 events at 2.02 Mcps and requires that none is lost.

Every testbench ends by printing
`TB_RESULT checks=<n> failures=<m>`.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pet_pkg.sv tb/tb_pet_dsp_core.sv --top-module tb_pet_dsp_core
./obj_dir/Vtb_pet_dsp_core
```

Replace the testbench name to run any other test. The simulations take well
under a second.

## Changing the design

The top-level parameters are:

- `C_BASEADDR`: the bus window. The window is 2 × `BUF_BYTES`, aligned.
- `DELAY_MAX`: the depth of the Z^-d buffer. The `WINDOW[19:16]` field
  limits it to 16.
- `QUEUE_DEPTH`: a power of two, at least 4.
- `BUF_BYTES`: a power of two, 64 to 8192. A half holds
  `BUF_BYTES / 2 / 15` packets.

Packet field widths live in `pet_pkg`. Keep their total at 120 bits, or
change `PKT_BYTES` to match. The gate length register is 8 bits, so windows
longer than 128 samples can wrap the 18-bit integrals at full scale.
