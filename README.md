# Threshold-triggered lightning acquisition with GPS time stamps

A lightning location network works by Time of Arrival: several sensor nodes
record the same sferic (the radio burst of a lightning stroke), and the
differences between the times at which each node saw it place the stroke.
Each node therefore has to do two things well: stamp every sample with an
absolute time that all nodes share, and avoid drowning its link and its host
in hours of background noise.

This RTL is the FPGA section of such a node. It samples one channel of a
magnetic-field receiver at 1 MS/s, stamps every sample with GPS-disciplined
time in microseconds, and applies a basic amplitude trigger: nothing leaves
the FPGA until a sample exceeds a user threshold, and then a user-set number
of samples (the crossing sample first), each with its own stamp, is streamed
to the host through a DMA FIFO. The trigger then re-arms and waits for the
next pulse. In the reference setting the threshold is 5 V and 70 samples are
sent per trigger: 70 us of signal around each return-stroke pulse.

## Data path

```
            front_panel_regs  <---- host register port (32-bit)
     threshold | N | period | start/stop          ^ status, counters, time
               v                                  |
 sample_timer --tick--> adc_capture --stamped--> trigger_ctrl --record--> dma_packer --> DMA FIFO
                          ^   |  ^                                        (2 x 64-bit
 gps_timekeeper --now-----+   |  |                                         per sample)
   ^ PPS, second              v  |
                        ADC module (convert / valid, 16-bit code)
```

| module | role |
|---|---|
| `lightning_pkg` | shared types: `sample_t`, `timestamp_t`, `stamped_sample_t`, `capture_rec_t`, `trig_state_t`, default settings |
| `sample_timer` | one conversion strobe per Sample Period while a capture runs; never faster than 1 MS/s |
| `gps_timekeeper` | seconds + microseconds, loaded at each GPS pulse, free-running in between; `locked` indicator |
| `adc_capture` | starts the conversion, latches the time of the strobe, pairs it with the returned code |
| `trigger_ctrl` | the threshold trigger (below) |
| `dma_packer` | two FIFO elements per sample, back-pressure, drop reporting |
| `front_panel_regs` | controls and indicators on a host register port |
| `lightning_acq_top` | wires the above together |

Everything runs on one clock, `CLK_HZ` (default 40 MHz), with an active-low
asynchronous reset. At the defaults a sample period is 40 clock cycles.

## The trigger

`trigger_ctrl` has three states.

* **IDLE** – nothing is converted or sent. A Start pulse moves it to ARMED,
  but only while the timekeeper reports lock; a Start before lock is ignored,
  so no sample can ever leave with an unsynchronised stamp.
* **ARMED** – every sample is compared with the threshold, as signed ADC
  codes. Samples at or below it are discarded on the spot; they are never
  buffered. The first sample strictly above it starts an *event*: it is sent
  as index 0, the event counter advances, and the state becomes ACQUIRE.
* **ACQUIRE** – the following samples are sent unconditionally, whatever
  their amplitude, until `num_samples` have been sent for this event
  (the crossing sample included). Then the state returns to ARMED.

A Stop Capture pulse returns to IDLE from any state, also in the middle of an
event; the partial event is simply cut short.

Points a user should know:

* The test is a **level** test, not an edge test. If the signal is still
  above the threshold on the first sample after an event ends, that sample
  starts the next event at once. A pulse longer than `num_samples` therefore
  comes out as back-to-back events with consecutive event numbers and
  contiguous stamps, and nothing of it is lost.
* `num_samples` is read live; 0 behaves as 1.
* Each record carries `event_id` (16 bits, wrapping) and `index` within the
  event, so the host can split the stream into events without relying on
  timing.
* Only positive excursions trigger. A negative-going pulse needs a negative
  threshold with an inverted comparison, which this block does not provide.

The trigger adds one cycle: a record leaves `trigger_ctrl` the cycle after
its stamped sample arrives.

## Time stamps

`gps_timekeeper` keeps `{sec[31:0], usec[19:0]}`. The GPS receiver supplies a
pulse per second (asynchronous; two-flop synchroniser) and, ahead of it, the
UTC second that the pulse starts (`gps_sec`, `gps_sec_valid`). On a pulse
with a valid second the keeper loads that second and zero microseconds and
sets `locked`. A prescaler of `CLK_HZ/1e6` cycles then advances the
microsecond count, which rolls into the next second at 999 999 on its own,
so time keeps running across a late or missing pulse. If no pulse arrives
for `LOCK_TIMEOUT_US` (1.5 s), `locked` drops; time still runs, but a new
Start is refused until the next pulse. A capture already running keeps
running.

The pulse is recognised three clock cycles after the pin rises, so the
loaded time lags true GPS time by 75 ns at 40 MHz, well under the stamp's
1 us resolution.

A sample's stamp is the time at which its **conversion was started**, not
the time its code came back from the ADC. `adc_capture` latches the time on
the strobe and holds it while the conversion is outstanding. At 1 MS/s the
samples of one event therefore carry consecutive microsecond stamps. A
strobe that arrives while a conversion is still outstanding (an ADC slower
than the Sample Period) is skipped and counted in `missed`.

## What the host receives

Each triggered sample becomes two 64-bit elements on the DMA write port
(`dma_data`, `dma_valid`, `dma_ready`; an element is taken when both are high,
and the element on offer holds steady until it is taken):

| element | bit 63 | 62:52 | 51:32 | 31:0 |
|---|---|---|---|---|
| time | 1 | 0 | `usec` | `sec` |

| element | bit 63 | 62:48 | 47:32 | 31:16 | 15:0 |
|---|---|---|---|---|---|
| data | 0 | 0 | `event_id` | `index` | sample code |

Bit 63 lets the host re-pair the halves even if it starts reading in the
middle of the stream. With a ±10 V, 16-bit converter a code is 10/32768 V,
so 5 V is code 16384.

The FPGA holds no sample buffer: `dma_packer` keeps at most the one record it
is currently writing. The FIFO has 40 cycles per sample to take two elements,
so this only matters if the FIFO stays full for a whole sample period. Then
the new record is **dropped**, not queued: `dropped` counts it and the sticky
`overflow` flag is raised until the host clears it. Gaps in `index` within
an event show the host where.

Latency from the ADC result to the time element on the DMA port is three
clock cycles.

## Host registers

32-bit port: write with `wr_en`/`wr_addr`/`wr_data` at the clock edge; reads
are combinational from `rd_addr`.

| addr | name | access | content |
|---|---|---|---|
| 0 | CONTROL | W | bit0 Start, bit1 Stop Capture, bit2 clear overflow (each a one-cycle pulse) |
| 1 | THRESHOLD | RW | bits 15:0, signed code; reset 16384 (5 V) |
| 2 | NUM_SAMP | RW | bits 15:0, samples per trigger; reset 70 |
| 3 | PERIOD | RW | bits 15:0, Sample Period in clock cycles; reset `CLK_HZ/1e6` (1 us); values below 1 us act as 1 us |
| 4 | STATUS | R | bit0 locked, bits 2:1 trigger state (0 idle, 1 armed, 2 acquire), bit3 overflow |
| 5 | TRIGGERS | R | events since reset |
| 6 | LOSSES | R | bits 31:16 missed conversions, bits 15:0 dropped records |
| 7 | TIME_SEC | R | current GPS second |

Typical use: wait for STATUS bit0, write THRESHOLD, NUM_SAMP and PERIOD,
write 1 to CONTROL, read the DMA stream, write 2 to CONTROL to stop.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `CLK_HZ` | top, `gps_timekeeper` | 40 000 000 | clock frequency; must be a multiple of 1 MHz |
| `LOCK_TIMEOUT_US` | top, `gps_timekeeper` | 1 500 000 | lock is lost after this long without a pulse |
| `MIN_PERIOD` | `sample_timer` | 40 (top: `CLK_HZ/1e6`) | fastest sample period, 1 MS/s |
| `DEFAULT_PERIOD` | `front_panel_regs` | 40 (top: `CLK_HZ/1e6`) | reset Sample Period |

The 1 MS/s rate, the 5 V / 70-sample setting, the microsecond stamps and the
Start-after-lock rule come from the node this design describes. The clock
frequency, the ADC word (16-bit, ±10 V), the receiver interface, the lock
timeout, the register map, the element layout, the drop policy and the
event/index tags are this design's own choices.

## Not included

* The ADC module, the GPS receiver and the DMA FIFO itself are bought parts;
  the top brings their signals out as ports. The testbenches contain small
  behavioural stand-ins for them.
* The host side — the real-time controller that reads the FIFO and forwards
  the data over Ethernet, and the PC that logs and plots it — is software.
* The antenna and the analog front end (3–30 kHz band) are analog.
* An adaptive threshold (a running average of the signal while it stays below
  the threshold) and a rate of 10 MS/s or more are natural next steps for
  this node but are not built. Raising the rate means changing `MIN_PERIOD`
  and the 1 us stamp resolution together; at 40 MHz the packer would still
  have 4 cycles for its 2 elements per sample.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog:

| testbench | what it establishes |
|---|---|
| `tb_sample_timer` | strobe spacing for several periods, 1 MS/s floor, no strobe while disabled |
| `tb_gps_timekeeper` | lock only on a pulse with a valid second, microsecond count against a cycle-count reference, second rollover, lock loss after the timeout, re-lock (clock scaled to 2 MHz) |
| `tb_adc_capture` | every code paired with the time of its strobe, skipped strobes counted |
| `tb_trigger_ctrl` | reference model over ~2500 random samples: Start refused without lock, trigger, post-trigger count, re-arm, level re-trigger, Stop mid-event, `num_samples` of 0 and 1, negative threshold |
| `tb_dma_packer` | element layout decoded independently, random back-pressure, drops predicted and counted, overflow flag and clear |
| `tb_front_panel_regs` | reset values, write/read-back, one-cycle pulses, read-only registers |
| `tb_lightning_acq_top` | end to end at the default parameters (below) |
| `tb_workload_table31` | the reference capture replayed end to end at reset settings: a pulse that crosses 5 V at 18:39.447778 must come out as 70 records stamped on consecutive microseconds starting with the 5.153 V sample, then one more event on the next pulse and nothing in between (about 18 million cycles, some 15 s) |

`tb_lightning_acq_top` runs the whole design with no parameter overrides. It
drives a synthetic lightning pulse train (damped pulses of about 5.8 V peak
every 250 us on a noise floor, every fourth one long enough to stay above
5 V for more than 70 samples), answers conversions with a 10-cycle ADC model,
supplies a GPS pulse, and takes elements with a random-ready FIFO. It keeps
its own time reference and trigger model, and checks every element pair,
that samples within an event are 1 us apart, the conversion spacing, and the
counters read over the host port. It counts and requires each mechanism:
Start refused before lock, lock, triggers, re-arm, level re-trigger, samples
discarded below threshold, FIFO stalls, drops under a long stall, a change of
Sample Period to 2 us, Stop Capture and the 1 MS/s rate. It simulates about
3000 conversions in well under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/lightning_pkg.sv tb/tb_lightning_acq_top.sv --top-module tb_lightning_acq_top
./obj_dir/Vtb_lightning_acq_top
```

Replace the testbench name for the others. Add `--assert` to enable the
handshake assertion in `dma_packer` (the element on offer must not change
while the FIFO is not ready).

What this does not establish: behaviour against the real ADC module, GPS
receiver and DMA FIFO, whose interfaces here are stand-ins; timing closure on
an FPGA; and reset or clock-domain behaviour beyond the PPS synchroniser.
