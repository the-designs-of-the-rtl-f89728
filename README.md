# CCB master and slave FPGAs

The CCB (continuum correlator board) digitises four ADC channels on each of
four slave FPGAs at 10 MS/s. It integrates the samples in step with a
receiver's phase switches and hands the results to a PC. One master FPGA
runs everything:

- It takes its configuration over an EPP parallel port.
- It drives the receiver's two phase switches and two calibration diodes.
- It tells the slaves when to integrate, which phase bin each sample belongs
  to, and when to drop samples while a switch settles.
- At the end of every integration it reads all 128 integrated words from the
  slaves over a shared backplane bus. It puts an 8-word header in front of
  them and streams the frame to the PC through an FT245-style USB FIFO chip.
- In dump mode it sends raw samples of a single ADC instead of integrals.

This repository holds synthesizable SystemVerilog for both FPGA designs, a
top level (`ccb_system`) wiring one master to four slaves, and a
self-checking testbench for every module.

## System view

```
 PC --EPP--> control_gateway --regs/attn--> state_generator --slave bus ctrl--> 4 x ccb_slave
   <--IRQ--                                    |   |  phase_sw, cal_diode --> receiver
                                               |   +-- 1PPS
 PC <--USB-- data_dispatcher <--16-bit bus------------------------------------- slaves
 100 MHz --> clock_conditioner --> 10 MHz system clock, delayed ADC clock
```

`ccb_system` (`rtl/ccb_system.sv`) has one `ccb_master` and `NSLAVES=4`
`ccb_slave` instances. Each slave has a fixed 2-bit board number. The
tri-state data bus is modelled as a multiplexer driven by whichever slave has
its output enable set. Everything outside the FPGAs is a port: the ADCs, the
USB chip, the parallel port, the receiver and the frequency synthesiser.

## Slave FPGA

`ccb_slave` has four `ccb_sampler`s, one per ADC, and one shared
`ccb_signal_injector`.

- **Sampler.** It registers its ADC on the ADC clock. It feeds a
  `ccb_integrator`, which holds four `ccb_accumulator` bins, one per
  phase-switch state.
  - The bus `phase` field picks the bin that takes the current sample.
  - While `blank` is high, samples are dropped.
  - Each bin is a 32-bit unsigned accumulator that saturates instead of
    wrapping.
- **Start of an integration.** The `start` strobe copies every bin into a
  two-word-per-bin parallel-in/serial-out register (PISO). Each bin then
  restarts from the first sample of the new period, or from zero if that
  sample is blanked.
- **Readout.** The PISOs of the four samplers form one chain of 32 16-bit
  words. The order is sampler 0 first, then bin 0 first, with the low half
  before the high half.
  - When the master addresses the slave and raises `read`, the head of the
    chain is on the bus.
  - Each clock shifts the chain by one word, so the master reads one word per
    clock.
- **Dump mode.** The slave instead puts the raw sample of the sampler named
  by `phase` on the bus.
- **Test mode.** Every sampler takes the injector's pseudo-random samples in
  place of its ADC. The injector is a 14-bit Fibonacci LFSR: taps 13, 4, 2
  and 0, period 16383, restarted on each `start`. A PC can therefore check
  the whole data path bit for bit.
- **Heartbeat.** `ccb_heartbeat_gen` drives a slow square wave on an extra
  bus line. It lets the master tell which slave boards are alive.

## Master FPGA

### Control Gateway: EPP registers and interrupts

- `epp_handshaker` runs the EPP strobe/wait handshake. It produces one
  `strobe` per host cycle, with the direction and the address/data type.
- **Address and data cycles.**
  - An EPP address write loads `epp_addr_reg`.
  - EPP data writes and reads reach the register that address selects, in
    `epp_reg_bank`: twenty 8-bit `epp_data_reg`s.
  - Each register raises a one-clock `attn` pulse when it is written.
  - An EPP *address read* returns the interrupt mask, not the address.
- **Register map** (`rtl/ccb_pkg.sv`). Multi-byte registers are stored most
  significant byte at the lower address.

  | addr | register | meaning |
  |---|---|---|
  | 0 | start_scan | writing starts a new scan; bit 0 = wait for the next 1PPS |
  | 1 | cal_diode | queue entry: count[7:2], diode B, diode A |
  | 2 | scan_flags | test, dump, switch_a/b active, close_a/b initial states |
  | 3–4 | state_len | clocks per phase-switch state (16 bit) |
  | 5 | blank_dt | clocks blanked after each switch change |
  | 6–9 | diode_rise | cal-diode turn-on settling time (32 bit) |
  | 10–11 | diode_fall | cal-diode turn-off settling time (16 bit) |
  | 12–13 | integ_len | phase-switch cycles per integration (16 bit) |
  | 14 | roundtrip_dt | delay from receiver control to data at the slaves |
  | 15 | holdoff | interrupt hold-off, 5 bits |
  | 16 | dump_adc | slave[3:2], sampler[1:0] for dump mode |
  | 17–18 | dump_lim | words wanted in a dump frame (16 bit) |
  | 19 | adc_delay | ADC clock delay in 10 ns steps |

- **Interrupts.** `epp_interrupter` shares the one parallel-port interrupt
  among three sources:
  - cal-queue space (`cal`);
  - end of integration (`int`);
  - once a second, from 1PPS (`sec`).

  Each source latches in an `irq_reg`. The host reads the mask
  `{5'b0, sec, int, cal}` with an address read, and that read clears what it
  returns. A request the host has not acknowledged is sent again.
  Interrupts are at least `(holdoff+1) × 256` clocks apart.

### State Generator: the scan timing

This is the hardest part of the design. It matters because every control
change reaches the data late, after a delay through the receiver and the
ADCs.

- **Scan Initiator.** A write of `start_scan`:
  - stops any running scan;
  - freezes a snapshot of all configuration registers (`scan_cfg_t`);
  - increments the 32-bit scan number.

  If the 1PPS-sync bit was set, it then waits for the next conditioned 1PPS
  edge (`pps_gateway`). Once the Data Dispatcher is idle it raises `run_rx`.
  It raises `run_acq` `roundtrip_dt` clocks later.
- **Three controllers.** They run the same timing machinery, one copy each.
  - `receiver_controller`, on `run_rx`, drives the phase switches and the cal
    diodes.
  - `slave_controller`, on `run_acq`, drives `phase`, `blank`, `start`,
    `dump` and `test` on the slave bus.
  - `dispatch_controller`, on `run_acq`, tells the Data Dispatcher when to
    send a frame and what to put in its header.

  Because the slaves and the dispatcher start `roundtrip_dt` clocks after the
  receiver, a sample is binned with the switch state that actually produced
  it.
- **`scan_sequencer`.** It is three cascaded `ccb_metronome` down-counters:
  - clocks per state (`state_len`);
  - states per cycle: 4, 2 or 1 for two, one or no active switches;
  - cycles per integration (`integ_len`).

  Each metronome adds a clock of delay. So the state, cycle and integration
  ticks are re-timed through 3, 2 and 1 registers to coincide with each
  other. The timing after `load` falls:
  - `start_tick` is one clock wide, at the second rising edge after the edge
    where `load` is first seen low;
  - phase ticks follow every `state_len` clocks;
  - integration ticks follow every `state_len × nstates × integ_len` clocks;
  - a 32-bit `time` counts clocks from `start_tick`.
- **`phase_sequencer`.** While loading, it fills two 4-entry rotating
  registers with the switch patterns for one cycle, worked out from the
  active flags and the initial states:
  - two active switches give a gray sequence, A changing first;
  - one active switch toggles each state.

  Each phase tick rotates them. After each change a counter holds `blank`
  high for `blank_dt` clocks.
- **Cal diodes (`cal_controller`).**
  - Host writes of `cal_diode` fill a 16-entry queue.
  - At each integration start the next entry is popped when the current
    count has run down to 1, or was 0. Its top six bits say for how many
    integrations the diode states hold.
  - If the queue is empty, the diodes keep their states.
  - A `cal` interrupt asks for more entries.
  - Each diode has a `cal_switcher`. When the diode changes it counts the
    rise or fall settling time and reports `stable`.
  - The header of each integration records whether the diodes were stable
    for all of it.

### Data Dispatcher: slave bus to USB

- **`slave_reader`.** On each send request it reads the slaves through a
  down-counter.
  - **Integration mode.** The counter starts at 127 and bits [6:5] address
    the slave. Each slave's 32 words are read in turn, slave 3 first, down to
    slave 0.
  - **Dump mode.** It asks for `dump_lim` words, all from the dump slave.
- **`frame_buffer`.** It holds:
  - a 1024 × 16 first-word-fall-through FIFO (`ccb_fifo`);
  - an 8-word header PISO (`frame_header`);
  - a `byte_streamer`, which writes the header, then the FIFO, low byte
    first, to the USB chip (WR strobe, waits on TXE#).

  When the FIFO fills, the rest of a dump frame is dropped: the frame is
  truncated, not stalled. When the frame is sent, a one-clock `usb_flush`
  pulse is given.
- **Header words, in order:**
  1. `{14'b0, dump, 1}`
  2. `{8'b0, cal[1:0], stable, test, roster[3:0]}`
  3. to 8. integration number, scan number and time stamp, 32 bits each,
     low word first.
- **`slave_detector`.** A `heartbeat_detector` watches the slave heartbeat
  during each slave's read burst. The result is the 4-bit `roster` of live
  slaves.
- **Busy handling.** A send request is accepted only when the previous frame
  has been sent completely. A request that comes while a frame is still going
  out is ignored, so the new integration's frame is lost rather than
  corrupting the one in flight. The scan initiator also waits for `idle`
  before starting a scan.

### Clock Conditioner

`clock_conditioner` makes the 10 MHz system clock from the 100 MHz output of
the frequency synthesiser, using a 10-stage self-correcting shift register.
It also makes the ADC clock: a copy delayed by `adc_delay` × 10 ns, taken
from another tap.

## Where this RTL departs from, or adds to, its specification

These follow the specification:

- the block structure;
- the register list and widths;
- the 128-word read order and slave addressing;
- the countdown rule of the cal queue;
- the LFSR taps;
- the dump-size truncation;
- the interrupt sharing and the hold-off;
- the divide-by-10 clock.

These are this design's own choices:

- **FIFO depths.** The frame FIFO is 1024 words, one block RAM; the
  specification says only "large". The cal queue is 16 entries.
- **Cal repeat count.** The count field is six bits, so a single entry holds
  its diode states for at most 63 integrations, and counts 0 and 1 both mean
  one. The specification speaks of up to 64.
- **Tick re-timing and masking.** The exact re-timing registers, and masking
  metronome ticks while `load` is high, are this design's. The mask keeps a
  metronome just released from reset from producing a spurious tick.
- **Header timing.** The header is loaded one clock after the send request.
  The roster in a header is the one measured during the *previous* frame's
  reads, so the first frame of a scan reports roster 0.
- **First integration.** The first integration of a scan starts on
  `start_tick`. Because of the pipeline delay to the bins, the first
  integration's bins are off by one sample each way. With both switches
  active, bin 0 gets one extra sample and bin 2 one fewer. Later integrations
  are exact.
- **Slave bus write.** The slave-bus `write` line exists but is tied low and
  ignored by the slaves; the specification gives it no use.
- **USB strobe.** The FT245 WR strobe is one clock high and one clock low per
  byte. The USB chip's read side (RD#, RXF#) is not used.
- **Not in RTL.** The FPGA frequency synthesiser (DCM) and clock buffers, and
  all external chips, are outside the RTL.

## Simulating

Each module `rtl/<m>.sv` has a testbench `tb/tb_<m>.sv`. Every testbench:

- checks its block against a reference model of its own;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<n>`.

Run from the repository root. `rtl/ccb_pkg.sv` must come first. For example:

```
verilator --binary --timing -Wno-fatal -I. -y rtl -y tb \
    rtl/ccb_pkg.sv tb/tb_ccb_system.sv --top-module tb_ccb_system
./obj_dir/Vtb_ccb_system
```

`tb_ccb_system` is the end-to-end test, with the top at its default
parameters. It takes the whole system through six scans:

- normal integration;
- saturated bins;
- test pattern;
- a 1500-word dump truncated at the FIFO;
- cal-diode queue entries;
- a 1PPS-synchronised start.

Its USB chip model (`tb/ft245_model.sv`) stalls the stream at random, now and
then for hundreds of clocks. The test counts every mechanism, including
stalls, dropped and re-sent frames, blanking, unstable cal integrations and
each interrupt source, and fails if any never happened. `tb_ccb_master` does
the same for the master alone with a model of the slaves' bus.

The shared testbench helpers are in `tb/*.svh`:

- the check macros and the watchdog;
- EPP host tasks;
- scan-configuration builders.

## Changing it

- **Sizes.** They are parameters with typed defaults:
  - `ccb_fifo` `DEPTH`, set through `data_dispatcher`/`frame_buffer`;
  - `cal_controller` `QDEPTH`;
  - `ccb_system` `NSLAVES`.

  The register map and the frame layout are constants in `rtl/ccb_pkg.sv`.
- **Read order.** If you change it, change `slave_reader` and the expected
  frame order in `tb_ccb_system` together.
