# Eight-channel FPGA front end for a cochlea-style hybrid filter bank receiver

A wideband receiver normally needs one very fast ADC with a wide dynamic range.
A hybrid filter bank avoids that, much as the cochlea does. An analog bank of
band-pass filters splits the RF input into adjacent sub-bands, and each
sub-band gets its own slower ADC. Digital *synthesis* filters then recombine
the channels. They undo the analog filters' responses, and with the right
coefficients the sum is the input, only delayed. This works only if two things
hold:

* all channels are sampled **at the same instants**, with a fixed and known
  phase relation between them;
* the digital filters can be **re-tuned while running**, because the analog
  part drifts with cables, connectors and temperature.

This RTL is the FPGA side of such a receiver. Eight 14-bit ADC channels
(four dual-channel ADC chips at 250 MSPS, each chip with its own clock) come
in through DDR pads. Every channel passes through a FIR filter whose
coefficients can be reloaded over a serial line. The data then goes into one
shared burst buffer in which the eight channels stay sample-aligned. A host
arms the buffer, triggers a burst and reads it out. It can send new
coefficients at any time; the filters keep running while a set is loaded.

```
            chip clock c (one per ADC pair)                 clk_ab                   sys_clk (200 MHz)
 adc_ddr -> adc_ddr_capture -> [pulse_gen] -> fir_reload -> sample_delay -> async_fifo -> fifo_16to64 -> capture_fifo -> host
                                                 ^                           (x8)           (x8, 4 samples    (8 x 64 bit
                                                 |                                           per frame)        per entry)
 uart_rx -> read_fsm -> instruction FIFO (per chip) -> reload_fsm (per chip)
```

## Modules

| file | role |
|---|---|
| `fe_pkg.sv` | shared widths and the 32-bit instruction struct |
| `frontend_top.sv` | the whole front end |
| `adc_ddr_capture.sv` | 7 DDR lanes to a 14-bit sample |
| `iodelay_tap_ctrl.sv` | tap setting of a channel's input delay line (0..31, starts at 16, wraps) |
| `pulse_gen.sv` | unit pulse every 32 clocks, used instead of the ADC in test mode |
| `fir_reload.sv` | 10-tap FIR with streaming coefficient reload and a config strobe |
| `sample_delay.sv` | optional one-sample delay of a channel |
| `fifo_wr_gate.sv` | holds a chip's input FIFO writes off for 32 falling clock edges after reset |
| `async_fifo.sv` | dual-clock FIFO with gray-code pointers, first word fall through |
| `fifo_16to64.sv` | packs four samples into a 64-bit frame and moves it to the system clock |
| `capture_fifo.sv` | shared burst buffer, 8192 entries of 8 x 64 bits, read back as 16-bit words |
| `capture_ctrl.sv` | arm (FIFO reset), trigger, burst length, write strobe of the buffer |
| `uart_rx.sv` | 8N1 serial receiver, 115200 baud from the system clock |
| `read_fsm.sv` | assembles four bytes into one instruction |
| `reload_fsm.sv` | streams queued instructions into one chip's two filters |
| `reset_sync.sv`, `sync_bit.sv` | reset and single-bit synchronisers |

Each file opens with a comment giving its function, interface and timing. The
comment also says which behaviour comes from the original design and which is
a choice made here.

## Clock domains and how the eight channels stay aligned

This is the most delicate part of the design. There are five clock domains:

* `adc_clk[0..3]`: one 250 MHz clock per ADC chip. Chip *c* drives channels
  2c and 2c+1 (clk_ab, clk_cd, clk_ef, clk_gh). The four clocks have the same
  frequency, but each has its own phase.
* `sys_clk`: 200 MHz. It runs the serial receiver, the burst control, the
  burst buffer and the delay tap registers.
* `adc_clk[0]` (clk_ab) doubles as the **common read clock**. All eight
  channels are brought into it before they are packed.

Each channel runs through its own chip's clock domain: capture, filter and
optional delay. It is then written into its own 16-bit dual-clock FIFO. What
keeps the channels aligned is four mechanisms working together.

1. **Simultaneous restart (arm).** An `arm` pulse holds every acquisition FIFO
   in reset for `ARM_RST_CYCLES` system clocks. That covers the input FIFOs,
   the 64-bit FIFOs and the burst buffer. The reset is released into each
   domain through its own synchroniser, so the chips leave reset within one or
   two of their clocks of each other.
2. **Write gate.** After that reset, each chip's input FIFO writes stay off
   until 32 falling edges of that chip's clock have passed. This keeps the
   FIFO from taking samples while its reset and the clock are still settling.
   Every chip then starts writing a fixed number of its own clocks after the
   common release.
3. **Common read start.** In the clk_ab domain all eight FIFOs are read with
   **one** read enable. It stays low after reset. It goes high once none of
   the eight FIFOs is empty, and from then on reads happen whenever none is
   empty. The first word of every channel is therefore read in the same cycle,
   and every later word too. The channels cannot slip apart. If one chip
   stalls, all eight stop together.
4. **One-sample correction.** What remains is the offset between the chips'
   clock phases, which is below one sample. Because of synchroniser
   uncertainty, that can still put one channel a whole sample behind the
   others. `CH_DELAY` is a build-time mask, one bit per channel, that puts a
   one-sample delay into the chosen channels. Set it after measuring the board.
   Its default is no delay, because the channels that need it depend on the
   board.

How well this holds can be seen in simulation. `tb_frontend_skew` gives the
four chip clocks phases of 0, 0.9, 2.3 and 3.4 ns, has every chip's ADC sample
the same instants, and arms six times at different moments. In every burst,
each channel is within one sample of channel 0, and the offset holds for the
whole burst. *Which* channels are one sample off, however, changes from arm to
arm: it depends on where the reset release falls relative to each chip's
clock edges. A fixed `CH_DELAY` therefore corrects a board only if its offsets
repeat from arm to arm, which depends on how the clocks and the arm relate in
hardware. Otherwise measure the offset after each arm, with test mode or a
known input, and correct it in the host.

From clk_ab on, the eight channels move as one word per clock. Each is packed
into 64-bit frames of four samples in `fifo_16to64`. The packers are written
only while a burst is running (the running flag is synchronised into clk_ab),
and all eight start on the same sample. A frame crosses to `sys_clk` through a
512-frame FIFO. The burst buffer writes one entry only when **all** eight
64-bit FIFOs hold a frame. An entry is eight frames, which is the same four
sample instants on every channel.

The FIFO depths (16 for the input FIFOs, 512 frames, 16 instructions) are this
design's choices. The read side empties the input FIFOs at the rate they fill,
so they never hold more than a few samples. The 64-bit FIFOs must absorb the
rate difference between one 64-bit frame per 4 ADC clocks (62.5 M frames/s)
and the system clock. The burst buffer takes one entry (all eight channels)
per system clock, 200 M entries/s, so it keeps up.

## Burst capture and readout format

The host sequence is:

1. `arm`: reset the acquisition FIFOs (mechanisms 1 and 2 above).
2. `trigger`: start a burst of `burst_frames` entries. Each entry is 4 samples
   per channel, so a full buffer of 8192 entries is 32768 samples per channel,
   or 512 KB. `capturing` is high while the burst runs. `burst_done` goes high
   at its end and stays high until the next arm or trigger. A trigger during a
   burst or during the arm reset is ignored.
3. Read the buffer with `cap_re`. `cap_dout` shows the current 16-bit word
   whenever `cap_empty` is low. The order within one entry is:

```
ch1 s0, ch1 s1, ch1 s2, ch1 s3, ch2 s0, ... ch2 s3, ..., ch8 s0 ... ch8 s3, then the next entry
```

Samples are the filter outputs: 16-bit two's complement, sent least
significant byte first if the host reads bytes. `cap_level` counts the entries
held. Reading can overlap the burst.

Arm before every burst. Once a burst has its frames, the packers keep
receiving samples for a few more clocks, until the end of the burst reaches
the clk_ab domain. Those frames stay in the 64-bit FIFOs. A second trigger
without an arm would start with them: still aligned across channels, but
older than the trigger.

## Filters and coefficient reload

Every channel has a `fir_reload`: y[n] = sum h[k] x[n-k] with 10 taps,
14-bit input, 16-bit coefficients and a 16-bit output. The sum is saturated
to 16 bits **without** a right shift. A unit pulse at the input therefore
shows the coefficients at the output, which is how the filters are checked
(see Test mode). The latency is 2 clocks. After reset the filter passes its
input (h0 = 1).

The filter has two coefficient sets. Reload beats
(`s_axis_reload_tvalid/tready/tdata/tlast`) write the **shadow** set.
`s_axis_config_tvalid` copies it into the active set in one clock, so the
filter never runs on a half-written set. The first beat of a set writes
**h[9]**, the next h[8], and so on down to h[0] with `tlast`. Between the
`tlast` beat and the config strobe, `tready` is low.

### Serial protocol

The host sends 8N1 bytes at 115200 baud. Every four bytes, most significant
first, form one 32-bit instruction:

```
 31            16 15             0
+----------------+----------------+
|  filter number |  coefficient   |
+----------------+----------------+
```

Reloading filter *f* means sending 10 instructions (`NTAPS`), all naming *f*.
They carry h[9], h[8], ..., h[0] in that order. At 115200 baud that takes
about 3.5 ms. Send the instructions of one set together. The reload machine
takes the filter number from the first instruction of a set and counts the
rest, so sets for the two filters of one chip must not be interleaved. Sets
for filters on different chips may be, because each chip has its own queue.

### Path of an instruction

1. `uart_rx` samples each bit in its middle. It discards a byte whose stop bit
   is low.
2. `read_fsm` has one state per byte, then one state that presents the
   instruction for a single clock. There is no time-out, so a lost byte shifts
   the framing until reset.
3. The top sends the instruction to the **instruction FIFO of the chip that
   owns the filter** (chip = filter / 2). This FIFO is a dual-clock FIFO from
   `sys_clk` into that chip's clock. Filter numbers of 8 or more, and
   instructions that find the FIFO full, are dropped and set the sticky flag
   `instr_dropped`.
4. That chip's `reload_fsm` waits for the FIFO to be non-empty. It takes the
   filter number from the first instruction of a set, then streams 10
   coefficients to that filter. If the FIFO runs dry mid-set, `tvalid` falls
   on the next clock, and the set resumes when more data arrives. The clock
   after the `tlast` beat is accepted, it pulses that filter's `config_tvalid`
   for one clock.

The filter keeps filtering during all of this. The new set takes effect two
output samples after the config strobe.

## Test mode

With `test_mode` high, every filter's input comes from `pulse_gen` instead
of the ADC. `pulse_gen` gives a value of 1 on one clock in 32 and 0 on the
others. Each filter then outputs its coefficient set, h[0] first, once every 32
samples. Reading a burst therefore shows directly whether a reload arrived in
the intended filter and in the intended order. There is one generator per
chip, reset with the chip.

## Input delay taps

The ADC data lines reach the FPGA over traces of different lengths. In
hardware, each channel's lanes pass through a 32-step programmable delay line
(a pad primitive), which is not part of this RTL. `iodelay_tap_ctrl` holds
the setting that would drive it: tap 16 after reset, +1 per `dly_inc` pulse,
wrapping from 31 to 0. The settings come out on `dly_tap` and do not delay
anything in simulation.

## Parameters of `frontend_top`

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 8 | channels (two per ADC chip) |
| `NTAPS` | 10 | FIR taps per channel |
| `CLK_HZ` | 200 000 000 | system clock, for the baud divider |
| `BAUD` | 115 200 | serial rate |
| `PULSE_PERIOD` | 32 | test-mode pulse period |
| `WR_GATE_EDGES` | 32 | falling edges before input FIFO writes start |
| `CH_DELAY` | 8'h00 | channels that get a one-sample delay |
| `IN_FIFO_LOG2` | 4 | input FIFO depth, log2 |
| `F64_LOG2` | 9 | 64-bit frame FIFO depth, log2 |
| `CAP_LOG2` | 13 | burst buffer entries, log2 (8192 entries = 512 KB) |
| `INSTR_FIFO_LOG2` | 4 | instruction FIFO depth, log2 |
| `ARM_RST_CYCLES` | 16 | length of the arm reset in system clocks |

`burst_frames` is 14 bits wide, which covers a full buffer at `CAP_LOG2 = 13`.
Widen it if you raise `CAP_LOG2`.

## Simulating

Every testbench checks its own results. It prints one line
`TB_RESULT checks=N failures=M` and ends. Each also has a watchdog. With
Verilator 5:

```sh
b=tb_frontend_top        # or any tb/tb_*.sv
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
          rtl/fe_pkg.sv tb/$b.sv -y rtl --top-module $b -Mdir obj_$b -o sim
./obj_$b/sim +verilator+rand+reset+2
```

The testbenches carry a `timescale` and the RTL does not, so `--timescale`
supplies the default. Without `-Wno-fatal`, Verilator stops on its warnings.
These cover mixed timescales and width extensions in the testbench arithmetic.
`+verilator+rand+reset+2` starts uninitialised state at random values, which
checks that everything that is read gets reset.

| testbench | what it shows |
|---|---|
| `tb_adc_ddr_capture` | bit placement and one-cycle latency of the DDR capture |
| `tb_iodelay_tap_ctrl` | start at 16, steps, wrap 31 to 0 |
| `tb_pulse_gen` | period 32 and value 1 |
| `tb_sample_delay` | one-sample delay |
| `tb_fifo_wr_gate` | enable after exactly 32 falling edges, again after reset |
| `tb_async_fifo` | order, full/empty, random rates on unrelated clocks |
| `tb_fifo_16to64` | frame packing order and crossing |
| `tb_capture_fifo` | entry write and word read order |
| `tb_capture_ctrl` | arm stretch, burst length, ignored triggers, `done` |
| `tb_uart_rx` | bytes at a reduced clock-to-baud ratio, bad stop bit |
| `tb_read_fsm` | byte order and one-clock `instr_valid` |
| `tb_fir_reload` | filter arithmetic against a model, saturation, reverse reload order, shadow/active switch, `tready` gap |
| `tb_reload_fsm` | set streaming, FIFO running dry mid-set, `tlast`, config pulse, out-of-range filters |
| `tb_frontend_top` | end to end at a reduced size (16 clocks per serial bit, 64-entry buffer). An ADC model sends a ramp with the channel number in its low bits, so any skew between channels shows in the data. The test steps a delay tap past its wrap, reloads filters 5 and 6 (on two different chips) over the serial line and sends an instruction for a filter that does not exist. It then captures a burst and checks every word (order, common sample index, the one-sample delay on channels 2 and 3). It re-arms in test mode and checks the impulse responses: the loaded sets on channels 5 and 6, pass-through elsewhere. Every mechanism is counted, and one that never happens is a failure. |
| `tb_frontend_skew` | alignment with the four chip clocks at different phases, over six arms: samples consecutive on every channel, each channel within one sample of channel 0, both channels of a chip equal |
| `tb_frontend_full` | the top at its default parameters. A coefficient reload over the 115200 baud line, then a full 8192-entry burst (32768 samples per channel) checked word by word. The burst takes 32775 ADC clocks, i.e. one sample per channel per clock. |

`tb_frontend_full` takes a few seconds to build and run, and the rest take
well under a second each.

## How far the RTL follows the original design, and where it departs

Taken from the original design:

* eight channels, four chips with their own clocks, 14-bit samples on 7 DDR
  lanes;
* the 32-step delay taps starting at 16 and wrapping to 0;
* the 32-edge write gate, the common read start and the arm reset of the
  input FIFOs;
* the optional one-sample delay;
* four-sample 64-bit frames in little-endian order;
* the 512 KB shared buffer written only when all channels have a frame, and
  its channel-by-channel read order;
* 10-tap filters with a 16-bit output and reverse-order coefficient reload
  applied by a config strobe;
* the 115200 baud serial line, 32-bit instructions (filter in the upper half),
  the byte-collecting state machine and the reload state machine with its
  handshake;
* the unit-pulse test every 32 clocks.

Choices and departures:

* **The filters are plain direct-form FIRs.** The original used a vendor
  filter core. The reload interface keeps that core's signal names and
  behaviour (shadow set, last coefficient first, config strobe). The adder
  tree, the saturation, the 2-clock latency and the identity set after reset
  are choices made here.
* **One instruction FIFO and one reload state machine per ADC chip.** The
  original describes a single FIFO into "the filters' clock". Here the filters
  run on four different clocks, so each chip has its own, and the top routes
  each instruction by filter number.
* **Bit placement on the DDR lanes:** bit 2k on the rising edge and bit 2k+1
  on the falling edge. This is a choice; the true mapping depends on how the
  ADC's output mode is configured.
* **Arm resets every acquisition FIFO stage,** not just the input FIFOs. The
  burst length is a port (`burst_frames`) rather than a register behind the
  host interface. A trigger starts exactly one burst.
* **All FIFO depths and the arm reset length are choices.**
* **Not included:**
  * the ADC and clock-chip SPI configuration;
  * temperature and voltage monitoring;
  * the Ethernet link and the host register interface that drive `arm`,
    `trigger`, `burst_frames`, `cap_re` and `dly_inc`;
  * the differential input buffers (`adc_ddr` and `adc_clk` are
    single-ended);
  * the delay lines themselves (only their settings are kept).
* **Filter size.** The larger filter-bank configurations the original
  evaluated for synthesis (8 filters per channel, up to 64 coefficients each)
  are not built. `NTAPS` can be raised, and every module follows it, but
  there is one filter per channel.
* **Timing closure at 250 MHz** is not examined. The RTL has not been
  constrained or placed for a device.
