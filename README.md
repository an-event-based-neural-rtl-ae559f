# Event-based neural compressive telemetry (NCT)

An intracortical probe with 128 recording sites produces far more raw data
than an implant can afford to serialize and drive off-chip. The telemetry
described here sends almost nothing while the neurons are quiet. It makes
three choices to get there:

1. **Each ADC digitizes only the change of a channel since the previous
   frame.** Eight channel-rotating delta ADCs (CR-ADCs) each serve 16
   time-multiplexed channels. A conversion starts from the code that
   channel had one frame earlier, so the number of comparisons equals the
   size of the change.
2. **Only non-zero changes ("events") are packed and sent.** They go out as
   short packets that name an ADC once for all of its active channels
   (*spatial grouping*). Each channel's change is sent as a repetition
   count of a 5-bit channel word (*ternary AER*: every repetition means
   +1 LSB or −1 LSB).
3. **The serializer clock and the line driver run only while there is a
   packet.** A synthesized ring oscillator is started per frame, on demand.
   The LVDS driver parks at VDD/2 between packets.

The repository holds synthesizable RTL for the digital parts and
behavioural models for the analog parts (comparator, DAC and pulse
generator, ring oscillator, LVDS output stage). It also holds a
self-checking testbench per block, and an end-to-end testbench that
decodes the output stream and compares it with an independent reference.

```
 vin[0..7] (16:1 multiplexed off chip, channel = mux_ch)
   │
   ▼
 cr_adc ×8 ──ev{SIGN,Δ}──► eser ─────────────────────────────► elvds_driver ──► OUTP/OUTN
  ├ cr_adc_analog (S&H, C-DAC,   ├ event_memory (ping-pong, overflow)   FLAG, DATA
  │  comparator, pulse gen)      ├ ser_fsm      (start-up count, packet)
  ├ cr_adc_ctrl (event counter,  ├ ring_osc     (CLK_SER, ENA, CTRL<4:0>)
  │  DAC control)                └ bitstream_gen(FLAG, Manchester DATA)
  └ cr_fifo (16×7-bit rotation)
```

## Frames and clocks

`adc_clk` is the ADC clock: each period converts one channel in every ADC.
A **frame** is 16 periods, one per channel. The nominal frame is 50 µs, so
`adc_clk` runs at 320 kHz and each channel is sampled at 20 kS/s. The
off-chip multiplexers must present channel `mux_ch` during the low phase
of `adc_clk`.

| phase of `adc_clk` | what happens |
|---|---|
| low | the sample-and-hold tracks the input; the ADC's pulse-domain state is held cleared |
| rising edge | the input is held. The DAC is loaded with the channel's previous code, read from the rotation FIFO. The event memory stores the result of the *previous* period. |
| high | the asynchronous pulse generator clocks the comparator. The DAC code moves 1 LSB per pulse. |
| falling edge | the conversion result is taken. The final code goes into the FIFO; `ev = {SIGN, Δ}` becomes valid. |

All comparisons must finish within the high half-period. With the
default pulse period of 20 ns, 32 comparisons take 640 ns, well inside
1.56 µs.

The serializer runs in its own clock domain, `clk_ser`, driven by the
ring oscillator. The two domains meet only through a toggle
request/acknowledge pair (see below).

## Channel-rotating delta ADC

`cr_adc` joins three parts:

- `cr_fifo`: a 16-deep, 7-bit shift register. It shifts once per ADC
  period, so its head is always the stored code of the channel about to be
  converted, and the code just produced enters at the tail. Its reset
  value is mid-scale (64).
- `cr_adc_ctrl`: the event counter and DAC control. It takes the stored
  code and searches one step at a time:
  - It first probes `code+1`. While the held input is at or above the
    probe, it keeps stepping up.
  - If the very first probe fails, it steps down instead, while the input
    is below the current code.
  - The count of accepted steps is Δ, and the direction is SIGN (1 = up).
  - An upward change of *d* LSB costs *d*+1 comparisons; a downward one
    costs *d*+2.
  - The search stops after **Step_Max = 31** steps. Δ is then saturated,
    and the channel catches up over the following frames. The codes also
    saturate at 0 and 127.
- `cr_adc_analog` (behavioural model): the sample-and-hold, the 7-bit
  C-DAC, the comparator and the pulse generator. The input is a 12-bit
  number standing for the voltage, so one 7-bit LSB is 32 input units. The
  comparator decides `held >= code × 32`.

The controller's pulse-domain registers are cleared asynchronously while
`adc_clk` is low. This makes every conversion start from a clean state
without a fast clock.

## Spatial-grouping ternary AER packet

A packet is a sequence of 5-bit words:

```
SYNC | ADC HDR  ADC ID  CH ID ... CH ID | ADC HDR  ADC ID  CH ID ... | ...
```

| word | bits (MSB first) | meaning |
|---|---|---|
| SYNC | `10101` | start of packet |
| ADC HDR | `11100` | an ADC group follows |
| ADC ID | `00aaa` | ADC number 0–7 |
| CH ID | `s cccc` | SIGN and channel number; sent Δ times in a row |

ADCs without events are skipped. Within an ADC group, channels appear in
conversion order.

A packet therefore carries 1 + 2·(active ADCs) + ΣΔ words. A spike seen
by several neighbouring channels of one ADC pays the ADC address only once.
The word codes for SYNC and ADC HDR are this design's choice, and so is
putting SIGN in the MSB of CH ID. The code values live in `nct_pkg`.

Five bits cannot keep every CH ID distinct from ADC HDR: CH ID
`1 1100` (SIGN = 1, channel 12) has the header's bits. A receiver can
still parse every packet unambiguously. Channels of one ADC are sent in
increasing order, and ADC IDs are below 8, so a `11100` is a header
exactly when the word after it is below 8. The sine testbench's hub
model decodes this way.

## Event memory and the frame handshake

`event_memory` keeps, for every ADC, a compact list of the events in the
current frame. Each entry is 10 bits: channel, SIGN and Δ. There are two
banks, one being written and one frozen for the serializer. That gives
7 + 10 + 10 = 27 bits of storage per channel, counting the rotation FIFO.

At the end of a frame that held at least one event:

- **Serializer idle** (`req == ack`): the banks swap and `req` toggles.
  `ENA = req ^ ack` starts the ring oscillator.
- **Serializer busy**: the previous packet is longer than a frame.
  `overflow` pulses for one ADC period and the new frame's events are
  dropped. This is the overflow detector. The response intended for it is
  to raise the oscillator frequency through `ro_ctrl`; this design leaves
  that choice to the user and does not do it automatically.

`ack` comes back from the serializer domain through a two-flop
synchronizer. A frame with no events starts nothing: no clock, no packet,
no driver activity.

## Event-driven serializer clock

`ser_fsm` runs on `clk_ser`, which exists only while ENA is high. Its
sequence:

1. It counts **CNT_STARTUP** (default 8) rising edges, to let the
   oscillator settle.
2. It reads the frozen bank and issues one word every 5 `clk_ser` cycles,
   with `load` high in the first cycle of each word.
3. After the last word it waits for FLAG to fall, then toggles `ack`.
   ENA falls with it, and the clock stops.

With the defaults, FLAG rises on the 12th `clk_ser` rising edge after ENA.
`ack` toggles 6 edges after the last word was loaded.

`ring_osc` is a behavioural model of the synthesized ring oscillator:

- The loop has inverter groups of 1, 4, 8, 18 and 40. `CTRL<4:0>` is read
  as a thermometer code: each further 1 bit adds the next group to the loop.
- The period is interpolated linearly over the number of inverters in the
  loop, from 574 MHz (`ctrl = 0`) to 84 MHz (`ctrl = 5'b11111`, all groups).
- The first 4 periods after ENA are stretched to imitate an unsettled
  start.
- The output rests low while ENA is low.

A packet of W words occupies about 5·W + 17 clock cycles. At 84 MHz that
allows about 836 words per 50 µs frame; at 574 MHz, about 5700.

## FLAG, DATA and Manchester coding

`bitstream_gen` shifts each word out MSB first, one bit per `clk_ser`
cycle, and produces two signals:

- **FLAG** is high for exactly the bits of the packet.
- **DATA** is `FLAG & (bit ^ clk_ser)`. This Manchester code sends a 1 as
  low-then-high within the cycle, and a 0 as high-then-low, so the receiver
  can recover the clock from the data.

FLAG and DATA together form the ternary line state: idle, 0 or 1.
Setting `MANCHESTER = 0` sends plain NRZ bits instead.

## Event-based LVDS driver

`elvds_driver` is a behavioural model of the driver.

- Its inputs are `INN = FLAG & DATA` and `INP = FLAG & ~DATA`. Both are low
  when idle.
- Its outputs are `real` voltages:
  - `OUTP` is VDD and `OUTN` is 0 when DATA = 1, and the reverse when
    DATA = 0, after `T_DRV_NS`.
  - Both outputs sit at VDD/2 while FLAG is low.
- VDD defaults to 1.2 V. The full-rail swing is a simplification; a real
  LVDS stage drives a current into the termination.

A hub-side receiver model (`tb/nct_rx_monitor.sv`) samples the two signals
around each clock edge, checks the Manchester transitions and the
idle/active levels, and collects the words of each packet.

## Top level

`nct_top` instantiates 8 `cr_adc`, one `eser` and one `elvds_driver`. Its
parameters are:

| parameter | default | meaning |
|---|---|---|
| `N_ADC` | 8 | ADCs |
| `N_CH` | 16 | channels per ADC (frame length in ADC periods) |
| `CODE_W` | 7 | ADC resolution |
| `VIN_W` | 12 | width of the numeric stand-in for the analog input |
| `CNT_STARTUP` | 8 | oscillator edges before the first word |

Other parameters live in the sub-blocks:

| parameter | block | default |
|---|---|---|
| `STEP_MAX` | `cr_adc` | 31 |
| `DELTA_W` | `cr_adc` | 5 |
| `T_PULSE_NS` | `cr_adc` | 20 |
| `P_MIN_PS` | `ring_osc` | 1742 |
| `P_MAX_PS` | `ring_osc` | 11905 |
| `N_RAMP` | `ring_osc` | 4 |
| `VDD_V` | `elvds_driver` | 1.2 |
| `T_DRV_NS` | `elvds_driver` | 0.2 |

The off-chip parts are represented by ports: the multiplexer by `vin[]`
and `mux_ch`. The oscillator setting is the `ro_ctrl` input. The outputs
`adc_event[]`, `code[]`, `ena`, `clk_ser`, `frame_end` and `overflow` are
brought out for observation.

Synthesizable: `cr_fifo`, `cr_adc_ctrl`, `event_memory`, `ser_fsm`,
`bitstream_gen`, and the structural `cr_adc`, `eser` and `nct_top`.
Behavioural (delays and `real`): `cr_adc_analog`, `ring_osc` and
`elvds_driver`. For an implementation, replace these with the analog
macros and a gate-level oscillator.

## Where this RTL fills in or departs from the published design

These are taken from the published design:

- 8 ADCs × 16 channels, 7-bit codes, Step_Max 31, 5-bit Δ.
- The 50 µs frame of 16 conversions.
- Events stored at the rising ADC clock edge, 10-bit entries with a
  replica bank, and the packet starting in the next frame.
- The start-up edge counter and one 5-bit word per 5 serializer cycles.
- The word types, their order, and CH ID repeated Δ times.
- The FLAG/DATA pair and Manchester coding.
- The 84–574 MHz oscillator range and its inverter groups 1/4/8/18/40.
- The driver idling at VDD/2 with both inputs low.

Two structural differences:

- In the published block diagram the oscillator enable comes from the
  serializer's state machine, which also sees the ADC clock. Here the
  ADC-clock half of that control lives in `event_memory`, and ENA is the
  XOR of its request toggle and the state machine's acknowledge toggle.
  The behaviour is the same: the clock starts at the frame after one with
  events and stops when the packet has been sent.
- The driver's input gating follows the written description: both inputs
  are low when idle. The published schematic draws the INP gate in a way
  that would instead idle it high.

These are this design's own choices:

- The word codes of SYNC and ADC HDR, and the bit order.
- The up-then-down search order of the conversion.
- The start-up count of 8.
- The req/ack toggle handshake.
- Dropping the frame that arrives during an overflow.
- Where the Manchester coding is applied.
- The linear period model of the oscillator.
- The full-rail driver model.

Not modelled:

- The analog front end and the multiplexer itself.
- Noise, offset and settling in the ADC.
- The hub receiver's FLAG recovery from the ADC HDR pattern (the monitor
  uses FLAG directly).
- Automatic frequency increase after an overflow.

## Simulation

Everything runs with Verilator 5 (`--timing` is needed for the
behavioural models). For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/nct_pkg.sv tb/nct_tb_pkg.sv tb/tb_nct_top.sv
./obj_dir/Vtb_nct_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a
watchdog and ends with `$finish`.

Two concurrent assertions in the RTL stop the simulation with an error
if they fail (`--assert` enables them). In `event_memory`, `req` may only
toggle while the serializer is idle. In `bitstream_gen`, a word may only
load on an idle line or in the last bit of the previous word.

| testbench | what it checks |
|---|---|
| `tb_cr_fifo` | rotation order over random pushes, reset value |
| `tb_cr_adc_ctrl` | final code, SIGN, Δ and comparison count for random inputs, including saturation at Step_Max |
| `tb_cr_adc_analog` | hold timing, comparator threshold, pulse train only while enabled |
| `tb_cr_adc` | 16 channels over many frames against a reference delta tracker |
| `tb_event_memory` | stored entries, counts, bank swap, req/ENA, overflow and dropped frames |
| `tb_ser_fsm` | start-up count, word sequence against a reference packet builder, 5-cycle word spacing, ack timing |
| `tb_bitstream_gen` | bit order, FLAG span, Manchester transitions |
| `tb_ring_osc` | period at each CTRL setting (84 to 574 MHz), start-up stretch, stop level |
| `tb_elvds_driver` | INP/INN gating, output levels, VDD/2 idle, delay |
| `tb_eser` | packets decoded from FLAG/DATA against the reference, no clock in empty frames, overflow at 84 MHz |
| `tb_nct_top` | the whole chain at default parameters; details below |
| `tb_nct_sine` | 1 kHz sines through the whole chain, decoded and rebuilt at the hub, full scale and an amplitude sweep; details below |

`tb_nct_top` drives all 8 × 16 channels with slow drift and sparse
multi-channel spikes. It decodes the line and compares every packet with
a reference built from an independent model of the delta ADCs. It counts
each mechanism and fails if one never occurred:

- empty frames with no clock;
- packets and oscillator start-ups;
- Δ saturation at Step_Max;
- spatially grouped ADCs with several events;
- overflow with dropped frames after switching to the slowest clock;
- a change of oscillator frequency;
- the idle level of the driver.

It also reports the bits sent against the 7 bits per sample of an
uncompressed stream. On its synthetic stimulus it prints a compression
of about 11×; that number reflects the stimulus, not recorded neural
data. The run takes under a second.

`tb_nct_sine` runs the ADC linearity workload at default parameters:

- Every channel carries a 1 kHz sine across the full 7-bit range. At
  20 kS/s the largest change between frames is about 20 LSB, so nothing
  may saturate.
- A hub model parses each packet and rebuilds all 128 codes by adding ±1
  per CH ID. After every packet the rebuilt codes must equal the
  quantised inputs exactly.
- With one ADC active at 84 MHz, packets reach about 230 words. With all
  eight ADCs active they reach about 1470 words, which needs the 574 MHz
  setting. Neither case may overflow.
- From the rebuilt samples the testbench computes SNDR and ENOB. The
  full-scale result is 7.03 bits, which is 7-bit quantisation alone:
  this model has no noise.
- It then sweeps the amplitude of ADC 0 to 30 %, 10 % and 3 % of full
  scale, as in Fig. 13(c). Each step is spread over 20 frames, so no
  change exceeds Step_Max. The rebuilt SNDR is 44.1, 32.9, 23.5 and
  13.4 dB. At 3 % it must reach the 12 dB the document asks for spike
  sorting.

The shared testbench package `tb/nct_tb_pkg.sv` builds reference packets
from a frame of events. `tb/nct_rx_monitor.sv` is the line receiver
model.
