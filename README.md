# Pulsed optical telemetry link, 300 Mbps — digital RTL

This is the digital part of a wireless link that carries broadband neural recordings out of
an implant as a train of sub-nanosecond laser pulses through the skin. The link sends
1024 channels × 16 bit × 18 kHz, about 295 Mbps of samples, over one 300 Mbps optical
channel. It has no separate clock line and no carrier. Each bit period holds two pulse
positions:

```
bit clock   ‾‾‾‾‾‾‾‾\________/‾‾‾‾‾‾‾‾\________/‾‾‾‾‾‾‾‾\________
bit             1                 0                 1
pulses      ‾‾\______‾‾\______‾‾\_______________‾‾\______‾‾\______
            sync     data     sync              sync     data
```

* A **synchronisation pulse** sits at every rising clock edge, whatever the data.
* A **data pulse** sits at the falling edge, and only when the bit is 1.
* Each pulse lasts a quarter of the bit period (0.83 ns). The two positions are half a period apart.

The receiver gets its clock back from this train with a flip-flop that resets itself. The
flip-flop is set by the first edge it sees and stays set for about 75 % of the period. A
data pulse, half a period later, falls inside that time and merges with the sync pulse. So
the flip-flop gives one pulse per bit period, and a PLL turns that into a clean 50 % clock.
A programmable delay line then places the received pulses so that the recovered clock's
rising edge samples the sync pulse ("ready") and its falling edge samples the data pulse
(the bit).

The RTL covers both ends:

* **Transmitter:** multichannel packetiser, serializer and pulse encoder.
* **Receiver:** clock recovery, delay alignment, bit capture, header search and channel
  buffer.
* **Test path:** a PRBS31 generator and a bit-error checker.

The laser driver, laser, tissue, photodiode and its amplifier are analog. They sit outside
the RTL: the top brings out `tx_pulse` (to the laser driver) and `rx_pulse` (from the
photodiode amplifier).

## Time inside a bit: the slot clock

The coding places pulses at fractions of a bit period, and the receiver's one-shot and
delay line act on sub-bit times. The RTL models this with a **slot clock** at
`SLOTS_PER_BIT` = 8 times the bit rate (2.4 GHz for 300 Mbps, 0.417 ns per slot). All
logic at either end runs on its own slot clock. Logic that works at the bit rate advances
on a one-slot enable:

* `bit_tick` at the transmitter;
* `rise_stb`/`fall_stb`/`rec_bit_valid` at the receiver.

In slots, at the defaults:

| quantity | slots | time | origin |
|---|---|---|---|
| bit period | 8 | 3.33 ns | published (300 Mbps) |
| sync pulse | slots 0–1 | 0.83 ns, 25 % | published |
| data pulse | slots 4–5 | 180° after sync | published |
| flip-flop hold | 6 | 2.5 ns (≈75 %) | published 2.4 ns, rounded to a slot |
| delay tap | 1 | 0.417 ns | here coarser than the original 2.5–15 ps taps |

This is a model of the timing, not of the analog circuits. The original system builds the
one-shot from hand-placed FPGA routing and uses FPGA PLLs and delay primitives. The RTL is
synthesizable, but a real 2.4 GHz slot clock is only realistic in an ASIC or as an
oversampling SERDES.

## Transmitter

`pre_processing` turns channel samples into one continuous bitstream.

* **Frames.** `tx_cu_master` counts `FRAME` = 16667 bit periods per frame. That is
  300 Mbps / 18 kHz rounded up, so one frame is one sample of every channel.
* **Acquisition.** At each frame start, `cu_das` walks channels 0…1023:
  * It asks the converter front end for a conversion (`das_convert`, `das_channel`) and
    waits for `das_valid`.
  * In PRBS mode (`prbs_mode`=1) it takes the next word of `prbs31_gen` instead.
  * Each result goes into the 16-bit WORD register and is written to the buffer.
* **Packet buffer.** `tx_packet_buffer` has two banks of 1024 words, so one packet is sent
  while the next is written. A packet is the 32-bit start header `0x1ACFFC1D` (two words
  from a constant table at packet addresses 0–1), then the 1024 channel words.
* **Bank hand-over.** The master marks a bank full when its frame is written and free when
  its packet has been sent. If a frame starts while both banks are still full, it is
  dropped and counted (`tx_frames_dropped`). This cannot happen at the default sizes.
* **Serializer.** `serializer` sends a full bank MSB first, one bit per `bit_tick`, with no
  gaps. The next word's read is issued while the current word is shifting. A packet is
  16416 bits. The other 251 bits of each frame are fill zeros, which still carry sync
  pulses, so the receiver's clock never starves.
* **Encoder.** `tx_clock_gen` gives the slot index and the bit clock `Clock_M`.
  `data_encoder` builds `tx_pulse = A | (bit & B)`, where A is slots 0–1 and B is slots
  4–5, and registers it.

## Receiver

### Clock recovery (`clock_recovery`)

This is the subtle part of the link.

**The flip-flop.** A rising edge of `rx_pulse` sets `ff_q` when it is clear. A counter
clears it `HOLD` = 6 slots later. The data pulse's edge arrives while `ff_q` is still set
and has no effect. So in error-free operation `ff_q` rises exactly once per period, on the
sync pulse.

Two error cases follow from this when a sync pulse is lost:

1. **Lost sync, bit 0.** The bit has no pulse at all, so `ff_q` does not rise in that
   period.
2. **Lost sync, bit 1.** The data pulse sets `ff_q` half a period late. Its hold then
   swallows the next sync pulse, so the half-period shift continues through every
   following '1'. The first '0' leaves a period with no data pulse, and the next sync
   pulse is back in phase.

**The PLL** is a modulo-8 phase counter. Its phase 0 is the recovered clock's rising edge.

* **Unlocked:** it jumps to every rise of `ff_q`. It declares lock after 8 consecutive
  rises that already fall on phase 0.
* **Locked:** it follows rises within ±1 slot of phase 0 and ignores all others. Both
  error cases therefore leave the clock where it was. The shifted edges of case 2 are
  counted in `edges_ignored`. 16 ignored edges in a row drop the lock: a half-period shift that
  lasts that long is taken as a real phase change, and the PLL reacquires.

`rec_clk` is high for phases 0–3.

### Delay alignment (`idelay_line`, `iddr_capture`, `cu_decod`)

The same received signal also goes through a 512-tap delay line: tap *t* delays it by
*t*+2 slots. `iddr_capture` samples the delayed signal at phase 0 (giving `ready`) and
at phase 4 (giving the bit).

The clock path (edge detect plus flip-flop) adds one slot, so the sync pulse is caught
only at taps 6 and 7, modulo 8. Taps 2 and 3 catch the data pulse instead. There `ready`
follows the random data and soon reads low.

`cu_decod` works like this:

* It starts once the PLL is locked.
* It steps the tap upward from 0. After each step it waits 2 periods to settle.
* It counts consecutive periods with `ready` high, and declares `aligned` after 50.
* A low period during the count moves it to the next tap.
* Once aligned, it keeps the tap until `ready` is low for 4 periods in a row. Single
  missing sync pulses are tolerated.

At the defaults it aligns at tap 6 after 6 steps. Recovered bits (`rec_bit_valid`) are
passed on only while aligned.

A stream of constant ones could align on the data pulse. Random or packetised data makes
that vanishingly unlikely (2⁻⁵⁰).

### Depacketising (`post_processing`)

* Bits shift into a 32-bit register (`rx_spc`).
* `rx_cu_master` checks `header_comparator` after every bit. On a match it clears and
  enables the word counter (`rx_cu_des`, every 16 bits) and the channel counter
  (`rx_cu_wr`, channels 0…1023).
* Each word goes into `rx_buffer` and appears on `ch_valid`/`ch_index`/`ch_data`. After
  channel 1023 the master hunts for the next header, which skips the fill bits.
* A packet whose header is corrupted is lost, and the next header resynchronises.
* `buf_rd_addr`/`buf_rd_data` read any channel's latest word.

### Error counting (`ber_checker`)

The received words, in order, continue the transmitter's PRBS31 sequence
(x³¹+x²⁸+1). The checker predicts each bit from the 31 before it and counts mismatches
(`ber_errors`) and compared bits (`ber_bits`). It needs no link to the transmitter and
resynchronises by itself. One wrong bit shows as up to 3 mismatches.

## Parameters

Shared constants are in `rtl/optel_pkg.sv`. Module parameters default to them.

| constant | default | meaning |
|---|---|---|
| `SLOTS_PER_BIT` | 8 | slot clocks per bit (even, ≥ 4) |
| `PULSE_SLOTS` | 2 | pulse width (25 %) |
| `HOLD_SLOTS` | 6 | flip-flop hold (between ½ and 1 period) |
| `WORD_BITS` | 16 | sample width |
| `CHANNELS` | 1024 | channels per packet |
| `HEADER_WORDS`, `HEADER` | 2, `0x1ACFFC1D` | start sequence |
| `FRAME_BITS` | 16667 | bit periods per acquisition frame |
| `DELAY_TAPS` | 512 | delay-line taps |
| `READY_PERIODS` | 50 | consecutive ready periods for alignment |

The top exposes `CH`, `FRAME` and `TAPS`.

## Timing summary

* **Digital latency.** From a transmitted bit to its recovered strobe is 15 slots
  (6.25 ns), plus the link delay.
* **Acquisition.** After reset: about 10 bit periods to lock, then about 60 per tap tried
  until aligned. The first header follows within one frame.
* **Throughput.** One packet per frame: 16416 of the 16667 bits carry header or samples.

## Files

* `rtl/` — one module per file:
  * package `optel_pkg`;
  * top `optical_telemetry_top`;
  * transmitter: `pre_processing` (`tx_cu_master`, `cu_das`, `prbs31_gen`,
    `tx_packet_buffer`, `serializer`), `tx_clock_gen`, `data_encoder`;
  * receiver: `data_decoding` (`clock_recovery`, `idelay_line`, `iddr_capture`,
    `cu_decod`), `post_processing` (`rx_spc`, `header_comparator`, `rx_cu_master`,
    `rx_cu_des`, `rx_cu_wr`, `rx_buffer`), `ber_checker`.
* `tb/` — a self-checking testbench `tb_<module>.sv` for every module, plus two
  behavioural models:
  * `optical_link_model`: the analog path as a variable delay with forced pulse loss;
  * `das_adc_model`: the converter, returning `{frame[5:0], channel[9:0]}`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_optical_telemetry_top \
    -Irtl -Itb -y rtl -y tb rtl/optel_pkg.sv tb/tb_optical_telemetry_top.sv -o sim
./obj_dir/sim
```

`tb_optical_telemetry_top` runs the whole link at the default sizes (1024 channels, full
frames) in under a second of simulation time. It covers three phases:

1. **PRBS mode.** Lock, tap scan, alignment, header search, zero bit errors over about
   1e5 bits, and latency under 12 ns.
2. **Lost sync pulses.** 20 are removed, half before a '0' and half before a '1'. The
   clock must stay locked, alignment must hold, and there must be no bit errors.
3. **Converter mode.** Every word must arrive at its channel, and the read port must
   return it.

It also counts each mechanism (lock, tap steps, merged data pulses, fill bits, header
hunts, both error cases, the mode switch) and fails if one never happened. The unit
testbenches check each block against independent reference models. Examples:

* a bit-serial PRBS;
* a pulse-pattern generator for the receiver;
* a packet parser for the transmitter;
* the flip-flop's behaviour in both error cases, and lock held while a third of the sync
  pulses go missing, some in consecutive bits;
* the 50-period alignment rule, counted exactly.

## Where this differs from the original system, and limits

* **Slot clock.** Sub-bit timing is quantised to 1/8 bit. Delay taps are 0.417 ns rather
  than picoseconds, and the hold time is 2.5 ns rather than 2.4 ns.
* **Pulse width.** The pulse width is the 25 % duty cycle (0.83 ns). The original system
  also quotes a 900 ps optimised laser pulse, which cannot be represented at this
  resolution.
* **PLLs.** The analog PLLs are replaced: a counter at the transmitter, and a digital
  phase tracker with fixed lock rules at the receiver. The receiver's jitter filtering is
  not modelled.
* **Clock frequencies.** The two slot clocks must have the same frequency. Frequency
  offset between transmitter and receiver is not tracked.
* **IDELAYCTRL.** The delay-calibration block against voltage and temperature has no
  counterpart. With ideal taps it has nothing to do.
* **Choices made here.** These are not specified by the original system:
  * the header value and length;
  * the frame length in bits and the fill bits;
  * the double-banked buffer and the frame-drop rule;
  * the converter handshake and MSB-first order;
  * the PRBS polynomial and the self-synchronising checker;
  * the alignment settle and loss rules;
  * the way the receive buffer's 1024 outputs are brought out (streaming port plus read
    port instead of parallel outputs).
* **Not simulated.** The link's bit error rate of <1e-10 needs more than 1e10 bits, which
  is far beyond simulation. The analog error sources (amplitude, jitter, threshold) are not
  modelled; pulse loss is injected on purpose instead.
