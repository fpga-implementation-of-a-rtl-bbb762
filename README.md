# Dual-code PCM telemetry decoder with an ISA bus interface

A ground-station decoder for range telemetry. The remote end sends a serial
PCM stream. Each frame is a 16-bit sync word followed by 32 eight-bit
channels. Every channel byte is wrapped in start and stop bits. The decoder:

- recovers the bits from the line, in either **NRZ** or **Manchester**
  coding, switched by software;
- finds the sync word and checks the framing of each channel;
- hands each channel byte to a PC over the ISA bus, announced by **IRQ5**;
- ends the operation after a programmed mission time with **IRQ7**.

The channels normally carry (7,4) Hamming code words. A Hamming decoder of
the latched byte is included, so one wrong bit in every four information
bits is corrected.

The logic is small: about 270 word-level cells and 190 flip-flops after
generic synthesis. It was sized for an antifuse FPGA of the Actel ACT 2
class.

## Signal format

| item | value | origin |
|---|---|---|
| bit rate | 200 kbit/s (5 µs per bit) | specified |
| frame | 16-bit sync word, then 32 channels | specified |
| channel | 11 bits: start `0`, 8 data bits MSB first, stop `1`, stop `1` | 11 bits specified, split chosen here |
| sync word | `0xEB90`, sent MSB first; software can change it | value specified |
| channel time | 11 × 5 µs = 55 µs; all 32 channels take 1.76 ms | specified |
| NRZ | NRZ-L, line high = 1 | chosen here |
| Manchester | bi-phase-L, 1 = high then low, 0 = low then high | chosen here |

The sync word is sent bare, straight before channel 1. The line may idle
between frames, and any amount of idle time is accepted. The reference use
is one frame every 10 ms, for a mission of about 5 s.

## Clocking and parameters

The whole design runs on one clock, `clk`. The ISA bus strobes are sampled
on this clock, so it is meant to be the ISA bus clock or a clock
synchronous with it. `rst_n` is an asynchronous, active-low reset.

| parameter (top) | default | meaning |
|---|---|---|
| `CLKS_PER_BIT` | 40 | clocks per line bit: 8 MHz / 200 kbit/s |
| `TICK_DIV` | 8000 | clocks per operation-timer base tick: 1 ms at 8 MHz |

For another clock or bit rate, change both parameters together.

## Receive path (`data_extraction`)

```
rx_in ─► line_decoder ─► sipo_shift_register (16 b) ─┬─► sync_comparator ◄── SYNC register
          (NRZ/Manch.)     bit strobe                 │        │ sync_detect
                                                      │        ▼
                                                      │  byte_sync_extractor ── frame_start ─► frame_counter, channel_counter
                                                      │        │ byte_ready (IRQ5 event)
                                                      └─► channel_latch (sr[9:2]) ─► channel data
```

**Bit recovery (`line_decoder`).** The line passes through a two-flop
synchronizer and is then sampled every clock.

- **NRZ:** a counter that runs modulo `CLKS_PER_BIT` restarts at every line
  transition. The bit is taken when the counter reaches the middle of the
  bit. In runs of equal bits the counter keeps wrapping, so it keeps
  producing one bit per period.
- **Manchester:** every bit has a transition in its middle, so the decoder
  waits for a transition and takes the level just before it as the bit.
  It then ignores the line for 3/4 of a bit, which skips any transition at
  the bit boundary. The next transition it sees is the next mid-bit edge.
  If it first latches onto a boundary edge, it falls into step at the
  first pair of unequal bits.

Both modes emit a one-clock strobe per bit (`g_clock`) with the bit on
`g_data`. A transmitter up to one clock per bit slow or fast is tolerated,
and the testbench checks this.

**Sync search.** Each recovered bit is shifted into a 16-bit register,
newest bit at bit 0. The comparator compares the register with the SYNC
register once per new bit and needs an exact match.

**Byte sync (`byte_sync_extractor`).** This controller has two states,
hunting and in-frame. While hunting it waits for a sync match; sync words
inside a frame are ignored. Once a sync is found, it counts 11 bits per
channel. After the 11th bit:

| register bits | must hold |
|---|---|
| `sr[10]` | the start bit, `0` |
| `sr[1:0]` | the two stop bits, `1 1` |

If the framing is good, `byte_ready` pulses for one clock. That pulse:

- loads `sr[9:2]` into the 8-bit channel latch;
- steps the channel counter;
- raises the IRQ5 request.

If a start or stop bit is wrong, the byte is dropped, a framing error is
recorded and the controller goes back to hunting. After the 32nd channel
it goes back to hunting as well. `ch_gate` is high while a frame is being
extracted.

**Counters.**

- The channel counter is cleared at each frame start, so it reads 1 for
  the first channel and 32 for the last.
- The 16-bit frame number counts accepted syncs and wraps at 65536.
  Reading its low byte captures the high byte, so a read of the low byte
  followed by the high byte gives a consistent 16-bit value.

**Latency.** `byte_ready` comes 2 clocks after the bit strobe of a
channel's second stop bit; the bit strobe itself comes near the middle of
that bit. Software then has 55 µs, one channel time, to read the byte
before the next one replaces it.

## ISA register map (`isa_interface`, `read_mux`)

The decoder uses 12-bit I/O addresses and is selected only while AEN is low.

| address | write (IOW low) | read (IOR low) |
|---|---|---|
| 0x300 | control byte, also clears interrupts | status byte |
| 0x301 | OP_TIME end time, low byte | channel number (1..32) |
| 0x302 | OP_TIME end time, high byte | channel data |
| 0x303 | OP_TIME resolution, bits 1:0 | frame number, low byte |
| 0x304 | SYNC word, low byte (reset 0x90) | frame number, high byte |
| 0x305 | SYNC word, high byte (reset 0xEB) | — |

The map and the functions are as specified. The bit positions of the
control and status bytes are this design's own; they are defined as packed
structs in `pcm_pkg`.

**Control byte (0x300, write):**

| bit | name | action |
|---|---|---|
| 7 | `mode` | stored: line code, 0 = NRZ, 1 = Manchester |
| 6 | `clear_irq7` | pulse: clear the IRQ7 request |
| 5 | `clear_irq5` | pulse: clear the IRQ5 request |
| 4 | `enable_irq7` | stored: IRQ7 line enabled |
| 3 | `enable_irq5` | stored: IRQ5 line enabled |
| 2 | `run` | stored: start (0→1) or stop the operation |
| 1 | `reset_frame` | pulse: frame number := 0 |
| 0 | `reset_receiver` | pulse: resets the receive path. Bit recovery, shift register, byte sync, latch, channel counter and the sticky status bits are cleared |

The stored bits are rewritten by every control write. A write that clears
an interrupt must therefore repeat the current mode, enables and run bit.

**Status byte (0x300, read):**

| bit | name | meaning |
|---|---|---|
| 7 | — | always 0 |
| 6 | `overrun` | sticky: a new channel byte arrived while IRQ5 was still pending |
| 5 | `framing_error` | sticky: a bad start or stop bit made the decoder drop the frame |
| 4 | `mode` | current line code |
| 3 | `op_time` | OP_TIME flag: an operation is running |
| 2 | `in_frame` | sync found, channels being extracted |
| 1 | `irq7_pending` | IRQ7 request |
| 0 | `irq5_pending` | IRQ5 request |

**Bus timing.** Inputs are registered every clock. A write takes effect in
the cycle after IOW returns high. It uses the address and data of the last
cycle in which IOW was low. A read drives `isa_data_out` and
`isa_data_oe` combinationally while IOR and AEN are low and the address
matches. The board must place the data bus driver under `isa_data_oe`.

**Interrupts.** An event always sets its request flag, so the status byte
shows the event even when the interrupt is masked. The IRQ line is the
request AND its enable. Only a control write with the matching clear bit
removes a request. If an event and a clear fall in the same clock, the
event wins.

## Operation timer (`operation_timer`, `selectable_divider`)

OP_TIME is 18 bits: a 16-bit end time and a 2-bit resolution. The
resolution selects a divider stage after a fixed base tick:

| resolution | step | longest operation |
|---|---|---|
| 0 | 1 ms | 65.5 s |
| 1 | 10 ms | 10.9 min |
| 2 | 100 ms | 1.8 h |
| 3 | 1 s | 18.2 h |

The 2-bit resolution field is specified. The ratios and the 1 ms base are
this design's choice.

Writing `run` from 0 to 1 does three things:

- clears the 16-bit precision timer and the divider;
- raises the OP_TIME flag;
- starts the count.

When the timer reaches the end time, the flag drops and the IRQ7 request
is set. The whole operation lasts end_time × step + 1 clock. An end time
of 0 means 65536 steps. Writing `run` = 0 stops the operation early
without an IRQ7. Write OP_TIME before the start, because the comparator
reads it live.

## Software sequence

1. Write the SYNC word to 0x304 and 0x305, and OP_TIME to 0x301–0x303.
2. Write control `0x1F`. This enables both IRQs, starts the operation and
   resets the receiver and frame number. Add `0x80` for Manchester.
3. On each IRQ5:
   - write control with `clear_irq5` (e.g. `0x3C` in NRZ);
   - read the channel number (0x301) and the channel data (0x302);
   - after channel 32, store the frame.
4. On IRQ7, write control with `clear_irq7` and `run` = 0, then close the
   log.

## Hamming (7,4) correction (`hamming74_decoder`)

The Hamming decoder works on the latched channel byte and drives the top's
`ham_data` (4 bits) and `ham_corrected` outputs. The ISA bus still returns
the raw byte, so software may do the correction itself instead.

The code word sits in byte bits 6..0. Byte bit *i* holds code position
*i*+1, in the order p1 p2 d1 p4 d2 d3 d4. Byte bit 7 is ignored. The
parity bits are:

- p1 = d1⊕d2⊕d4
- p2 = d1⊕d3⊕d4
- p4 = d2⊕d3⊕d4

The 3-bit syndrome is the position of a single wrong bit. That bit is
flipped, and {d4,d3,d2,d1} is output. The code and its correction
capability are the specified ones; the placement of the bits in the byte
is this design's choice. Double errors are miscorrected, as with any
distance-3 code used for correction.

## Departures and open points

- **Hamming in hardware.** The reference decoder corrected errors in
  software. Here the correction is also in hardware, on extra output pins,
  and the register map is unchanged.
- **Status and read multiplexer at the top level.** The reference block
  diagram draws them inside the data extraction. Here they sit at the top
  level, because they also collect interrupt and timer state.
- **One status byte.** The map has one status byte (0x300). The
  "second status byte" is taken to be the channel number (0x301).
- **Choices of this design, not given by the specification:**
  - line-code conventions (NRZ-L, bi-phase-L);
  - the clock-recovery method (oversampling, no PLL);
  - the 11-bit channel layout;
  - the drop-lock rule on a framing error;
  - the bit layout of the control and status bytes;
  - the timer base and divider ratios;
  - the synchronous bus timing;
  - the overrun bit;
  - the frame-number holding register.
- **Loss of sync.** There is no flywheel or sync-error tolerance. A bit
  error in the sync word loses that frame, and the sync compare must match
  exactly.

## Files

RTL, in `rtl/`:

- `pcm_pkg.sv`: frame constants, register addresses, `control_t`,
  `status_t`
- `pcm_decoder_top.sv`: the decoder
- `data_extraction.sv`, `line_decoder.sv`, `sipo_shift_register.sv`,
  `sync_comparator.sv`, `byte_sync_extractor.sv`, `channel_latch.sv`,
  `channel_counter.sv`, `frame_counter.sv`
- `operation_timer.sv`, `selectable_divider.sv`
- `isa_interface.sv`, `status_register.sv`, `read_mux.sv`
- `hamming74_decoder.sv`

Testbenches, in `tb/`:

- `tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `pcm_tx_model.sv`: a behavioural NRZ/Manchester frame transmitter.
- `tb_pcm_decoder_top.sv` runs the whole decoder at its default
  parameters, for 12 ms of simulated time. It behaves like the PC software
  and sends NRZ frames, a frame with a bad stop bit, and Manchester frames
  with Hamming errors. It checks every byte read over the bus, the
  corrected nibbles, the 55 µs channel period, the overrun and framing
  error status, and an IRQ7 12 ms (within a few clocks) after the start. It also counts
  that each of these mechanisms occurred.
- `tb_data_extraction.sv` also sends all 256 channel values.
- `tb_mission_workload.sv` runs the full reference mission at default
  parameters: one NRZ frame every 10 ms for a 5 s operation. That is 500
  frames and 40 million clocks, about half a minute in Verilator. Every
  one of the 16000 channel bytes is read over the bus and checked, and
  IRQ7 is checked to arrive at 5 s.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcm_pkg.sv \
    tb/tb_pcm_decoder_top.sv --top-module tb_pcm_decoder_top -Mdir obj
./obj/Vtb_pcm_decoder_top
```

Any other testbench builds the same way: replace the testbench file and the
`--top-module` name. Each testbench except the mission run takes well under a second. The
testbenches make no use of X or Z. They drive reset with a falling edge,
so they also work with random initial values (`+verilator+rand+reset+2`).
