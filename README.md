# Multi-channel bit-error-rate tester for serial links

This is an FPGA bit-error-rate tester (BERT) for testing serial links, such as AC-coupled chip-to-chip interconnect. It has up to three independent channels. Each channel:

- sends a known 20-bit-per-clock test pattern into a multi-gigabit serial transceiver;
- takes the words the far end recovers, on the clock the far end recovers;
- regenerates the same pattern locally, without any side channel telling it where the pattern starts;
- counts frames, error frames, bit errors and the distance between errors.

An embedded processor reaches every channel through one 32-bit GPIO port: it picks patterns, injects errors, resets channels and reads the counters. Two more transceivers send a plain clock for source-synchronous receivers.

The central idea is that each receiver needs nothing from the transmitter except the data stream:

- **Remote reset.** A long run of *comma* words, sent after every transmitter reset, clears the far receiver. It also tells the transceiver to realign its word boundary.
- **Self-alignment.** The local pattern generator then freezes on the first word of the pattern. It waits for that word to appear, and from then on runs in step with the stream.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). The serial transceivers are outside it: they are vendor hard macros. The embedded processor system is outside it too.

```
                     tx_clock (75 MHz)                       recovered clock (per channel)
 gpio_in[0:31] ──► gpio_regs ──ctrl──► bert_channel ×3 ──────────────────────────────────┐
 gpio_out[0:31] ◄──          ◄─status─ │ edge_detect ─► bert_transmitter ─► mgt_tx_data ─► transceiver
                                       │                                                  │ (serial link)
                                       │ async_fifo ◄── bert_receiver ◄── mgt_rx_data ◄───┘
                                       │  (8 deep)       ├ comma_detector ─► mgt_enable_comma_align
                                       │                 ├ pattern_detector (pattern_gen inside)
                                       │                 └ BER counters
 reset ─► reset_gen per channel (tx and rx resets);   reset_top ─► reset_chain ─► clock channels (0xAAAAA)
```

## Frames and test patterns

Everything moves in 20-bit words. One word per clock goes to a transceiver that serializes it, so a 75 MHz word clock gives 1.5 Gb/s. Bit 19 of a word is serialized first.

`pattern_gen` holds sixteen pattern sources side by side. A 4-bit select (`pattern_e` in `bert_pkg`) chooses one:

| id | pattern | id | pattern |
|----|---------|----|---------|
| 0 | clock, 1/2 rate, `0xAAAAA` | 8 | PRBS 2^20−1, x^20+x^17+1, at most 14 zeros in a row |
| 1 | clock, 1/10 rate, `0xF83E0` | 9 | PRBS23, x^23+x^18+1, inverted |
| 2 | clock, 1/20 rate, `0xFFC00` | 10 | PRBS29, x^29+x^27+1, inverted |
| 3 | PRBS7, x^7+x^6+1 | 11 | PRBS31, x^31+x^28+1, inverted |
| 4 | PRBS9, x^9+x^5+1 | 12 | PRBS32, x^32+x^31+x^30+x^10+1 |
| 5 | PRBS11, x^11+x^9+1 | 13 | user word, default `0xC1554` |
| 6 | PRBS15, x^15+x^14+1, inverted | 14 | clock, 1/4 rate, `0xCCCCC` |
| 7 | PRBS20, x^20+x^3+1 | 15 | 20-bit counter |

**PRBS generator (`prbs_gen`).** Each PRBS source is a `prbs_gen`: a Fibonacci LFSR whose tap set is the `POLY` parameter. Bit k−1 of `POLY` is stage k.

- The loop is unrolled N times, so one clock yields N bits.
- Reset loads all ones into the LFSR and a 1 into the output register.
- While `enable_in` is low, both the state and the output hold.
- `INVERT` complements the output.
- `ZERO_SUPPRESS = 14` forces a one after 14 zero bits. This gives the zero-suppressed pattern 8.

**Registered output and error insertion.** `pattern_gen` registers the selected word. It XORs the word with `error_insert_in`, so one high clock inverts all 20 bits of exactly one word. For example, the user word `0xC1554` becomes `0x3EAAB`.

**Pre-enable step.** In the first clock after reset, every source steps once. This makes the first word of every sequence available before the generator is enabled. After that, only the selected source advances.

**Latency.** The output trails `enable_in` by two clocks: the source register, then the output register.

**Building fewer patterns.** `PATTERN_ENABLE` can leave sources out to save area. A source that is left out returns zeros.

## Link start-up: comma sequence and self-alignment

This section is the part of the design that needs the most care.

### Transmitter

`bert_transmitter` is a three-state machine: RESET → INIT → DATA.

- After reset it sends exactly `INIT_WORDS` (2^18) copies of the comma word `0x3E8E1`.
- It then sends the selected pattern, starting with the pattern's first word.
- The pattern generator is held in reset during RESET.
- The generator is enabled from the last INIT clock. Its two-clock latency then lines up with the first DATA word.
- Changing the pattern in DATA switches the pattern on the fly. It does not start a new comma sequence. Resetting the channel does.

### Comma detector

The transceiver flags each word that contains the comma (`comma_detect`). `comma_detector` counts consecutive comma words.

- On the 64th comma in a row it enters COMMA.
- On entering COMMA it pulses `enable_comma_align` for one clock. The transceiver then rechecks its word boundary.
- It raises `rx_reset`, which clears all BER counters.
- `rx_reset` falls only after **two consecutive** non-comma words. A single corrupted comma inside the run therefore cannot split one remote reset into several.

### Pattern detector

`pattern_detector` contains its own `pattern_gen`, identical to the transmitter's. It is restarted by a local reset or by the `enable_comma_align` pulse. Restarting on the pulse means it is already searching when the first pattern word arrives, even though `rx_reset` is still high at that point.

| state | what happens | `wait` | `lock` |
|-------|--------------|--------|--------|
| SEARCH | The generator output is frozen at the pattern's first word, W0. Each received word, delayed one register (`data_d`), is compared with W0. A match releases the generator. | 1 | 0 |
| SYNC | One clock, while the generator's two-stage pipeline refills. | 1 | 0 |
| CONFIRM | The next received word, delayed a second register (`data_d2`) to line up with the generator output, must match too. A mismatch returns to SEARCH, and the frozen generator word becomes the new search word. | 1 | 0 |
| LOCK | Every word is compared. A mismatch raises `error_out` for one clock, with `bit_errors` = popcount of the difference. | 0 | 1 |
| ABORT | Entered after three error words in a row: the link is too unstable to measure. Only a restart leaves it. | 0 | 0 |

Two notes on this scheme:

- **Why two matches.** Two consecutive matches are required because a single 20-bit match can happen by chance inside a long PRBS. The number is the `LOCK_MATCHES` parameter; each extra match adds one clock to CONFIRM. The abort count is `ABORT_ERRORS` (3).
- **Where the search can fail.** The search only works because the receiver sees W0 somewhere after the comma run. With the comma detector restarting the search on the align pulse, W0 is the first non-comma word, so lock follows a few clocks after the commas end.

## BER counters

`bert_receiver` wraps the comma detector and the pattern detector, and keeps the counters. All counters are held at zero while the local reset or `rx_reset` is high.

| counter | width | counts |
|---------|-------|--------|
| total frames | 41 | words checked in LOCK |
| error frames | 25 | checked words with at least one wrong bit |
| bit errors | 32 | sum of wrong bits; `overflow` is set and stays set when it wraps |
| error interval | 41 | at each error word: the number of good words checked between it and the previous error word (or since lock) |

A 41-bit frame counter lasts 2^41 / 75 MHz ≈ 8.1 hours at 1.5 Gb/s. Software computes BER = bit errors / (total frames × 20).

## Crossing to the transmit clock

Each receiver runs on its own recovered clock. These clocks have the same frequency but unrelated phases. So that one register block on the transmit clock can read all channels, each `bert_channel` moves its statistics through an 8-deep `async_fifo`:

- The FIFO has Gray-coded pointers and two-flop synchronizers.
- Its storage is a dual-port array, which maps onto a block RAM.
- On every receive clock with room, one consistent snapshot of all counters and flags is written.
- On every transmit clock with data, the oldest snapshot is read into `status_out`.

The status therefore lags the receiver by a few clocks, but is never torn across two updates.

Two control signals get special handling:

- The error-insert control bit passes through `edge_detect`, on the transmit clock. Each toggle of the bit, in either direction, gives one pulse, and so one inverted frame.
- The pattern select reaches the receive domain through two flops. It only changes while a link is being set up.

## GPIO register interface

`gpio_regs` decodes a 32-bit input and drives a 32-bit output. Both are numbered **big-endian, [0:31]**, with bit 0 the most significant. Every other bus in the design is little-endian.

| `gpio_in` bits | field | use |
|----------------|-------|-----|
| [0:1] | RD/WR | a one-clock pulse 00→11→00 writes; 00→01→00 reads |
| [2:4] | ADDR | register address |
| [5:7] | RESET | level resets for channels 1, 2, 3 |
| [8:31] | DATA | write data; bit 31 is data bit 0 |

**Protocol and timing.**

- ADDR and DATA must be held for two clocks from the pulse.
- `gpio_in` is registered once. An operation is recognised on the rising edge of the registered RD/WR field.
- A write takes effect two clocks after the pulse is first driven.
- A read result appears on `gpio_out` two clocks after the pulse and stays there until the next read.

**Control registers (write).**

- Addresses 0, 1, 2 are channels 1, 2, 3. They use data bits [8:0]:
  - [8] error insert: each toggle inserts one error frame;
  - [7] power-down;
  - [6] TX inhibit;
  - [5:4] loopback: 00 none, 01 parallel, 10 serial;
  - [3:0] pattern select.
- Address 3, bits [1:0] select the channel for reads.

**Status words (read, for the selected channel).**

| ADDR | contents |
|------|----------|
| 0 | `{3'b0, error_frames[24:0], overflow, abort, lock, wait}` |
| 1 | `bit_errors[31:0]` |
| 2 | `{14'b0, total_frames[40:32], error_interval[40:32]}` |
| 3 | `total_frames[31:0]` |
| 4 | `error_interval[31:0]` |
| 5–7 | zero |

**Example sequence.**

1. Select channel 1: write 0 to address 3.
2. Toggle its error-insert bit: write `0x100` to address 0, keeping the pattern and loopback bits.
3. Read address 1. It now shows 20 more bit errors.

## Clocks, resets and the clock channels

**Clocks.**

- `tx_clock` (75 MHz) runs the transmitters, the register block and the read side of the FIFOs.
- `mgt_rx_clock[i]` is channel i's recovered clock. It has the same frequency as `tx_clock` and any phase.
- `tx_clock_top` (150 MHz) runs the two clock channels. They sit on the other bank of transceivers, which has its own reference clock.

**Resets.** Resets come from a push button and are asynchronous, so they are conditioned:

- `reset_chain` is a chain of `STAGES` flops (8). The asynchronous reset presets them to 1; after release they shift in a 0, and two more flops follow.
- The reset therefore asserts at once and releases synchronously, STAGES + 2 clocks after the input falls.
- `reset_gen` adds two flops on the recovered clock, to release the receive-side reset in that domain.
- Each channel has its own `reset_gen`, driven by the system reset OR the channel's GPIO reset bit.
- A channel reset is how a new comma sequence is started. The same reset also drives the channel's transceiver reset, which lasts well over the 3 clocks the transceiver's PLL needs.

**Clock channels.** The clock channels send the constant word `0xAAAAA`, which the transceiver turns into a clock at half its bit rate. They run at twice the data channels' word rate: 150 MHz × 20 = 3 Gb/s, giving a 1.5 GHz clock. That clock matches the data channels' 1.5 Gb/s, as a source-synchronous interface needs.

**LEDs.** `leds[5:0]` = {lock3, wait3, lock2, wait2, lock1, wait1}. `leds[7:6]` are 0.

## Top level: `multi_bert`

| port | dir | meaning |
|------|-----|---------|
| `tx_clock`, `reset` | in | bottom-bank word clock and asynchronous reset |
| `tx_clock_top`, `reset_top` | in | top-bank clock and reset, for the clock channels |
| `gpio_in[0:31]`, `gpio_out[0:31]` | in/out | register interface |
| `leds[7:0]` | out | lock/wait per channel |
| `mgt_tx_data[i]`, `mgt_rx_data[i]`, `mgt_rx_clock[i]` | out/in/in | parallel side of channel i's transceiver |
| `mgt_comma_detect[i]`, `mgt_enable_comma_align[i]` | in/out | comma flag and realign request |
| `mgt_loopback[i]`, `mgt_tx_inhibit[i]`, `mgt_powerdown[i]`, `mgt_reset[i]` | out | transceiver controls |
| `clk_chan_tx_data[j]`, `clk_chan_reset` | out | clock-channel transceivers |

The parameters are:

- `NUM_CHANNELS` (3) and `NUM_CLK_CHANS` (2);
- `INIT_WORDS` (262144) and `COMMA_RUN` (64);
- `RESET_STAGES` (8);
- `COMMA`, `USER_PATTERN` and `PATTERN_ENABLE`.

Shared types and widths are in `bert_pkg`.

The transceivers' reference clocks go only to the transceivers, so they are not ports here. The transceiver's reference-clock select is also left to the transceiver wrapper.

## What is outside this RTL

These parts are not in the RTL:

- The transceivers. This covers serializer/deserializer, clock recovery, comma detection and byte alignment.
- The PowerPC processor system, with its block RAMs, UART and bus bridge. It runs the menu software that drives the GPIO port.
- The clock manager.
- The board.

The testbenches use a behavioural transceiver, `tb/mgt_model.sv`. It works as follows:

- A queue of words serves as the link.
- A configurable bit slip misaligns the words.
- It searches for the comma and realigns when `enable_comma_align` pulses.
- It flags commas and can flip chosen bits.
- TX inhibit sends zeros.

## Design choices and departures

These points are this design's own choices, where the description it follows leaves them open:

- **Pattern detector.** The exact search/confirm timing, the two-match lock and the three-error abort are this design's. So is restarting the detector on the align pulse.
- **Status word 0.** Bit 0 of status word 0 is `wait`. Status words 5–7 read zero.
- **Frozen LFSR.** The LFSR state freezes with `enable_in`. Without this, the expected sequence could not be held and then resumed without a gap.
- **Zero suppression.** The zero-suppression mechanism of pattern 8 is this design's.
- **Error interval.** The interval is counted in checked words since the previous error word, or since lock.
- **Counted frames.** Only words checked in LOCK are counted.
- **FIFO use.** The FIFO carries a continuous stream of snapshots. Its write side is not event driven.
- **Comma count.** Exactly `INIT_WORDS` comma words are sent. A literal reading of the transmitter's state diagram (leave INIT when the count exceeds 2^18) would send two more. The receiver does not care either way.
- **Per-channel reset circuits.** Each channel has its own tx/rx reset circuit, so that a channel can be reset from the GPIO port without disturbing the others, and each receive-side reset is released on that channel's own recovered clock. The clock-channel bank has a single chain.
- **Reset length.** The reset chain length, 8, is a choice.
- **Reset timing.** `reset` and `reset_top` are treated as asynchronous and conditioned inside. A caller that already has a synchronous reset loses nothing by this.
- **Pattern changes.** A pattern change without a channel reset switches the transmitter at once. The receiver is not restarted by it, so its compare may no longer line up. Software should reset the channel after changing the pattern, as the test sequence does.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one:

- compares the module against an independent reference: bit-serial LFSR models in `tb/bert_ref_pkg.sv`, or explicit expected values;
- prints `TB_RESULT checks=… failures=…`;
- has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `prbs_gen_tb` | 2^9−1, inverted 2^15−1 and zero-suppressed 2^20−1 generators against the model; reset value, enable hold, period, 14-zero limit |
| `pattern_gen_tb` | all 16 patterns word by word, error insertion, enable latency |
| `bert_transmitter_tb` | exact comma count, first pattern word, error insertion |
| `comma_detector_tb` | 64-run threshold, single-word gaps, two-word release, one align pulse |
| `pattern_detector_tb` | lock after a random lead-in, bit-error counts, abort and its hold |
| `bert_receiver_tb` | counter values against injected errors, error interval, overflow (narrow counter) |
| `edge_detect_tb`, `async_fifo_tb`, `reset_gen_tb`, `gpio_regs_tb` | the support blocks |
| `bert_channel_tb` | one channel over a slipped, phase-shifted loopback |
| `multi_bert_tb` | all three channels through the GPIO port (details below) |
| `multi_bert_full_tb` | the top at full default parameters (details below) |
| `multi_bert_ber_tb` | a 2-million-frame measurement on two channels (details below) |

`multi_bert_tb` runs with `INIT_WORDS=300`. It replays a processor session: select, read, error insert, channel reset, TX inhibit leading to abort, pattern change leading to relock, all status words, the transceiver control bits and the clock channels. It counts each of these mechanisms and fails if one never happens.

`multi_bert_full_tb` runs the top at its default parameters: the full 2^18-word comma sequence, then lock on all channels, error insertion and the status readout.

`multi_bert_ber_tb` runs two measurements side by side, each 2 million frames long:

- Channel 1 runs inverted PRBS23 over a clean link, as in an intrinsic-BER run. It must end with zero errors.
- Channel 3 runs inverted PRBS31 in serial loopback over a line model that corrupts about 0.2 % of the frames with 1 to 20 flipped bits.

The testbench keeps its own tally of the corrupted frames and bits and of the last gap between errors. It checks that the counters read back through the GPIO port match the tally exactly, and that the BER the software would compute matches too.

The bit-error overflow flag is reached only in `bert_receiver_tb`. It uses a narrowed counter, because 2^32 errors cannot be simulated.

To run a testbench with plain Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module multi_bert_tb rtl/bert_pkg.sv tb/bert_ref_pkg.sv tb/multi_bert_tb.sv
obj_dir/Vmulti_bert_tb
```

The same works for any other testbench; pass `tb/bert_ref_pkg.sv` when it uses the reference models. All state that is read is reset or initialised, so the results do not depend on the simulator's initial values.

## Changing the design

- **Number of channels.** `NUM_CHANNELS` can be lowered. Going above 3 needs a new register map: addresses 0–2 hold the channel control words, address 3 is the channel select, and the select field is 2 bits.
- **Shorter start-up.** `INIT_WORDS` and `COMMA_RUN` can be reduced, for simulation or for short links. `INIT_WORDS` must be at least 3, and should stay well above `COMMA_RUN`.
- **Different patterns.** Change the user word with `USER_PATTERN`. Change the PRBS set with the tables at the top of `pattern_gen`.
- **Counter widths.** The widths are in `bert_pkg`. The status word layout in `gpio_regs` assumes the defaults.
